// dht_top: the two DHT arrays built from algebraic-integer kernel codes,
// side by side.
//
//   ex_*  dht_exact   16-point DHT, exact kernel code (coefficients 0, +-1,
//                     +-2, +-4, one shift per PE1), 16 x 4 PE1 grid.
//   ap_*  dht_approx  32-point DHT, kernel code approximated with degree 3
//                     and CB-bit coefficients (PE1 multiplies), 32 x 4 grid.
//
// Both share the cell schedule, the input demultiplexer and the PE2/PE3
// Horner row; they are independent and have their own step enables.  Each
// takes one 8-bit sample per step (blocks aligned to reset) and, once its
// pipeline is full, delivers one X_k per step with 9 fraction bits:
// X_0 after N+I+2 steps and X_{N-1} after 2N+I+1 steps of the first block
// (21/36 for the 16-point array, 37/68 for the 32-point array).
module dht_top #(
  parameter  int EX_N  = 16,
  parameter  int X_W   = 8,
  parameter  int AP_CB = 6,
  localparam int EX_YW = (X_W + 3 + $clog2(EX_N)) + dht_pkg::Z_FRAC + 4,
  localparam int AP_YW = (X_W + AP_CB + 5) + dht_pkg::Z_FRAC + 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // exact 16-point array
  input  logic                    ex_step,
  input  logic signed [X_W-1:0]   ex_x_in,
  output logic                    ex_out_valid,
  output logic [$clog2(EX_N)-1:0] ex_out_k,
  output logic signed [EX_YW-1:0] ex_X_out,
  // approximate 32-point array
  input  logic                    ap_step,
  input  logic signed [X_W-1:0]   ap_x_in,
  output logic                    ap_out_valid,
  output logic [4:0]              ap_out_k,
  output logic signed [AP_YW-1:0] ap_X_out
);

  dht_exact #(.N(EX_N), .X_W(X_W)) u_exact (
    .clk, .rst_n,
    .step     (ex_step),
    .x_in     (ex_x_in),
    .out_valid(ex_out_valid),
    .out_k    (ex_out_k),
    .X_out    (ex_X_out)
  );

  dht_approx #(.N(32), .X_W(X_W), .CB(AP_CB)) u_approx (
    .clk, .rst_n,
    .step     (ap_step),
    .x_in     (ap_x_in),
    .out_valid(ap_out_valid),
    .out_k    (ap_out_k),
    .X_out    (ap_X_out)
  );

endmodule
