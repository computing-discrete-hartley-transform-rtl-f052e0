// dht_pe3: final adder of the reconstruction row (PE3).
//
// Computes y_out <- x_in + y_in: the last Horner step adds the constant
// coefficient a_0 (the column sum y_in, an integer) to the running value x_in,
// which carries F fraction bits.  The result is 2*X_k in fixed point with F
// fraction bits, i.e. X_k with F+1 fraction bits.
//
// Interface: as dht_pe2; y_out is registered and holds while step is low.
module dht_pe3 #(
  parameter int S_W = 15,
  parameter int F   = dht_pkg::Z_FRAC,
  parameter int Y_W = 27
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  step,
  input  logic signed [Y_W-1:0] x_in,
  input  logic signed [S_W-1:0] y_in,
  output logic signed [Y_W-1:0] y_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    y_out <= '0;
    else if (step) y_out <= x_in + (Y_W'(y_in) <<< F);
  end

endmodule
