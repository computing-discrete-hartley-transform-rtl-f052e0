// dht_approx: 32-point discrete Hartley transform on the same systolic array
// as dht_exact, with the approximate algebraic-integer code.
//
// An exact 32-point code would need polynomials of degree 7; here the degree
// stays at I = 3 and z stays 2*cos(2*pi/16), and every kernel value
// 2*cas(2*pi*m/32) is approximated by a0 + a1 z + a2 z^2 + a3 z^3 with CB-bit
// integers (dht_approx_pkg).  The grid is 32 rows by 4 columns of
// dht_pe1_mul cells, which multiply by their coefficient instead of shifting;
// the input demultiplexer and the PE2/PE3 Horner row (dht_recon, with the same
// z^ = 473/256) are those of the 16-point array.
//
// Timing is that of dht_exact with N = 32, I = 3: X_0 of a block is visible
// N+I+2 = 37 steps after its x_0 was taken, X_31 after 2N+I+1 = 68 steps, then
// one result per step.  step is a global clock enable (stall).
//
// Outputs: out_valid pulses once per new result, out_k is its index and X_out
// is X_k with F+1 = 9 fraction bits.  The error against the true DHT comes
// from the coefficient approximation (odd k*n only) and from z^.
module dht_approx
  import dht_pkg::*;
#(
  parameter  int N   = 32,
  parameter  int X_W = 8,
  parameter  int CB  = 6,
  localparam int I   = 3,
  localparam int F   = Z_FRAC,
  localparam int S_W = X_W + CB + $clog2(N),
  localparam int Y_W = S_W + F + 4,
  localparam int K_W = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  step,
  input  logic signed [X_W-1:0] x_in,
  output logic                  out_valid,
  output logic [K_W-1:0]        out_k,
  output logic signed [Y_W-1:0] X_out
);

  localparam int FILL = N + I + 2;   // steps until the first result is loaded

  logic signed [X_W-1:0] x_row [N];
  logic signed [X_W-1:0] xh [N][I+2];   // xh[j][c]: sample entering cell (j,c)
  logic signed [S_W-1:0] sv [N+1][I+1]; // sv[j][c]: partial sum entering cell (j,c)
  logic signed [S_W-1:0] s_col [I+1];
  logic signed [Y_W-1:0] y;

  dht_demux #(.N(N), .X_W(X_W)) u_demux (
    .clk, .rst_n, .step, .x_in,
    .x_row(x_row)
  );

  for (genvar j = 0; j < N; j++) begin : g_row
    assign xh[j][0] = x_row[j];
    for (genvar c = 0; c <= I; c++) begin : g_col
      dht_pe1_mul #(.N(N), .X_W(X_W), .CB(CB), .S_W(S_W), .ROW(j), .COL(c)) u_pe1 (
        .clk, .rst_n, .step,
        .x_in (xh[j][c]),
        .s_in (sv[j][c]),
        .x_out(xh[j][c+1]),
        .s_out(sv[j+1][c])
      );
    end
  end

  for (genvar c = 0; c <= I; c++) begin : g_colsum
    assign sv[0][c]  = '0;
    assign s_col[c]  = sv[N][c];
  end

  dht_recon #(.I(I), .S_W(S_W), .F(F), .Y_W(Y_W)) u_recon (
    .clk, .rst_n, .step,
    .s_col(s_col),
    .y    (y)
  );

  assign X_out = y;

  // Output bookkeeping: step number s (from 0 after reset) loads the result
  // for k = (s - (FILL-1)) mod N once s >= FILL-1.  fill_q counts steps and
  // saturates at FILL-1; next_k is the index of the next result.
  logic [$clog2(FILL)-1:0] fill_q;
  logic [K_W-1:0]          next_k;
  logic                    full;

  assign full = (fill_q == $bits(fill_q)'(FILL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_q    <= '0;
      next_k    <= '0;
      out_valid <= 1'b0;
      out_k     <= '0;
    end else begin
      out_valid <= step && full;
      if (step) begin
        if (!full) begin
          fill_q <= fill_q + 1'b1;
        end else begin
          out_k  <= next_k;
          next_k <= next_k + 1'b1;
        end
      end
    end
  end

endmodule
