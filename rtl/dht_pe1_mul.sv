// dht_pe1_mul: PE1 cell of the approximate 32-point DHT array.
//
// Same cell function and schedule as dht_pe1 (x_out <- x_in,
// s_out <- s_in + a * x_in, both registered, N coefficients in a ring of local
// registers rotating once per step, cell (ROW, COL) working on output
// k = (t - ROW - 1 - COL) mod N in step t).  The difference is the
// coefficient: the approximate code of dht_approx_pkg uses integers of CB
// bits that are in general not powers of two, so the cell multiplies the
// sample by a signed coefficient instead of shifting it.  The ring registers
// are CB+1 bits wide, because the code is applied with either sign.  A zero
// coefficient still makes the cell a plain transfer.
//
// Interface: step is the global clock enable; x_in/x_out signed X_W bits,
// s_in/s_out signed S_W bits; one step of latency.
module dht_pe1_mul
  import dht_approx_pkg::*;
#(
  parameter int N   = 32,
  parameter int X_W = 8,
  parameter int CB  = 6,
  parameter int S_W = 19,
  parameter int ROW = 0,
  parameter int COL = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  step,
  input  logic signed [X_W-1:0] x_in,
  input  logic signed [S_W-1:0] s_in,
  output logic signed [X_W-1:0] x_out,
  output logic signed [S_W-1:0] s_out
);

  localparam int I   = 3;
  localparam int IDX = I - COL;
  localparam int K0  = (((-ROW - 1 - COL) % N) + N) % N;
  // A code of CB bits may hold -2^(CB-1) (the 4-bit set has -8); its
  // negation for the other half of the angles needs one more bit.
  localparam int CW  = CB + 1;

  if (N != 32) begin : g_bad_n
    $error("dht_pe1_mul: the approximate code is defined for N = 32");
  end
  if (COL < 0 || COL > I) begin : g_bad_col
    $error("dht_pe1_mul: COL out of range");
  end

  typedef logic signed [CW-1:0] ring_t [N];

  // Reset contents of the coefficient ring: entry p is used in step p (mod N).
  function automatic ring_t ring_init();
    ring_t r;
    for (int p = 0; p < N; p++) r[p] = CW'(approx_coef(CB, ((K0 + p) % N) * ROW, IDX));
    return r;
  endfunction

  localparam ring_t RING_INIT = ring_init();

  logic signed [CW-1:0]      ring_q [N];
  logic signed [X_W+CW-1:0]  prod;

  assign prod = x_in * ring_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) ring_q[p] <= RING_INIT[p];
      x_out <= '0;
      s_out <= '0;
    end else if (step) begin
      for (int p = 0; p < N; p++) ring_q[p] <= ring_q[(p + 1) % N];
      x_out <= x_in;
      s_out <= s_in + S_W'(prod);
    end
  end

endmodule
