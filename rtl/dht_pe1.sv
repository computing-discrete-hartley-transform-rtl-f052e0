// dht_pe1: shift-accumulate cell of the DHT array (PE1).
//
// On every step the cell passes its row's sample to the right neighbour
// (x_out <- x_in) and adds the sample, scaled by one kernel coefficient, to
// the partial sum coming from above (s_out <- s_in + a * x_in).  Every
// coefficient of the exact 16-point kernel is 0 or +-2^s, so the "multiply"
// is one shift and an optional negation; a zero coefficient makes the cell a
// plain transfer s_out <- s_in.
//
// The cell keeps the N coefficients it needs, one per output index k, in N
// local registers arranged as a ring.  The head of the ring is used on each
// step and the ring rotates by one position per step, so that in step t the
// cell in row ROW and column COL works on output index
//     k = (t - ROW - 1 - COL) mod N,
// which is the skew of the systolic schedule (the sample of row j reaches the
// array one step after it is taken in, and then one column further per step).
// The cell in column COL holds polynomial coefficient a_i with i = I - COL.
// Its ring therefore holds a_i(k * ROW mod N) for the N values of k, loaded as
// reset values; the design does not provide a way to reload them.
//
// Interface: step is a global clock enable (all state holds while it is low).
// x_in/x_out are signed X_W-bit samples, s_in/s_out signed S_W-bit column
// sums.  Both outputs are registered: one step of latency.
module dht_pe1
  import dht_pkg::*;
#(
  parameter int N   = 16,
  parameter int X_W = 8,
  parameter int S_W = 15,
  parameter int ROW = 0,   // j: row index, the sample index n this row holds
  parameter int COL = 0    // column; polynomial coefficient index i = N/4-1-COL
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  step,
  input  logic signed [X_W-1:0] x_in,
  input  logic signed [S_W-1:0] s_in,
  output logic signed [X_W-1:0] x_out,
  output logic signed [S_W-1:0] s_out
);

  localparam int I    = N / 4 - 1;
  localparam int IDX  = I - COL;
  localparam int K0   = (((-ROW - 1 - COL) % N) + N) % N;  // k used in step 0

  localparam int CW = $bits(shift_code_t);

  // Reset contents of the coefficient ring, packed: entry p (bits
  // [p*CW +: CW]) is used in step p (mod N).
  function automatic logic [N*CW-1:0] ring_init();
    logic [N*CW-1:0] r;
    r = '0;
    for (int p = 0; p < N; p++)
      r[p*CW +: CW] = to_shift(cas_coef(N, ((K0 + p) % N) * ROW, IDX));
    return r;
  endfunction

  localparam logic [N*CW-1:0] RING_INIT = ring_init();

  function automatic bit ring_ok();
    bit ok;
    ok = 1'b1;
    for (int p = 0; p < N; p++)
      if (!shift_ok(cas_coef(N, ((K0 + p) % N) * ROW, IDX))) ok = 1'b0;
    return ok;
  endfunction

  if (COL < 0 || COL > I) begin : g_bad_col
    $error("dht_pe1: COL out of range");
  end
  if (!ring_ok()) begin : g_bad_coef
    $error("dht_pe1: a kernel coefficient is not 0 or a power of two");
  end

  shift_code_t             ring_q [N];
  shift_code_t             head;
  logic signed [S_W-1:0]   x_ext;
  logic signed [S_W-1:0]   shifted;
  logic signed [S_W-1:0]   term;

  assign head  = ring_q[0];
  assign x_ext = S_W'(x_in);

  always_comb begin
    shifted = x_ext <<< head.sh;
    if (!head.nz)     term = '0;
    else if (head.neg) term = -shifted;
    else               term = shifted;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) ring_q[p] <= RING_INIT[p*CW +: CW];
      x_out <= '0;
      s_out <= '0;
    end else if (step) begin
      for (int p = 0; p < N; p++) ring_q[p] <= ring_q[(p + 1) % N];
      x_out <= x_in;
      s_out <= s_in + term;
    end
  end

endmodule
