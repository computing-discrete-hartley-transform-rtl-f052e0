// dht_exact: N-point discrete Hartley transform on a systolic array with
// algebraic-integer coefficients (default N = 16, 8-bit samples).
//
// The kernel 2*cas(2*pi*k*n/N) is coded exactly as a0 + a1 z + a2 z^2 + a3 z^3
// with small integers a_i and z = 2*cos(2*pi/N) (see dht_pkg).  The array
// computes, for every output k, the four integer column sums
//     S_i(k) = sum_n x_n * a_i(k*n mod N)        (error free)
// and only then evaluates 2*X_k = ((S_3 z + S_2) z + S_1) z + S_0 with an
// approximate constant z, which is the only source of error.
//
// Structure:
//   dht_demux  serial input -> N row registers, each held for N steps
//   N x (I+1) grid of dht_pe1: row j holds x_j, which moves one column to
//              the right per step; partial sums move one row down per step.
//              Column c accumulates S_{I-c}; the top of every column is 0.
//   dht_recon  I dht_pe2 cells and one dht_pe3 cell under the grid, Horner.
// Here I = N/4 - 1 (3 for N = 16): N*(I+1) PE1, I PE2, one PE3.
//
// Timing (one time step = one cycle with step high; step low stalls the
// whole array, which is this design's choice).  Samples are taken on every
// step, x_0..x_{N-1} of block 0 in the first N steps after reset, and the next
// block directly after.  X_0 of a block leaves the array N+I+2 steps after its
// x_0 was taken; X_{N-1} of the first block appears after 2N+I+1 steps, i.e.
// 2N+I steps of the array plus the input register of the demultiplexer.
// After that one X_k appears per step: a new block every N steps.
//
// Outputs: out_valid is high for one cycle after each step that loaded a new
// result; out_k is its index k; X_out is X_k as a signed fixed-point number
// with F+1 = 9 fraction bits (the array produces 2*X_k with F = 8 fraction
// bits; the factor 2 is absorbed into the binary point).  X_out is exact up to
// the truncations of the z multiplications.
module dht_exact
  import dht_pkg::*;
#(
  parameter  int N   = 16,
  parameter  int X_W = 8,
  localparam int I   = N / 4 - 1,
  localparam int F   = Z_FRAC,
  localparam int S_W = X_W + 3 + $clog2(N),
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
      dht_pe1 #(.N(N), .X_W(X_W), .S_W(S_W), .ROW(j), .COL(c)) u_pe1 (
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
