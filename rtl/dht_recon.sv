// dht_recon: reconstruction row of the DHT array, a linear array of I PE2
// cells and one PE3 cell evaluating Horner's rule
//     f(z) = ((a_3 z + a_2) z + a_1) z + a_0        (I = 3)
// on the integer column sums leaving the bottom of the PE1 grid.
//
// s_col[c] is the sum of column c, which carries coefficient a_{I-c}.  The
// leftmost PE2 receives 0 as its running value.  Each cell registers its
// result, and the column sums reach the row one step later per column (the
// skew of the grid), so column c's sum for output k must be valid exactly c
// steps after column 0's sum for the same k.  The result for k leaves the row
// I+1 steps after column 0's sum for k was presented.
//
// Interface: step is the global clock enable; y is 2*X_k with F fraction bits.
module dht_recon #(
  parameter int I   = 3,
  parameter int S_W = 15,
  parameter int F   = dht_pkg::Z_FRAC,
  parameter int Y_W = 27
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  step,
  input  logic signed [S_W-1:0] s_col [I+1],
  output logic signed [Y_W-1:0] y
);

  logic signed [Y_W-1:0] h [I+2];   // h[c] is the running value entering cell c

  assign h[0] = '0;

  for (genvar c = 0; c < I; c++) begin : g_pe2
    dht_pe2 #(.S_W(S_W), .F(F), .Y_W(Y_W)) u_pe2 (
      .clk, .rst_n, .step,
      .x_in (h[c]),
      .y_in (s_col[c]),
      .y_out(h[c+1])
    );
  end

  dht_pe3 #(.S_W(S_W), .F(F), .Y_W(Y_W)) u_pe3 (
    .clk, .rst_n, .step,
    .x_in (h[I]),
    .y_in (s_col[I]),
    .y_out(h[I+1])
  );

  assign y = h[I+1];

endmodule
