// dht_pe2: Horner-step cell of the reconstruction row (PE2).
//
// Computes y_out <- (x_in + y_in) * z, where x_in is the running Horner value
// from the left neighbour and y_in is the integer column sum of one
// polynomial coefficient.  z = 2*cos(2*pi/16) = 1.847759... is replaced by
// the 8-bit-data approximation z^ = 2 - 2^-3 - 2^-5 + 2^-8 = 473/256, and
// the multiply by this constant is a special-purpose shift-add network:
//     v * 473 = (v << 9) - (v << 5) - (v << 3) + v,
// followed by an arithmetic right shift by 8 (floor), so that the Horner
// value keeps F fraction bits from cell to cell.
//
// Interface: x_in/y_out are signed Y_W-bit fixed-point values with F fraction
// bits; y_in is a signed S_W-bit integer.  y_out is registered (one step of
// latency) and holds while step is low.
module dht_pe2 #(
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

  localparam int P_W = Y_W + 10;   // room for v * 473 < v * 2^9

  logic signed [P_W-1:0] v;
  logic signed [P_W-1:0] prod;
  logic signed [Y_W-1:0] scaled;

  always_comb begin
    v      = P_W'(x_in) + (P_W'(y_in) <<< F);
    prod   = (v <<< 9) - (v <<< 5) - (v <<< 3) + v;
    scaled = Y_W'(prod >>> 8);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    y_out <= '0;
    else if (step) y_out <= scaled;
  end

endmodule
