// dht_demux: output-buffered N-way demultiplexer at the input of the array.
//
// Samples arrive one per step in the order x_0, x_1, ..., x_{N-1}, then the
// next block.  An internal modulo-N counter selects the output register that
// takes the current sample; each output register then holds its sample for N
// steps, until the same position of the next block arrives.  Row j of the
// PE1 grid reads x_row[j].
//
// Interface: step is the global clock enable; x_in is taken on every step.
// x_row[j] changes on the step that carries sample j of a block and is
// visible from the next cycle.  The counter starts at 0 after reset, so the
// first sample after reset is x_0 of the first block.
module dht_demux #(
  parameter int N   = 16,
  parameter int X_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  step,
  input  logic signed [X_W-1:0] x_in,
  output logic signed [X_W-1:0] x_row [N]
);

  logic [$clog2(N)-1:0] sel;   // position the next sample is written to

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= '0;
      for (int j = 0; j < N; j++) x_row[j] <= '0;
    end else if (step) begin
      x_row[sel] <= x_in;
      sel        <= (sel == $clog2(N)'(N - 1)) ? '0 : sel + 1'b1;
    end
  end

endmodule
