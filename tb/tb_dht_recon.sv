// tb_dht_recon: self-checking testbench of dht_recon (I = 3).
//
// Presents random column sums in the skewed order the PE1 grid delivers them:
// on step t, column c carries the sum belonging to output k = t - c.  After
// step t the row must hold the Horner value for k = t - I,
//     h = 0;  h = floor((h + S_c * 2^8) * 473 / 2^8)  for c = 0..I-1;
//     y = h + S_I * 2^8,
// computed here with 64-bit integers.  A random step enable checks the stall.
module tb_dht_recon;
  localparam int I   = 3;
  localparam int S_W = 15;
  localparam int F   = 8;
  localparam int Y_W = 27;
  localparam int K   = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic signed [S_W-1:0] s_col [I+1];
  logic signed [Y_W-1:0] y;

  int checks = 0;
  int failures = 0;
  int sums [K][I+1];

  always #5 clk = ~clk;

  dht_recon #(.I(I), .S_W(S_W), .F(F), .Y_W(Y_W)) dut (.clk, .rst_n, .step, .s_col, .y);

  function automatic longint horner(int k);
    longint h = 0;
    for (int c = 0; c < I; c++) h = ((h + (longint'(sums[k][c]) <<< F)) * 473) >>> 8;
    return h + (longint'(sums[k][I]) <<< F);
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t = 0;
    for (int k = 0; k < K; k++)
      for (int c = 0; c <= I; c++) sums[k][c] = $signed($urandom_range(0, 16000)) - 8000;
    for (int c = 0; c <= I; c++) s_col[c] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (t < K + I) begin
      @(negedge clk);
      step = ($urandom_range(0, 3) != 0);
      for (int c = 0; c <= I; c++)
        s_col[c] = (t - c >= 0 && t - c < K) ? S_W'(sums[t-c][c]) : S_W'($urandom);
      @(posedge clk);
      #1;
      if (step) begin
        if (t - I >= 0) begin
          checks++;
          if (longint'(y) != horner(t - I)) begin
            failures++;
            if (failures < 10) $display("k=%0d: %0d expected %0d", t - I, y, horner(t - I));
          end
        end
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
