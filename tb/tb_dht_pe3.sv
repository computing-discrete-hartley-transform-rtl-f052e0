// tb_dht_pe3: self-checking testbench of dht_pe3.
//
// Random running values and column sums with a random step enable; the
// expected result is x + y*2^8, registered, held while step is low.
module tb_dht_pe3;
  localparam int S_W = 15;
  localparam int F   = 8;
  localparam int Y_W = 27;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic signed [Y_W-1:0] x_in = '0;
  logic signed [S_W-1:0] y_in = '0;
  logic signed [Y_W-1:0] y_out;
  logic signed [Y_W-1:0] exp_y = '0;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  dht_pe3 #(.S_W(S_W), .F(F), .Y_W(Y_W)) dut (.clk, .rst_n, .step, .x_in, .y_in, .y_out);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      step = ($urandom_range(0, 3) != 0);
      x_in = Y_W'($signed($urandom_range(0, 1 << 24)) - (1 << 23));
      y_in = S_W'($urandom);
      if (step) exp_y = Y_W'(longint'(x_in) + longint'(y_in) * 256);
      @(posedge clk);
      #1;
      checks++;
      if (y_out !== exp_y) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d: %0d expected %0d", x_in, y_in, y_out, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
