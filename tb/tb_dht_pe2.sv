// tb_dht_pe2: self-checking testbench of dht_pe2.
//
// Drives random running values (8 fraction bits) and integer column sums with
// a random step enable.  The expected result is (x + y*2^8) * 1.84765625,
// rounded down to 8 fraction bits, computed here with a 64-bit multiply by
// the constant 473/256.  The cell's z must also lie within 2^-12 of
// 2*cos(pi/8); a large input checks that.
module tb_dht_pe2;
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

  dht_pe2 #(.S_W(S_W), .F(F), .Y_W(Y_W)) dut (.clk, .rst_n, .step, .x_in, .y_in, .y_out);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    real zr;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      step = ($urandom_range(0, 3) != 0);
      x_in = Y_W'($signed($urandom_range(0, 1 << 22)) - (1 << 21));
      y_in = S_W'($urandom);
      if (c == 0) begin x_in = '0; y_in = 15'sd8192; step = 1'b1; end
      if (step) begin
        v = longint'(x_in) + (longint'(y_in) <<< F);
        exp_y = Y_W'((v * 473) >>> 8);
      end
      @(posedge clk);
      #1;
      checks++;
      if (y_out !== exp_y) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d: %0d expected %0d", x_in, y_in, y_out, exp_y);
      end
      if (c == 0) begin
        zr = real'(y_out) / (8192.0 * 256.0);
        checks++;
        if (zr - 2.0 * $cos(3.14159265358979 / 8.0) > 1.0 / 4096.0 ||
            2.0 * $cos(3.14159265358979 / 8.0) - zr > 1.0 / 4096.0) begin
          failures++;
          $display("z approximation %f too far from 2cos(pi/8)", zr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
