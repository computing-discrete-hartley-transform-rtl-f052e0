// tb_dht_demux: self-checking testbench of dht_demux.
//
// Feeds random samples with a random step enable and keeps a reference copy
// of the N row registers: the sample of the i-th step after reset belongs in
// row i mod N.  All rows are compared after every cycle, which checks the
// routing, the hold of each row for N steps and the hold while step is low.
module tb_dht_demux;
  localparam int N   = 16;
  localparam int X_W = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic signed [X_W-1:0] x_in = '0;
  logic signed [X_W-1:0] x_row [N];
  logic signed [X_W-1:0] exp_row [N];

  int checks = 0;
  int failures = 0;
  int nstep = 0;

  always #5 clk = ~clk;

  dht_demux #(.N(N), .X_W(X_W)) dut (.clk, .rst_n, .step, .x_in, .x_row);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N; j++) exp_row[j] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      step = ($urandom_range(0, 4) != 0);
      x_in = X_W'($urandom);
      if (step) begin
        exp_row[nstep % N] = x_in;
        nstep++;
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (x_row[j] !== exp_row[j]) begin
          failures++;
          if (failures < 10) $display("row %0d: %0d expected %0d", j, x_row[j], exp_row[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
