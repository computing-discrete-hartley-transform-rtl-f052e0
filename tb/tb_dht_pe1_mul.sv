// tb_dht_pe1_mul: self-checking testbench of dht_pe1_mul (N = 32, CB = 6).
//
// Eight cells at different (row, column) positions get random samples,
// random partial sums and a random step enable.  The expected coefficient of
// each step comes from the testbench's own copy of the 6-bit approximate code
// (nine magnitudes, sign from sin(2*pi*m/32 + pi/4) in floating point), with
//     m = k * ROW mod 32,   k = (t - ROW - 1 - COL) mod 32.
// Both outputs are checked after every cycle.
module tb_dht_pe1_mul;
  localparam int N   = 32;
  localparam int X_W = 8;
  localparam int S_W = 19;
  localparam int NC  = 8;
  localparam int ROWS [NC] = '{0, 1, 3, 7, 12, 19, 26, 31};
  localparam int COLS [NC] = '{0, 1, 2, 3, 3, 2, 1, 0};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic signed [X_W-1:0] x_in [NC];
  logic signed [S_W-1:0] s_in [NC];
  logic signed [X_W-1:0] x_out [NC];
  logic signed [S_W-1:0] s_out [NC];

  int checks = 0;
  int failures = 0;
  int t = 0;
  int cyc = 0;
  int n_zero = 0, n_neg = 0, n_pos = 0;

  always #5 clk = ~clk;

  for (genvar u = 0; u < NC; u++) begin : g_dut
    dht_pe1_mul #(.N(N), .X_W(X_W), .CB(6), .S_W(S_W), .ROW(ROWS[u]), .COL(COLS[u])) dut (
      .clk, .rst_n, .step,
      .x_in(x_in[u]), .s_in(s_in[u]), .x_out(x_out[u]), .s_out(s_out[u])
    );
  end

  // 6-bit integer codes of 2*sqrt(2)*sin(pi*q/16), q = 0..8, as {a0, a1, a2, a3}
  function automatic int ref_coef(int m, int i);
    int tab [9][4] = '{
      '{  0,   0,   0,   0}, '{-25,  17,  26, -15}, '{  0,   4,   0,  -1},
      '{  5,  -8, -17,  11}, '{  2,   0,   0,   0}, '{  3, -12,  10,  -2},
      '{  0,  -2,   0,   1}, '{-20, -18, -15,  17}, '{ -4,   0,   2,   0}};
    int p;
    int q;
    real v;
    m = m % 32;
    p = (m + 4) % 16;
    q = (p <= 8) ? p : 16 - p;
    v = $sin(2.0 * 3.14159265358979 * real'(m) / 32.0 + 3.14159265358979 / 4.0);
    return (v < 0.0) ? -tab[q][i] : tab[q][i];
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [X_W-1:0] exp_x [NC];
    logic signed [S_W-1:0] exp_s [NC];
    int a;
    for (int u = 0; u < NC; u++) begin
      x_in[u] = '0; s_in[u] = '0; exp_x[u] = '0; exp_s[u] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      step = ($urandom_range(0, 3) != 0);
      for (int u = 0; u < NC; u++) begin
        x_in[u] = X_W'($urandom);
        s_in[u] = S_W'($signed($urandom_range(0, 200000)) - 100000);
        if (cyc < 40) x_in[u] = (cyc[0]) ? -8'sd128 : 8'sd127;  // extremes first
        if (step) begin
          a = ref_coef(((t - ROWS[u] - 1 - COLS[u] + 16 * N) % N) * ROWS[u], 3 - COLS[u]);
          exp_x[u] = x_in[u];
          exp_s[u] = S_W'(int'(s_in[u]) + a * int'(x_in[u]));
          if (a == 0) n_zero++;
          else if (a < 0) n_neg++;
          else n_pos++;
        end
      end
      @(posedge clk);
      #1;
      if (step) t++;
      for (int u = 0; u < NC; u++) begin
        checks++;
        if (x_out[u] !== exp_x[u] || s_out[u] !== exp_s[u]) begin
          failures++;
          if (failures < 10)
            $display("mismatch cell %0d t=%0d: x %0d/%0d s %0d/%0d", u, t,
                     x_out[u], exp_x[u], s_out[u], exp_s[u]);
        end
      end
    end
    $display("coefficient uses: zero=%0d negative=%0d positive=%0d", n_zero, n_neg, n_pos);
    checks++;
    if (n_zero == 0 || n_neg == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
