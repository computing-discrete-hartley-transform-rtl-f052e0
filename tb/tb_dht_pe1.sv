// tb_dht_pe1: self-checking testbench of dht_pe1.
//
// Instantiates eight cells at different (row, column) positions of the
// 16-point array and drives them with random samples, random partial sums and
// a random step enable.  The expected coefficient of each step is taken from
// an independent reference table of 2*cas(2*pi*m/16) in powers of
// z = 2*cos(2*pi/16) (m = 0..7; m + 8 is the negation of m), indexed by
//     m = k * ROW mod 16,   k = (t - ROW - 1 - COL) mod 16,
// where t counts the steps since reset.  Both outputs are checked after every
// cycle, so the one-step latency and the hold while step is low are checked.
module tb_dht_pe1;
  localparam int N   = 16;
  localparam int X_W = 8;
  localparam int S_W = 15;
  localparam int NC  = 8;
  localparam int ROWS [NC] = '{0, 1, 3, 5, 7, 10, 13, 15};
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
  int n_zero = 0, n_neg = 0, n_sh [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  for (genvar u = 0; u < NC; u++) begin : g_dut
    dht_pe1 #(.N(N), .X_W(X_W), .S_W(S_W), .ROW(ROWS[u]), .COL(COLS[u])) dut (
      .clk, .rst_n, .step,
      .x_in(x_in[u]), .s_in(s_in[u]), .x_out(x_out[u]), .s_out(s_out[u])
    );
  end

  // a_i of 2*cas(2*pi*m/16), rows m = 0..7 as {a0, a1, a2, a3}
  function automatic int ref_coef(int m, int i);
    int tab [8][4] = '{
      '{ 2,  0, 0,  0}, '{ 0, -2, 0,  1}, '{-4,  0, 2,  0}, '{ 0, -2, 0,  1},
      '{ 2,  0, 0,  0}, '{ 0,  4, 0, -1}, '{ 0,  0, 0,  0}, '{ 0, -4, 0,  1}};
    m = m % 16;
    return (m < 8) ? tab[m][i] : -tab[m-8][i];
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
        s_in[u] = S_W'($signed($urandom_range(0, 8000)) - 4000);
        if (cyc < 40) x_in[u] = (cyc[0]) ? -8'sd128 : 8'sd127;  // extremes first
        if (step) begin
          a = ref_coef(((t - ROWS[u] - 1 - COLS[u] + 16 * N) % N) * ROWS[u], 3 - COLS[u]);
          exp_x[u] = x_in[u];
          exp_s[u] = S_W'(int'(s_in[u]) + a * int'(x_in[u]));
          if (a == 0) n_zero++;
          else begin
            if (a < 0) n_neg++;
            if (a == 1 || a == -1) n_sh[0]++;
            else if (a == 2 || a == -2) n_sh[1]++;
            else n_sh[2]++;
          end
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
    $display("coefficient uses: zero=%0d neg=%0d shift0=%0d shift1=%0d shift2=%0d",
             n_zero, n_neg, n_sh[0], n_sh[1], n_sh[2]);
    checks++;
    if (n_zero == 0 || n_neg == 0 || n_sh[0] == 0 || n_sh[1] == 0 || n_sh[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
