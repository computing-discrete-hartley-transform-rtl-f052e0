// tb_dht_approx_codes: the approximate 32-point array with its 4-bit and
// 8-bit coefficient sets (CB = 4 and CB = 8; the 6-bit default set is covered
// by tb_dht_approx).
//
// Both arrays take the same stream of NB random blocks (one of extreme
// samples) with common random stalls.  Every result is checked bit-exactly
// against an integer model built from the testbench's own copies of the
// 4-bit and 8-bit codes, its index out_k is checked, and it is compared with
// the DHT in floating point within 1e-4 * sum|x_n| * 40 + 0.05 (z^ error and
// truncations; the 4-bit code adds up to 1.3e-3 per kernel value).  The
// largest deviation of each set is printed.
module tb_dht_approx_codes;
  localparam int N  = 32;
  localparam int NB = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic signed [7:0] x_in = '0;
  logic out_valid [2];
  logic [4:0] out_k [2];
  logic signed [28:0] X4;
  logic signed [32:0] X8;

  int checks = 0;
  int failures = 0;
  int samples [NB][N];
  int nres = 0;
  real max_err [2] = '{0.0, 0.0};

  always #5 clk = ~clk;

  dht_approx #(.CB(4)) dut4 (.clk, .rst_n, .step, .x_in,
                             .out_valid(out_valid[0]), .out_k(out_k[0]), .X_out(X4));
  dht_approx #(.CB(8)) dut8 (.clk, .rst_n, .step, .x_in,
                             .out_valid(out_valid[1]), .out_k(out_k[1]), .X_out(X8));

  // codes of 2*sqrt(2)*sin(pi*q/16), q = 0..8, {a0, a1, a2, a3}; set 0: 4 bits, set 1: 8 bits
  function automatic int coef(int set, int m, int i);
    int t4 [9][4] = '{
      '{ 0,  0,  0, 0}, '{-7, -7,  6, 0}, '{ 0, 4,  0, -1}, '{-1, -6, 4, 0},
      '{ 2,  0,  0, 0}, '{-4,  4, -4, 2}, '{ 0, -2, 0,  1}, '{-7,  3, -8, 5},
      '{-4,  0,  2, 0}};
    int t8 [9][4] = '{
      '{   0,    0,   0,   0}, '{-103, -125, 122, -13}, '{0, 4, 0, -1},
      '{  47,  -28,   0,   1}, '{   2,    0,   0,   0}, '{-115, 48, 86, -42},
      '{   0,   -2,   0,   1}, '{  85,   10,  98, -69}, '{-4, 0, 2, 0}};
    int p;
    int q;
    int a;
    real v;
    m = m % 32;
    p = (m + 4) % 16;
    q = (p <= 8) ? p : 16 - p;
    a = (set == 0) ? t4[q][i] : t8[q][i];
    v = $sin(2.0 * 3.14159265358979 * real'(m) / 32.0 + 3.14159265358979 / 4.0);
    return (v < 0.0) ? -a : a;
  endfunction

  function automatic longint model(int set, int b, int k);
    longint s [4];
    longint h;
    for (int i = 0; i < 4; i++) begin
      s[i] = 0;
      for (int n = 0; n < N; n++) s[i] += longint'(samples[b][n] * coef(set, k * n, i));
    end
    h = 0;
    for (int i = 3; i >= 1; i--) h = ((h + (s[i] <<< 8)) * 473) >>> 8;
    return h + (s[0] <<< 8);
  endfunction

  function automatic real dht(int b, int k);
    real acc = 0.0;
    real w;
    for (int n = 0; n < N; n++) begin
      w = 2.0 * 3.14159265358979 * real'((k * n) % N) / real'(N);
      acc += real'(samples[b][n]) * ($cos(w) + $sin(w));
    end
    return acc;
  endfunction

  function automatic real tol(int b);
    real xs = 0.0;
    for (int n = 0; n < N; n++) xs += (samples[b][n] < 0) ? -samples[b][n] : samples[b][n];
    return 1.0e-4 * xs * 40.0 + 0.05;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid[0]) begin : chk
      int b;
      int k;
      longint got [2];
      real err;
      b = nres / N;
      k = nres % N;
      got[0] = longint'(X4);
      got[1] = longint'(X8);
      if (b < NB) begin
        for (int set = 0; set < 2; set++) begin
          checks += 3;
          if (!out_valid[set] || int'(out_k[set]) != k) failures++;
          if (got[set] != model(set, b, k)) begin
            failures++;
            $display("set %0d block %0d k %0d: %0d expected %0d", set, b, k, got[set], model(set, b, k));
          end
          err = real'(got[set]) / 512.0 - dht(b, k);
          if (err < 0.0) err = -err;
          if (err > max_err[set]) max_err[set] = err;
          if (err > tol(b)) begin
            failures++;
            $display("set %0d block %0d k %0d: error %f", set, b, k, err);
          end
        end
      end
      nres++;
    end
  end

  initial begin
    int sidx;
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < N; n++)
        samples[b][n] = (b == 1) ? ((n % 2 == 0) ? 127 : -128) : $signed($urandom_range(0, 255)) - 128;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    sidx = 0;
    while (nres < NB * N) begin
      @(negedge clk);
      step = ($urandom_range(0, 6) != 0);
      if (step) begin
        x_in = (sidx < NB * N) ? 8'(samples[sidx / N][sidx % N]) : '0;
        sidx++;
      end
      @(posedge clk);
    end
    repeat (2) @(posedge clk);
    $display("max |X - DHT|: 4-bit code %f, 8-bit code %f", max_err[0], max_err[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
