// tb_dht_approx: end-to-end testbench of the approximate 32-point DHT array
// (coefficient width CB = 6), all parameters at their defaults.
//
// Streams NB blocks of 32 samples back to back (random blocks, one block of
// extreme values, one of zeros) with random stall cycles.  Every result is
// checked exactly against an integer model written here, which uses its own
// copy of the 6-bit approximate code (nine magnitudes, sign taken from
// sin(2*pi*m/32 + pi/4) in floating point), and approximately against the DHT
// in floating point, within a bound computed from the column sums for the
// error of z^ = 473/256, the truncations and the coefficient approximation.
// It also checks out_k, the latency (X_0 after N+I+2 steps, X_31 of the first
// block after 2N+I+1 = 68 steps) and counts stalls, back-to-back blocks, PE1
// transfer steps and PE1 multiply steps.
module tb_dht_approx;
  localparam int N   = 32;
  localparam int I   = 3;
  localparam int NB  = 12;
  localparam int Y_W = 31;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic signed [7:0] x_in = '0;
  logic out_valid;
  logic [4:0] out_k;
  logic signed [Y_W-1:0] X_out;

  int checks = 0;
  int failures = 0;
  int samples [NB][N];
  int nsteps = 0;          // steps taken since reset (through the last edge)
  int nres = 0;            // results seen
  int n_stall = 0;
  int n_b2b = 0;
  int n_zero = 0, n_nz = 0, n_neg = 0;
  real max_err = 0.0;
  int first_block_done = -1;
  int block_start [NB];

  always #5 clk = ~clk;

  dht_approx dut (.clk, .rst_n, .step, .x_in, .out_valid, .out_k, .X_out);

  // coefficient taps for the statistics (cell heads inside the grid)
  logic signed [5:0] head_tap [N][I+1];
  for (genvar j = 0; j < N; j++) begin : g_tap_r
    for (genvar c = 0; c <= I; c++) begin : g_tap_c
      assign head_tap[j][c] = dut.g_row[j].g_col[c].u_pe1.ring_q[0];
    end
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

  // error bound of X_k against the true DHT, from the column sums
  function automatic real bound(int b, int k);
    real s [4];
    real z;
    real xs;
    z = 1.8477590650225735;
    xs = 0.0;
    for (int i = 0; i < 4; i++) begin
      s[i] = 0.0;
      for (int n = 0; n < N; n++) s[i] += real'(samples[b][n] * ref_coef(k * n, i));
      if (s[i] < 0.0) s[i] = -s[i];
    end
    for (int n = 0; n < N; n++) xs += (samples[b][n] < 0) ? -samples[b][n] : samples[b][n];
    return 0.5 * (1.1e-4 * (3.0 * s[3] * z * z + 2.0 * s[2] * z + s[1])
                  + 4.0 * z * z / 256.0 + xs * 1.3e-5) + 0.01;
  endfunction

  function automatic longint model(int b, int k);
    longint s [4];
    longint h;
    for (int i = 0; i < 4; i++) begin
      s[i] = 0;
      for (int n = 0; n < N; n++) s[i] += longint'(samples[b][n] * ref_coef(k * n, i));
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

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // statistics of the PE1 coefficients in use on every step
  always @(posedge clk) begin
    if (rst_n && step) begin
      for (int j = 0; j < N; j++)
        for (int c = 0; c <= I; c++) begin
          if (head_tap[j][c] == 0) n_zero++;
          else begin
            n_nz++;
            if (head_tap[j][c] < 0) n_neg++;
          end
        end
    end
  end

  // step counter, updated at the clock edge like the design's own state
  always @(posedge clk) begin
    if (rst_n && step) nsteps <= nsteps + 1;
  end

  // result checker, sampling half a cycle after the edge that set out_valid
  always @(negedge clk) begin
    if (rst_n && out_valid) begin : chk
      int b;
      int k;
      longint e;
      real xr;
      real err;
      b = nres / N;
      k = nres % N;
      checks++;
      if (int'(out_k) != k) begin
        failures++;
        $display("result %0d: out_k=%0d expected %0d", nres, out_k, k);
      end
      if (b < NB) begin
        e = model(b, k);
        checks++;
        if (longint'(X_out) != e) begin
          failures++;
          if (failures < 10) $display("block %0d k %0d: %0d expected %0d", b, k, X_out, e);
        end
        xr  = real'(X_out) / 512.0;
        err = xr - dht(b, k);
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        checks++;
        if (err > bound(b, k)) begin
          failures++;
          $display("block %0d k %0d: %f far from DHT %f", b, k, xr, dht(b, k));
        end
        // latency: X_k of block b is loaded by step number block_start+N+I+1+k
        checks++;
        if (nsteps != block_start[b] + N + I + 2 + k) begin
          failures++;
          $display("block %0d k %0d seen after %0d steps, expected %0d", b, k, nsteps,
                   block_start[b] + N + I + 2 + k);
        end
        if (b == 0 && k == N - 1) first_block_done = nsteps;
      end
      nres++;
    end
  end

  initial begin
    int sidx;
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < N; n++) begin
        samples[b][n] = $signed($urandom_range(0, 255)) - 128;
        if (b == 1) samples[b][n] = (n % 3 == 0) ? -128 : 127;
        if (b == 2) samples[b][n] = -128;
        if (b == NB - 1) samples[b][n] = 0;
      end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    sidx = 0;
    while (nres < NB * N) begin
      @(negedge clk);
      step = ($urandom_range(0, 5) != 0);
      if (step) begin
        if (sidx < NB * N) begin
          x_in = 8'(samples[sidx / N][sidx % N]);
          if (sidx % N == 0) begin
            block_start[sidx / N] = nsteps;
            if (sidx > 0 && block_start[sidx / N] == block_start[sidx / N - 1] + N) n_b2b++;
          end
        end else begin
          x_in = 8'($urandom);   // flush samples, their results are not checked
        end
        sidx++;
      end else begin
        n_stall++;
      end
      @(posedge clk);
    end
    repeat (2) @(posedge clk);
    $display("max |X - DHT| = %f", max_err);
    $display("first block: last result after %0d steps (2N+I+1 = %0d)", first_block_done, 2 * N + I + 1);
    $display("mechanisms: stalls=%0d back_to_back_blocks=%0d transfer_ops=%0d multiply_ops=%0d negative=%0d",
             n_stall, n_b2b, n_zero, n_nz, n_neg);
    $display("fraction of PE1 steps that are pure transfers: %f", real'(n_zero) / real'(n_zero + n_nz));
    checks++;
    if (first_block_done != 2 * N + I + 1) failures++;
    checks++;
    if (n_stall == 0 || n_b2b == 0 || n_zero == 0 || n_neg == 0 || n_nz == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
