// tb_dht_exact: end-to-end testbench of the exact 16-point DHT array, all parameters
// at their defaults.
//
// Streams NB blocks of 16 samples back to back (random blocks, plus one block
// of extreme values and one of all zeros), with random stall cycles (step
// low).  Every result is checked twice:
//   - exactly, against an integer model written here: the column sums
//     S_i(k) = sum_n x_n a_i(kn mod 16) from an independent coefficient table,
//     then Horner's rule with z ~= 473/256 and truncation to 8 fraction bits
//     after each multiply;
//   - approximately, against the DHT computed in floating point,
//     X_k = sum_n x_n (cos(2 pi k n/16) + sin(2 pi k n/16)).
// It also checks out_k, the latency (X_0 of the first block after N+I+2 steps,
// X_15 after 2N+I+1 steps), one block per N steps after that, and counts the
// mechanisms of the array: stalls, back-to-back blocks, PE1 transfer steps
// (zero coefficient), negated shifts and each shift amount.
module tb_dht_exact;
  localparam int N   = 16;
  localparam int I   = 3;
  localparam int NB  = 12;
  localparam int Y_W = 27;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic signed [7:0] x_in = '0;
  logic out_valid;
  logic [3:0] out_k;
  logic signed [Y_W-1:0] X_out;

  int checks = 0;
  int failures = 0;
  int samples [NB][N];
  int nsteps = 0;          // steps taken since reset (through the last edge)
  int nres = 0;            // results seen
  int n_stall = 0;
  int n_b2b = 0;
  int n_zero = 0, n_nz = 0, n_neg = 0;
  int n_sh [3] = '{0, 0, 0};
  real max_err = 0.0;
  int first_block_done = -1;
  int block_start [NB];

  always #5 clk = ~clk;

  dht_exact dut (.clk, .rst_n, .step, .x_in, .out_valid, .out_k, .X_out);

  // coefficient taps for the statistics (cell heads inside the grid)
  logic [3:0] head_tap [N][I+1];
  for (genvar j = 0; j < N; j++) begin : g_tap_r
    for (genvar c = 0; c <= I; c++) begin : g_tap_c
      assign head_tap[j][c] = dut.g_row[j].g_col[c].u_pe1.head;
    end
  end

  function automatic int ref_coef(int m, int i);
    int tab [8][4] = '{
      '{ 2,  0, 0,  0}, '{ 0, -2, 0,  1}, '{-4,  0, 2,  0}, '{ 0, -2, 0,  1},
      '{ 2,  0, 0,  0}, '{ 0,  4, 0, -1}, '{ 0,  0, 0,  0}, '{ 0, -4, 0,  1}};
    m = m % 16;
    return (m < 8) ? tab[m][i] : -tab[m-8][i];
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // statistics of the PE1 coefficient heads on every step
  always @(posedge clk) begin
    if (rst_n && step) begin
      for (int j = 0; j < N; j++)
        for (int c = 0; c <= I; c++) begin
          if (!head_tap[j][c][3]) n_zero++;
          else begin
            n_nz++;
            if (head_tap[j][c][2]) n_neg++;
            if (head_tap[j][c][1:0] <= 2'd2) n_sh[head_tap[j][c][1:0]]++;
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
        if (err > 4.0) begin
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
    $display("mechanisms: stalls=%0d back_to_back_blocks=%0d transfer_ops=%0d shift_ops=%0d negated=%0d shift0=%0d shift1=%0d shift2=%0d",
             n_stall, n_b2b, n_zero, n_nz, n_neg, n_sh[0], n_sh[1], n_sh[2]);
    $display("fraction of PE1 steps that are pure transfers: %f", real'(n_zero) / real'(n_zero + n_nz));
    checks++;
    if (first_block_done != 2 * N + I + 1) failures++;
    checks++;
    if (n_stall == 0 || n_b2b == 0 || n_zero == 0 || n_neg == 0 ||
        n_sh[0] == 0 || n_sh[1] == 0 || n_sh[2] == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
