// tb_dht_top: end-to-end testbench of dht_top, both arrays at their default
// parameters, run at the same time with independent random stalls.
//
// The exact 16-point array gets NB16 blocks and the approximate 32-point array
// NB32 blocks, back to back, including a block of extreme samples.  Every
// result of each array is checked bit-exactly against an integer model built
// from the testbench's own kernel tables (column sums, then Horner's rule with
// z^ = 473/256 and truncation to 8 fraction bits), its index out_k is checked,
// and its arrival step against N+I+2+k steps after the block's first sample.
// Counted mechanisms (each must occur): stalls and back-to-back blocks on both
// arrays, and results of both arrays.
module tb_dht_top;
  localparam int NB16 = 6;
  localparam int NB32 = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ex_step = 1'b0, ap_step = 1'b0;
  logic signed [7:0] ex_x_in = '0, ap_x_in = '0;
  logic ex_out_valid, ap_out_valid;
  logic [3:0] ex_out_k;
  logic [4:0] ap_out_k;
  logic signed [26:0] ex_X_out;
  logic signed [30:0] ap_X_out;

  int checks = 0;
  int failures = 0;
  int ex_samples [NB16][16];
  int ap_samples [NB32][32];
  int ex_start [NB16];
  int ap_start [NB32];
  int ex_steps = 0, ap_steps = 0;
  int ex_res = 0, ap_res = 0;
  int ex_stall = 0, ap_stall = 0, ex_b2b = 0, ap_b2b = 0;
  bit ex_done = 1'b0, ap_done = 1'b0;

  always #5 clk = ~clk;

  dht_top dut (
    .clk, .rst_n,
    .ex_step, .ex_x_in, .ex_out_valid, .ex_out_k, .ex_X_out,
    .ap_step, .ap_x_in, .ap_out_valid, .ap_out_k, .ap_X_out
  );

  function automatic int coef16(int m, int i);
    int tab [8][4] = '{
      '{ 2,  0, 0,  0}, '{ 0, -2, 0,  1}, '{-4,  0, 2,  0}, '{ 0, -2, 0,  1},
      '{ 2,  0, 0,  0}, '{ 0,  4, 0, -1}, '{ 0,  0, 0,  0}, '{ 0, -4, 0,  1}};
    m = m % 16;
    return (m < 8) ? tab[m][i] : -tab[m-8][i];
  endfunction

  function automatic int coef32(int m, int i);
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

  function automatic longint horner(longint s [4]);
    longint h = 0;
    for (int i = 3; i >= 1; i--) h = ((h + (s[i] <<< 8)) * 473) >>> 8;
    return h + (s[0] <<< 8);
  endfunction

  function automatic longint model16(int b, int k);
    longint s [4];
    for (int i = 0; i < 4; i++) begin
      s[i] = 0;
      for (int n = 0; n < 16; n++) s[i] += longint'(ex_samples[b][n] * coef16(k * n, i));
    end
    return horner(s);
  endfunction

  function automatic longint model32(int b, int k);
    longint s [4];
    for (int i = 0; i < 4; i++) begin
      s[i] = 0;
      for (int n = 0; n < 32; n++) s[i] += longint'(ap_samples[b][n] * coef32(k * n, i));
    end
    return horner(s);
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && ex_step) ex_steps <= ex_steps + 1;
    if (rst_n && ap_step) ap_steps <= ap_steps + 1;
  end

  always @(negedge clk) begin
    if (rst_n && ex_out_valid) begin : chk16
      int b;
      int k;
      b = ex_res / 16;
      k = ex_res % 16;
      if (b < NB16) begin
        checks += 3;
        if (int'(ex_out_k) != k) failures++;
        if (longint'(ex_X_out) != model16(b, k)) begin
          failures++;
          $display("16-point block %0d k %0d: %0d expected %0d", b, k, ex_X_out, model16(b, k));
        end
        if (ex_steps != ex_start[b] + 16 + 3 + 2 + k) failures++;
      end
      ex_res++;
    end
    if (rst_n && ap_out_valid) begin : chk32
      int b;
      int k;
      b = ap_res / 32;
      k = ap_res % 32;
      if (b < NB32) begin
        checks += 3;
        if (int'(ap_out_k) != k) failures++;
        if (longint'(ap_X_out) != model32(b, k)) begin
          failures++;
          $display("32-point block %0d k %0d: %0d expected %0d", b, k, ap_X_out, model32(b, k));
        end
        if (ap_steps != ap_start[b] + 32 + 3 + 2 + k) failures++;
      end
      ap_res++;
    end
  end

  // sample sources; blocks are counted back to back when a block starts
  // exactly N steps after the previous one
  initial begin
    int i16;
    int i32;
    for (int b = 0; b < NB16; b++)
      for (int n = 0; n < 16; n++)
        ex_samples[b][n] = (b == 1) ? ((n % 2 == 0) ? 127 : -128) : $signed($urandom_range(0, 255)) - 128;
    for (int b = 0; b < NB32; b++)
      for (int n = 0; n < 32; n++)
        ap_samples[b][n] = (b == 1) ? ((n % 3 == 0) ? -128 : 127) : $signed($urandom_range(0, 255)) - 128;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    i16 = 0;
    i32 = 0;
    while (ex_res < NB16 * 16 || ap_res < NB32 * 32) begin
      @(negedge clk);
      ex_step = ($urandom_range(0, 6) != 0);
      ap_step = ($urandom_range(0, 6) != 0);
      if (ex_step) begin
        if (i16 < NB16 * 16) begin
          ex_x_in = 8'(ex_samples[i16 / 16][i16 % 16]);
          if (i16 % 16 == 0) begin
            ex_start[i16 / 16] = ex_steps;
            if (i16 > 0 && ex_steps == ex_start[i16 / 16 - 1] + 16) ex_b2b++;
          end
        end else ex_x_in = '0;
        i16++;
      end else ex_stall++;
      if (ap_step) begin
        if (i32 < NB32 * 32) begin
          ap_x_in = 8'(ap_samples[i32 / 32][i32 % 32]);
          if (i32 % 32 == 0) begin
            ap_start[i32 / 32] = ap_steps;
            if (i32 > 0 && ap_steps == ap_start[i32 / 32 - 1] + 32) ap_b2b++;
          end
        end else ap_x_in = '0;
        i32++;
      end else ap_stall++;
      @(posedge clk);
    end
    repeat (2) @(posedge clk);
    $display("mechanisms: 16-point stalls=%0d back_to_back=%0d results=%0d; 32-point stalls=%0d back_to_back=%0d results=%0d",
             ex_stall, ex_b2b, ex_res, ap_stall, ap_b2b, ap_res);
    checks++;
    if (ex_stall == 0 || ap_stall == 0 || ex_b2b == 0 || ap_b2b == 0 ||
        ex_res < NB16 * 16 || ap_res < NB32 * 32) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
