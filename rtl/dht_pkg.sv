// dht_pkg: shared types and elaboration-time functions of the algebraic-integer
// DHT array.
//
// The N-point DHT kernel 2*cas(2*pi*m/N) is written exactly as an integer
// polynomial in z = 2*cos(2*pi/N), of degree I = N/4 - 1:
//     2*cas(2*pi*m/N) = a0 + a1*z + a2*z^2 + a3*z^3   (N = 16)
// The coefficients are computed here instead of being stored as a table.
// With C_0 = 2, C_1 = z and C_{k+1} = z*C_k - C_{k-1} we have
// 2*cos(k*theta) = C_k(z).  z is a root of C_{N/4}(z) (for N = 16 this is
// z^4 - 4z^2 + 2), so every C_k can be reduced modulo C_{N/4} to degree I.
// Because 2*sin(2*pi*m/N) = 2*cos(2*pi*(N/4-m)/N),
//     2*cas(m) = C_{m mod N} + C_{(N/4-m) mod N}   reduced modulo C_{N/4}.
// For N = 16 (and N = 8) every coefficient is 0 or +-2^s, so a multiply by a
// coefficient is a single shift, held in PE1 as a shift_code_t.
package dht_pkg;

  localparam int MAX_N  = 32;     // largest transform length the functions handle
  localparam int SH_W   = 2;      // shift amount field: shifts 0..3
  localparam int Z_FRAC = 8;      // fraction bits kept by the Horner row (z ~= 473 / 2^8)

  // One PE1 coefficient: zero (pure transfer) or +-(1 << sh).
  typedef struct packed {
    logic            nz;   // coefficient is non-zero
    logic            neg;  // coefficient is negative
    logic [SH_W-1:0] sh;   // |coefficient| = 1 << sh
  } shift_code_t;

  // Coefficients of C_k(z), k <= n, with z^n folded back as well.
  // C_k(z) is built by the recurrence with each term kept reduced modulo
  // C_{n/4}(z), so no array needs more than n/4 + 1 entries.
  function automatic int cheb_coef(int n, int k, int i);
    int prv [MAX_N/4+1];   // reduced C_{a-1}
    int cur [MAX_N/4+1];   // reduced C_a
    int nxt [MAX_N/4+1];
    int md  [MAX_N/4+1];   // C_{n/4}, monic, degree deg_i
    int deg_i;
    deg_i = n / 4;
    for (int b = 0; b <= MAX_N / 4; b++) begin
      prv[b] = 0;
      cur[b] = 0;
      nxt[b] = 0;
      md[b]  = 0;
    end
    // C_{n/4} by the plain recurrence (its degree is deg_i, no reduction)
    prv[0] = 2;
    cur[1] = 1;
    for (int a = 1; a < deg_i; a++) begin
      nxt[0] = -prv[0];
      for (int b = 1; b <= MAX_N / 4; b++) nxt[b] = cur[b-1] - prv[b];
      for (int b = 0; b <= MAX_N / 4; b++) begin
        prv[b] = cur[b];
        cur[b] = nxt[b];
      end
    end
    for (int b = 0; b <= MAX_N / 4; b++) md[b] = (deg_i == 1) ? ((b == 1) ? 1 : 0) : cur[b];
    // now C_k reduced modulo md: z*C_a overflows into z^deg_i only
    for (int b = 0; b <= MAX_N / 4; b++) begin
      prv[b] = 0;
      cur[b] = 0;
    end
    prv[0] = 2;      // C_0
    cur[1] = 1;      // C_1 (deg_i >= 2 for n >= 8)
    if (k == 0) begin
      for (int b = 0; b <= MAX_N / 4; b++) cur[b] = prv[b];
    end
    for (int a = 1; a < k; a++) begin
      nxt[0] = -prv[0];
      for (int b = 1; b <= MAX_N / 4; b++) nxt[b] = cur[b-1] - prv[b];
      // fold z^deg_i: z^deg_i = z^deg_i - md(z)
      for (int b = 0; b < deg_i; b++) nxt[b] = nxt[b] - nxt[deg_i] * md[b];
      nxt[deg_i] = 0;
      for (int b = 0; b <= MAX_N / 4; b++) begin
        prv[b] = cur[b];
        cur[b] = nxt[b];
      end
    end
    return (i < deg_i) ? cur[i] : 0;
  endfunction

  // Coefficient a_i of 2*cas(2*pi*m/n) in powers of z = 2*cos(2*pi/n).
  function automatic int cas_coef(int n, int m, int i);
    int mm;
    int ms;
    mm = ((m % n) + n) % n;
    ms = (((n / 4 - mm) % n) + n) % n;
    return cheb_coef(n, mm, i) + cheb_coef(n, ms, i);
  endfunction

  // Shift code of an integer coefficient.  Non powers of two are reported
  // by shift_ok() and rejected at elaboration by the users of this function.
  function automatic shift_code_t to_shift(int a);
    shift_code_t r;
    int mag;
    r = '0;
    mag = (a < 0) ? -a : a;
    if (mag != 0) begin
      r.nz  = 1'b1;
      r.neg = (a < 0);
      for (int s = 0; s < (1 << SH_W); s++)
        if (mag == (1 << s)) r.sh = SH_W'(s);
    end
    return r;
  endfunction

  function automatic bit shift_ok(int a);
    int mag;
    bit ok;
    mag = (a < 0) ? -a : a;
    ok  = (mag == 0);
    for (int s = 0; s < (1 << SH_W); s++)
      if (mag == (1 << s)) ok = 1'b1;
    return ok;
  endfunction

endpackage
