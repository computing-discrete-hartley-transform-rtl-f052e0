// dht_approx_pkg: kernel coefficients of the approximate 32-point DHT array.
//
// For N = 32 an exact code of 2*cas(2*pi*m/32) would need polynomials of
// degree 7 in 2*cos(2*pi/32).  The approximate array instead keeps degree
// I = 3 and the same z = 2*cos(2*pi/16) = 1.8477590... as the 16-point array,
// and codes every kernel value as a0 + a1 z + a2 z^2 + a3 z^3 with integers
// of a limited dynamic range (4, 6 or 8 bits, two's complement).  Even m are
// exact; odd m carry a small error (about 1e-3, 1e-5 and 1e-7 for 4, 6 and 8
// bits).
//
// Since 2*cas(t) = 2*sqrt(2)*sin(t + pi/4), with p = (m + 4) mod 16 the
// magnitude of 2*cas(2*pi*m/32) depends only on q = min(p, 16 - p), and its
// sign is positive when (m + 4) mod 32 lies in 1..15, negative in 17..31 and
// the value is 0 when (m + 4) mod 16 = 0.  The integer codes of the nine
// magnitudes 2*sqrt(2)*sin(pi*q/16), q = 0..8, are the constants below; the
// sign is applied by approx_coef.
package dht_approx_pkg;

  // a_i of 2*sqrt(2)*sin(pi*q/16) for coefficient width cb (4, 6 or 8).
  function automatic int approx_row(int cb, int q, int i);
    int r [4];
    case (q)
      0: r = '{0, 0, 0, 0};
      2: r = '{0, 4, 0, -1};
      4: r = '{2, 0, 0, 0};
      6: r = '{0, -2, 0, 1};
      8: r = '{-4, 0, 2, 0};
      default: begin
        if (cb <= 4) begin
          case (q)
            1: r = '{-7, -7, 6, 0};
            3: r = '{-1, -6, 4, 0};
            5: r = '{-4, 4, -4, 2};
            default: r = '{-7, 3, -8, 5};
          endcase
        end else if (cb <= 7) begin
          case (q)
            1: r = '{-25, 17, 26, -15};
            3: r = '{5, -8, -17, 11};
            5: r = '{3, -12, 10, -2};
            default: r = '{-20, -18, -15, 17};
          endcase
        end else begin
          case (q)
            1: r = '{-103, -125, 122, -13};
            3: r = '{47, -28, 0, 1};
            5: r = '{-115, 48, 86, -42};
            default: r = '{85, 10, 98, -69};
          endcase
        end
      end
    endcase
    return r[i % 4];
  endfunction

  // a_i of 2*cas(2*pi*m/32), m taken modulo 32.
  function automatic int approx_coef(int cb, int m, int i);
    int p;
    int q;
    int s;
    p = ((m % 32) + 32 + 4) % 32;        // (m + 4) mod 32
    q = (p % 16 <= 8) ? p % 16 : 16 - p % 16;
    s = (p < 16) ? 1 : -1;
    return s * approx_row(cb, q, i);
  endfunction

endpackage
