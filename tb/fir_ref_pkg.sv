// fir_ref_pkg: reference model of the 32-tap filter used by the
// testbenches.  y(n) = sum_i c[i] * x(n-i) with plain integer arithmetic,
// then divided by 2^13 rounding half up, and clipped to 16 bits.
package fir_ref_pkg;

  typedef int hist_t [32];   // hist[i] = x(n-i)
  typedef int taps_t [32];   // c[i], coefficient of x(n-i)

  // Expand the 16 unique coefficients of a symmetric filter to 32 taps.
  function automatic taps_t sym_taps(logic [15:0][15:0] h);
    taps_t c;
    for (int i = 0; i < 32; i++) c[i] = int'(signed'(h[(i < 16) ? i : 31 - i]));
    return c;
  endfunction

  function automatic void filter(hist_t x, taps_t c, output int y, output bit sat);
    longint acc = 0;
    longint q;
    for (int i = 0; i < 32; i++) acc += longint'(c[i]) * longint'(x[i]);
    acc += 4096;
    q = (acc >= 0) ? acc / 8192 : -((-acc + 8191) / 8192);   // floor
    sat = (q > 32767) || (q < -32768);
    y = (q > 32767) ? 32767 : (q < -32768) ? -32768 : int'(q);
  endfunction

  function automatic void push(ref hist_t x, input int v);
    for (int i = 31; i > 0; i--) x[i] = x[i-1];
    x[0] = v;
  endfunction

endpackage
