// af_ref_pkg: reference models used by the activation-unit testbenches.
//
// The models work on one lane at a time with ordinary integers: a lane of
// W = 8 or 16 bits holds a two's-complement value with f fraction bits.
// Inside the CORDIC stages every sum is wrapped to W+1 bits (one guard
// bit), and the stage outputs are wrapped back to W bits, as in the
// hardware.  Only the first `stages` iterations are applied.  They
// follow the CORDIC equations directly (rotation-mode hyperbolic, then
// vectoring-mode linear division) and serve as the bit-exact expectation;
// the testbenches also compare against the real functions with a
// tolerance.
package af_ref_pkg;

  function automatic int wrap(longint v, int w);
    longint m;
    m = (64'sd1 <<< w);
    v = v % m;
    if (v < 0) v += m;
    if (v >= (m >>> 1)) v -= m;
    return int'(v);
  endfunction

  // value * 2^f, rounded to nearest, from a real constant via 14 fraction bits
  function automatic int kscale(real c, int f);
    int q14;
    int sh;
    q14 = $rtoi(c * 16384.0 + 0.5);
    sh  = 14 - f;
    if (sh <= 0) return q14;
    return (q14 + (1 << (sh - 1))) >>> sh;
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real atanh_r(real v);
    return 0.5 * $ln((1.0 + v) / (1.0 - v));
  endfunction

  // hyperbolic rotation: returns cosh and sinh of z (lane values)
  function automatic void hyp(input int z0, input int f, input int w, input int stages,
                     output int xo, output int yo);
    int x, y, z, xn, yn, e;
    int g;
    g = w + 1;
    x = wrap(kscale(1.20749, f), g);
    y = 0;
    z = z0;
    for (int i = 1; i <= stages; i++) begin
      e  = wrap(kscale(atanh_r(2.0 ** (-i)), f), g);
      if (z >= 0) begin
        xn = wrap(x + (y >>> i), g); yn = wrap(y + (x >>> i), g); z = wrap(z - e, g);
      end else begin
        xn = wrap(x - (y >>> i), g); yn = wrap(y - (x >>> i), g); z = wrap(z + e, g);
      end
      x = xn; y = yn;
    end
    xo = wrap(x, w); yo = wrap(y, w);
  endfunction

  // linear vectoring division: returns y/x
  function automatic int div(input int x, input int y0, input int f, input int w,
                             input int stages);
    int y, z, p, g;
    g = w + 1;
    y = y0; z = 0;
    for (int i = 1; i <= stages; i++) begin
      p = (i > f) ? 0 : (1 << (f - i));
      if ((x < 0) == (y < 0)) begin
        y = wrap(y - (x >>> i), g); z = wrap(z + p, g);
      end else begin
        y = wrap(y + (x >>> i), g); z = wrap(z - p, g);
      end
    end
    return wrap(z, w);
  endfunction

  // full activation: sel 0 ReLU, 1 sigmoid, 2 tanh
  function automatic int act(input int a, input int sel, input int f, input int w,
                             input int stages);
    int c, s, one, e;
    if (sel == 0) return (a < 0) ? 0 : a;
    hyp(a, f, w, stages, c, s);
    one = 1 << f;
    if (sel == 2) return div(c, s, f, w, stages);
    e = wrap(c - s, w);
    return div(wrap(one + e, w), wrap(one, w), f, w, stages);
  endfunction

  function automatic int lane(logic [15:0] word, int w, bit hi);
    if (w == 16) return int'($signed(word));
    return hi ? int'($signed(word[15:8])) : int'($signed(word[7:0]));
  endfunction

endpackage
