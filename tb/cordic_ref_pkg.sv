// cordic_ref_pkg: reference models for the fixed-angle CORDIC testbenches.
//
// Bit-exact models written with 64-bit integers: a W-bit two's complement word
// is kept sign-extended in a longint, shifts are arithmetic, and every adder
// result is wrapped back to W bits.  The micro-rotation and scaling sets are
// restated here from their defining tables (not read from the RTL package),
// and the real-valued angle/gain helpers let a testbench compare a result with
// x*cos(theta) - y*sin(theta), x*sin(theta) + y*cos(theta).
package cordic_ref_pkg;

  // 20 degrees: k, sigma ; scaling s, delta
  localparam int R20_K [7] = '{1, 2, 3, 7, 9, 12, 14};
  localparam int R20_S [7] = '{1, -1, 1, 1, -1, 1, -1};
  localparam int S20_K [4] = '{3, 5, 6, 13};
  localparam int S20_S [4] = '{-1, -1, 1, 1};
  // 30 degrees
  localparam int R30_K [9] = '{0, 1, 3, 4, 6, 9, 10, 11, 14};
  localparam int R30_S [9] = '{1, -1, 1, 1, 1, -1, 1, 1, -1};
  localparam int S30_K [5] = '{1, 2, 9, 14, 16};
  localparam int S30_S [5] = '{-1, 1, 1, 1, 1};

  // reference circuit: shifts 0..15, directions by the sign of the residual
  // angle of a 20 degree rotation (sum = 19.99910 deg)
  localparam int REF_S [16] = '{1, -1, 1, -1, -1, -1, 1, -1, -1, -1, -1, -1, -1, 1, -1, 1};

  localparam real PI = 3.14159265358979323846;

  // sign-extend the low w bits of v
  function automatic longint wrapw(longint v, int w);
    longint r;
    r = v & ((longint'(1) <<< w) - 1);
    if (((r >>> (w - 1)) & 1) == 1) r = r - (longint'(1) <<< w);
    return r;
  endfunction

  // one micro-rotation; returns 1 if an adder overflowed
  function automatic bit rot_step(ref longint x, ref longint y, input int k, input int sg, input int w);
    longint xs, ys, xn, yn;
    xs = x >>> k;
    ys = y >>> k;
    xn = (sg > 0) ? x - ys : x + ys;
    yn = (sg > 0) ? y + xs : y - xs;
    x  = wrapw(xn, w);
    y  = wrapw(yn, w);
    return (x != xn) || (y != yn);
  endfunction

  // one scaling term; returns 1 if an adder overflowed
  function automatic bit scl_step(ref longint x, ref longint y, input int s, input int sg, input int w);
    longint xn, yn;
    xn = (sg > 0) ? x + (x >>> s) : x - (x >>> s);
    yn = (sg > 0) ? y + (y >>> s) : y - (y >>> s);
    x  = wrapw(xn, w);
    y  = wrapw(yn, w);
    return (x != xn) || (y != yn);
  endfunction

  function automatic real deg2rad(real d);
    return d * PI / 180.0;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // random W-bit word with |value| < 2^(w-1-headroom)
  function automatic longint rand_word(int w, int headroom);
    longint v;
    v = longint'({$urandom, $urandom});
    return wrapw(v, w - headroom);
  endfunction

endpackage
