// fdtd_ref_pkg: reference arithmetic for the testbenches.
//
// An independent statement of the machine's fixed-point update rules, kept
// in plain 64-bit integer arithmetic: constants have 16 fraction bits,
// products are rounded half up (floor of value + 1/2), and every stored
// result is clamped to the signed 16-bit range.
package fdtd_ref_pkg;

  localparam longint ONE  = 65536;
  localparam longint FMAX = 32767;
  localparam longint FMIN = -32768;

  function automatic longint clamp(longint v);
    if (v > FMAX) return FMAX;
    if (v < FMIN) return FMIN;
    return v;
  endfunction

  // floor(a / b) for b > 0
  function automatic longint floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  // round(coef * x / 2**16), half up
  function automatic longint mulc(longint coef, longint x);
    return floor_div(coef * x + ONE / 2, ONE);
  endfunction

  // Normal update: old +/- C*[(f1-f2)-(f3-f4)]
  function automatic longint upd(bit neg, longint old, longint f1, longint f2,
                                 longint f3, longint f4, longint c);
    longint t;
    t = mulc(c, (f1 - f2) - (f3 - f4));
    return clamp(neg ? old - t : old + t);
  endfunction

  // PML update; returns {total, split} through refs
  function automatic void pml(bit neg, longint total, longint split,
                              longint f1, longint f2, longint f3, longint f4,
                              longint caa, longint cba, longint cab, longint cbb,
                              output longint tot_new, output longint split_new);
    longint a, b, sa, sb;
    sa = neg ? -1 : 1;
    a = clamp(floor_div(caa * split + sa * cba * (f1 - f2) + ONE / 2, ONE));
    b = clamp(floor_div(cab * (total - split) - sa * cbb * (f3 - f4) + ONE / 2, ONE));
    split_new = a;
    tot_new   = clamp(a + b);
  endfunction

endpackage
