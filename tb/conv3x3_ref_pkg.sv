// conv3x3_ref_pkg: reference model of the 3x3 convolution core for testbenches.
//
// Recomputes, in plain integer arithmetic and independently of the RTL, what
// the core must produce: the biased sum of the nine products (with the bias
// clamped to the accumulator range and the sum wrapped to the accumulator
// width), and the shift / ReLU / saturation step. Widths are arguments, so
// the same functions serve reduced-size runs.
package conv3x3_ref_pkg;

  // Sign-extend the low w bits of v.
  function automatic longint sext(longint v, int w);
    longint m;
    m = longint'(1) << (w - 1);
    v = v & ((longint'(1) << w) - 1);
    return (v ^ m) - m;
  endfunction

  // Biased sum of products as the ACC_W-bit accumulator holds it.
  function automatic longint ref_acc(longint p[9], longint k[9], longint bias,
                                     int acc_w);
    longint s, amax, amin;
    amax = (longint'(1) << (acc_w - 1)) - 1;
    amin = -(longint'(1) << (acc_w - 1));
    s = (bias > amax) ? amax : (bias < amin) ? amin : bias;
    for (int t = 0; t < 9; t++) s += p[t] * k[t];
    return sext(s, acc_w);
  endfunction

  // Arithmetic shift, ReLU, saturation to the signed out_w-bit maximum.
  function automatic longint ref_act(longint acc, int shift, int out_w);
    longint q, omax;
    omax = (longint'(1) << (out_w - 1)) - 1;
    q = acc >>> shift;
    if (q < 0) q = 0;
    if (q > omax) q = omax;
    return q;
  endfunction

endpackage
