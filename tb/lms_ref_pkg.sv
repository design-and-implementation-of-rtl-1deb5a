// lms_ref_pkg: integer reference model of the LMS filter used by the
// testbenches. It computes with plain 64-bit arithmetic (no LUTs):
//   y = sat16((sum w_i x_i) >>> frac),  e = sat16(d - y),
//   w_i = sat16(w_i + ((x_i * e) >>> mu_sh)).
package lms_ref_pkg;

  function automatic longint sat(input longint v, input int bits);
    longint hi, lo;
    hi = (longint'(1) <<< (bits - 1)) - 1;
    lo = -(longint'(1) <<< (bits - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic longint fir(input longint w[], input longint x[], input int frac,
                                 input int bits);
    longint acc = 0;
    foreach (w[i]) acc += w[i] * x[i];
    return sat(acc >>> frac, bits);
  endfunction

  function automatic void update(ref longint w[], input longint x[], input longint e,
                                 input int mu_sh, input int bits);
    foreach (w[i]) w[i] = sat(w[i] + ((x[i] * e) >>> mu_sh), bits);
  endfunction

endpackage
