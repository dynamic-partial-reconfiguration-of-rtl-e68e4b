// tb_ref_pkg: reference arithmetic for the testbenches, written from the
// number format's definition (Q7.9, 16 bits) and the activation formulas,
// using reals and 64-bit integers rather than the RTL's bit manipulations.
package tb_ref_pkg;

  // Saturate to the signed 16-bit range.
  function automatic longint ref_sat(input longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // Round a value with 18 fractional bits to 9, half up: floor(v/512 + 1/2).
  function automatic longint ref_round(input longint v);
    real r;
    r = $floor(real'(v) / 512.0 + 0.5);
    return longint'(r);
  endfunction

  // Piecewise-linear Sigmoid, PLAN segments, result on the Q7.9 grid
  // (segment value truncated towards minus infinity for |x|).
  function automatic longint ref_sigmoid(input longint x);
    real    a;
    longint yp;
    a = (x < 0) ? -real'(x) / 512.0 : real'(x) / 512.0;
    if (a >= 5.0)        yp = 512;
    else if (a >= 2.375) yp = longint'($floor(a * 512.0 / 32.0)) + 432;
    else if (a >= 1.0)   yp = longint'($floor(a * 512.0 / 8.0)) + 320;
    else                 yp = longint'($floor(a * 512.0 / 4.0)) + 256;
    return (x < 0) ? 512 - yp : yp;
  endfunction

  function automatic longint ref_silu(input longint x);
    return ref_sat(ref_round(x * ref_sigmoid(x)));
  endfunction

  // 0: none, 1: Sigmoid, 2: SiLU
  function automatic longint ref_act(input longint x, input int mode);
    if (mode == 1) return ref_sigmoid(x);
    if (mode == 2) return ref_silu(x);
    return x;
  endfunction

  // Uniform random integer in [lo, hi].
  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % 32'(hi - lo + 1));
  endfunction

endpackage
