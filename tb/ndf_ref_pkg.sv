// ndf_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL: Q8.8 values held as longint, floor rounding
// and saturation to 16 bits, and the piecewise-linear logistic function
// evaluated in real arithmetic.
package ndf_ref_pkg;
  function automatic longint clamp(input longint x);
    if (x > 32767) return 32767;
    if (x < -32768) return -32768;
    return x;
  endfunction
  function automatic longint floordiv256(input longint x);
    return (x >= 0) ? x / 256 : -((-x + 255) / 256);
  endfunction
  function automatic longint rmul(input longint x, input longint y);
    return clamp(floordiv256(x * y));
  endfunction
  function automatic longint rsig(input longint x);
    real ax, y;
    longint yi;
    ax = (x < 0) ? -x : x;
    if (ax > 32767) ax = 32767;
    ax = ax / 256.0;
    if (ax >= 5.0)        y = 1.0;
    else if (ax >= 2.375) y = ax / 32.0 + 0.84375;
    else if (ax >= 1.0)   y = ax / 8.0 + 0.625;
    else                  y = ax / 4.0 + 0.5;
    yi = longint'($floor(y * 256.0));
    return (x < 0) ? 256 - yi : yi;
  endfunction
  // delta = e * o * (1 - o)
  function automatic longint rdelta(input longint e, input longint o);
    return rmul(e, rmul(o, 256 - o));
  endfunction
endpackage
