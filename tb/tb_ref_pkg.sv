// tb_ref_pkg: reference arithmetic for the testbenches, written directly
// from the number format (Q16.16) with wide integers, independent of the RTL.
package tb_ref_pkg;

  // Q16.16 product, floor of (a*b)/2^16, wrapped to 32 bits
  function automatic int ref_qmul(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> 16);
  endfunction

  // LeakyReLU with slope 13107/65536 (0.2)
  function automatic int ref_lrelu(int x);
    return (x < 0) ? ref_qmul(x, 13107) : x;
  endfunction

  // 2^x with the linear mantissa: (1 + frac) * 2^int, int clamped to 14, 0 below -16
  function automatic longint ref_pow2(int x);
    int n;
    longint m;
    n = x >>> 16;
    m = 65536 + longint'(x & 32'hFFFF);
    if (n > 14) n = 14;
    if (n < -16) return 0;
    if (n >= 0) return m * (longint'(1) << n);
    return m / (longint'(1) << (-n));
  endfunction

  function automatic int ref_div_alpha(longint p, longint sum);
    if (sum == 0) return 0;
    return int'((p * 65536) / sum);
  endfunction

  // small random Q16.16 value in about [-range, range)
  function automatic int rnd_q(int range_q);
    return int'($urandom_range(2 * range_q)) - range_q;
  endfunction

endpackage
