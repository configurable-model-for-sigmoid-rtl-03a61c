// Reference arithmetic for the testbenches, written with real numbers and
// independent of the RTL: conversion between IEEE-754 single-precision bit
// patterns and real values (rounding to nearest, ties to even, subnormals
// flushed to zero as the RTL does), and the ideal activation functions.
package tb_fp_pkg;

  function automatic real fp32_to_real(input logic [31:0] f);
    real m;
    int  e;
    e = int'(f[30:23]);
    if (e == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * (2.0 ** (e - 127));
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] real_to_fp32(input real r);
    real    a, m, frac;
    int     e;
    longint mi;
    logic   s;
    s = (r < 0.0);
    a = s ? -r : r;
    if (a == 0.0) return {s, 31'd0};
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    m    = a * 8388608.0;                 // 24 significant bits before the point
    mi   = longint'($floor(m));
    frac = m - real'(mi);
    if (frac > 0.5 || (frac == 0.5 && mi[0])) mi++;
    if (mi == 64'd16777216) begin mi = 64'd8388608; e++; end
    if (e + 127 >= 255) return {s, 8'hFF, 23'd0};
    if (e + 127 <= 0)   return {s, 31'd0};
    return {s, 8'(e + 127), mi[22:0]};
  endfunction

  function automatic real sigmoid(input real x);
    return 1.0 / (1.0 + $exp(-x));
  endfunction

  function automatic real tanh_ideal(input real x);
    return ($exp(x) - $exp(-x)) / ($exp(x) + $exp(-x));
  endfunction

  // Random single-precision value of magnitude in [2^lo_exp, 2^(hi_exp+1)).
  function automatic logic [31:0] rand_fp(input int lo_exp, input int hi_exp);
    int e;
    e = lo_exp + int'($urandom_range(hi_exp - lo_exp));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

endpackage
