// linc_ref_pkg: reference models for the separator testbenches.
//
// Each function recomputes, from the arithmetic definitions and with plain
// integer and real math, what a block of the separator must return, without
// sharing code with the RTL: square roots come from $sqrt and are corrected
// to the exact floor, divisions use the language's / and % operators.
package linc_ref_pkg;

  // floor(sqrt(n)) for n < 2^62.
  function automatic longint ref_isqrt(input longint n);
    longint r;
    r = longint'($floor($sqrt(real'(n))));
    while (r * r > n) r--;
    while ((r + 1) * (r + 1) <= n) r++;
    return r;
  endfunction

  // Table entry of method 1: unsigned 12.14 SR_Part for x = a / 2^14.
  function automatic longint ref_lut_entry(input int a);
    longint v, la, num;
    if (a == 0) return (64'd1 << 26) - 1;
    la  = longint'(a);
    num = 64'd16384 - la;
    v = ref_isqrt((num << 28) / la);
    if (v > (64'd1 << 26) - 1) v = (64'd1 << 26) - 1;
    return v;
  endfunction

  // SR_Part of method 1 for a 24-bit unsigned 2.22 power.
  function automatic longint ref_sr_lut(input logic [23:0] pow);
    if (pow[23:22] != 0) return 0;
    return ref_lut_entry(int'(pow[21:8]));
  endfunction

  // Divider of method 2: quotient and remainder of 1024 / d, 10-bit quotient
  // saturated to 1023 (remainder 0) when it does not fit or d = 0.
  function automatic void ref_div(input int d, output int q, output int r);
    if (d == 0 || 1024 / d > 1023) begin
      q = 1023;
      r = 0;
    end else begin
      q = 1024 / d;
      r = 1024 % d;
    end
  endfunction

  // SR_Part of method 2 (unsigned 4.8) for a 24-bit unsigned 2.22 power.
  function automatic longint ref_sr_srfb(input logic [23:0] pow);
    int q, r;
    longint rad, lq, lr;
    if (pow[23:22] != 0) return 0;
    ref_div(int'(pow[21:14]), q, r);
    lq  = longint'(q);
    lr  = longint'(r);
    rad = (lq - 64'd4) * 64'd16 + lr / 64'd16;
    return ref_isqrt(rad * 1024);
  endfunction

  // Saturate to a 14-bit signed code.
  function automatic longint ref_sat14(input longint v);
    if (v > 8191) return 8191;
    if (v < -8192) return -8192;
    return v;
  endfunction

  // floor(v / 2^sh) for signed v.
  function automatic longint ref_floor_div(input longint v, input int sh);
    longint p;
    p = longint'(1) << sh;
    if (v >= 0) return v / p;
    return -((-v + p - 1) / p);
  endfunction

  // LINC components in 2.12 codes for sample (i, q) in 1.11 codes and an
  // unsigned SR_Part code with `frac` fraction bits.
  function automatic void ref_comp(input int i, input int q, input longint sr,
                                   input int frac,
                                   output int i1, output int q1,
                                   output int i2, output int q2);
    longint a_i, a_q, p_i, p_q;
    a_i = longint'(i) * (longint'(1) << frac);
    a_q = longint'(q) * (longint'(1) << frac);
    p_q = longint'(q) * sr;
    p_i = longint'(i) * sr;
    i1 = int'(ref_sat14(ref_floor_div(a_i - p_q, frac - 1)));
    q1 = int'(ref_sat14(ref_floor_div(a_q + p_i, frac - 1)));
    i2 = int'(ref_sat14(ref_floor_div(a_i + p_q, frac - 1)));
    q2 = int'(ref_sat14(ref_floor_div(a_q - p_i, frac - 1)));
  endfunction

endpackage
