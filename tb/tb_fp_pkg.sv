// tb_fp_pkg -- reference floating-point helpers for the testbenches.
//
// The references are computed with the simulator's double-precision `real`
// arithmetic, independently of the RTL bit manipulation:
//   f2r       binary32 bits -> real, built as (1 + frac/2^23) * 2^(exp-127);
//             subnormals read as zero, as the RTL does (flush to zero)
//   r2f       real -> binary32 bits, round to nearest even, found by scaling the
//             value into [1,2) with exact multiplications by 2 and rounding the
//             scaled significand; results below 2^-126 flush to a signed zero,
//             results above the range become infinity
//   rand_f32  a random normal float with an exponent in [emin, emax] (unbiased)
// A product of two binary32 values is exact in a real, and so is a difference
// whose operands' exponents differ by less than 29, so one r2f gives the
// correctly rounded single-precision result.
package tb_fp_pkg;

  localparam logic [31:0] F_QNAN = 32'h7FC0_0000;
  localparam logic [31:0] F_PINF = 32'h7F80_0000;
  localparam logic [31:0] F_NINF = 32'hFF80_0000;

  function automatic real f2r(input logic [31:0] f);
    int  e;
    real m;
    e = int'(f[30:23]);
    if (e == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * (2.0 ** (e - 127));
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2f(input real d);
    logic s;
    real  a, m, fr;
    int   e, mi;
    logic [63:0] bits;
    bits = $realtobits(d);
    s    = bits[63];
    if (d != d) return F_QNAN;
    if (d == 0.0) return {s, 31'h0};
    a = s ? -d : d;
    e = 0;
    while (a >= 2.0 && e < 400)  begin a = a / 2.0; e++; end
    while (a < 1.0 && e > -1200) begin a = a * 2.0; e--; end
    m  = a * 8388608.0;
    mi = $rtoi(m);
    fr = m - real'(mi);
    if (fr > 0.5 || (fr == 0.5 && mi[0])) mi++;
    if (mi == 16777216) begin mi = 8388608; e++; end
    if (e > 127)  return {s, 8'hFF, 23'h0};
    if (e < -126) return {s, 31'h0};
    return {s, 8'(e + 127), mi[22:0]};
  endfunction

  function automatic logic [31:0] rand_f32(input int emin, input int emax);
    logic [31:0] r;
    int e;
    r = $urandom;
    e = emin + int'($urandom % 32'(emax - emin + 1));
    return {r[31], 8'(e + 127), r[22:0]};
  endfunction

  function automatic bit is_nan(input logic [31:0] f);
    return f[30:23] == 8'hFF && f[22:0] != 0;
  endfunction

endpackage
