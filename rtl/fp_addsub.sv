// fp_addsub -- combinational IEEE-754 adder/subtractor for any binary format.
//
// y = a + b (sub = 0) or y = a - b (sub = 1), rounded to nearest, ties to even.
// EW and MW are the exponent and fraction widths: 8/23 for single precision, 11/52
// for double precision.  The operands are aligned with three extra bits (guard,
// round and a sticky bit that collects everything shifted further out), added or
// subtracted, renormalised with a leading-zero count and rounded once.
//
// Special values: NaN in, or inf - inf, gives the quiet NaN {0, all ones, 10..0};
// an infinite operand otherwise passes through; a result whose exponent overflows
// becomes infinity.  Subnormal operands are read as zero and a result that would be
// subnormal is flushed to zero of the same sign (flush-to-zero, the behaviour of
// the FPGA vendor floating-point operators this design replaces).  An exact zero
// sum is +0 unless both operands are -0.  The block is purely combinational; the
// stream wrappers around it add the pipeline registers.
module fp_addsub #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  input  logic           sub,
  output logic [EW+MW:0] y
);
  localparam int unsigned EMAX = (1 << EW) - 1;
  localparam int unsigned SW   = MW + 4;  // hidden bit, fraction, guard, round, sticky

  function automatic int unsigned lzc(input logic [SW-1:0] v);
    int unsigned n;
    n = SW;
    for (int i = SW - 1; i >= 0; i--) begin
      if (v[i]) begin
        n = SW - 1 - i;
        break;
      end
    end
    return n;
  endfunction

  logic          sa, sb;
  logic [EW-1:0] ea, eb;
  logic [MW-1:0] ma, mb;
  logic          a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  always_comb begin
    sa = a[EW+MW];
    sb = b[EW+MW] ^ sub;
    ea = a[EW+MW-1:MW];
    eb = b[EW+MW-1:MW];
    ma = a[MW-1:0];
    mb = b[MW-1:0];
    a_nan  = (ea == EW'(EMAX)) && (ma != '0);
    b_nan  = (eb == EW'(EMAX)) && (mb != '0);
    a_inf  = (ea == EW'(EMAX)) && (ma == '0);
    b_inf  = (eb == EW'(EMAX)) && (mb == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);
  end

  logic          s_big;
  logic [EW-1:0] e_big, e_small;
  logic [SW-1:0] m_big, m_small, m_shift;
  logic [SW:0]   sum;
  logic [SW-1:0] norm;
  logic [MW+1:0] rounded;
  int            exp_n;
  int unsigned   d, lz;
  logic          inc;

  always_comb begin
    s_big = 1'b0; e_big = '0; e_small = '0; m_big = '0; m_small = '0; m_shift = '0;
    sum = '0; norm = '0; rounded = '0; exp_n = 0; d = 0; lz = 0; inc = 1'b0;
    y = '0;
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = {1'b0, EW'(EMAX), 1'b1, (MW-1)'(0)};
    end else if (a_inf) begin
      y = {sa, EW'(EMAX), MW'(0)};
    end else if (b_inf) begin
      y = {sb, EW'(EMAX), MW'(0)};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, (EW+MW)'(0)};
    end else if (a_zero) begin
      y = {sb, eb, mb};
    end else if (b_zero) begin
      y = {sa, ea, ma};
    end else begin
      // order the operands by magnitude
      if ({ea, ma} >= {eb, mb}) begin
        s_big = sa; e_big = ea; e_small = eb;
        m_big = {1'b1, ma, 3'b000}; m_small = {1'b1, mb, 3'b000};
      end else begin
        s_big = sb; e_big = eb; e_small = ea;
        m_big = {1'b1, mb, 3'b000}; m_small = {1'b1, ma, 3'b000};
      end
      // align the smaller operand, folding the bits shifted out into the sticky bit
      d = int'(e_big) - int'(e_small);
      if (d >= SW) begin
        m_shift = SW'(1);
      end else begin
        m_shift = m_small >> d;
        if ((m_small & ((SW'(1) << d) - SW'(1))) != '0) m_shift[0] = 1'b1;
      end
      if (sa == sb) sum = {1'b0, m_big} + {1'b0, m_shift};
      else          sum = {1'b0, m_big} - {1'b0, m_shift};

      if (sum == '0) begin
        y = '0;  // exact cancellation gives +0 when rounding to nearest
      end else begin
        if (sum[SW]) begin
          norm  = {sum[SW:2], sum[1] | sum[0]};
          exp_n = int'(e_big) + 1;
        end else begin
          lz    = lzc(sum[SW-1:0]);
          norm  = sum[SW-1:0] << lz;
          exp_n = int'(e_big) - int'(lz);
        end
        // round to nearest even: lsb = norm[3], guard = norm[2], sticky = norm[1:0]
        inc     = norm[2] & (norm[1] | norm[0] | norm[3]);
        rounded = {1'b0, norm[SW-1:3]} + (MW+2)'(inc);
        if (rounded[MW+1]) exp_n = exp_n + 1;
        if (exp_n >= int'(EMAX))  y = {s_big, EW'(EMAX), MW'(0)};
        else if (exp_n <= 0)      y = {s_big, (EW+MW)'(0)};
        else if (rounded[MW+1])   y = {s_big, EW'(exp_n), MW'(0)};
        else                      y = {s_big, EW'(exp_n), rounded[MW-1:0]};
      end
    end
  end

endmodule
