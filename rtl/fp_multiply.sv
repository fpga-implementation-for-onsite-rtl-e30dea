// fp_multiply -- combinational IEEE-754 multiplier for any binary format.
//
// y = a * b, rounded to nearest, ties to even.  EW and MW are the exponent and
// fraction widths (8/23 for single precision).  The two significands, hidden bit
// included, are multiplied into a 2*(MW+1)-bit product, normalised by at most one
// place, and rounded with a guard bit and a sticky bit taken from the rest.
//
// Special values: a NaN operand or inf * 0 gives the quiet NaN; an infinite operand
// otherwise gives infinity; exponent overflow gives infinity.  As in fp_addsub,
// subnormal operands count as zero and results below the smallest normal number are
// flushed to a zero of the result's sign.  Purely combinational.
module fp_multiply #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] y
);
  localparam int unsigned EMAX = (1 << EW) - 1;
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam int unsigned PW   = 2 * (MW + 1);

  logic          sy;
  logic [EW-1:0] ea, eb;
  logic [MW-1:0] ma, mb;
  logic          a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [PW-1:0] prod, norm;
  logic [MW+1:0] rounded;
  logic          inc;
  int            exp_n;

  always_comb begin
    sy = a[EW+MW] ^ b[EW+MW];
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

    prod    = PW'({1'b1, ma}) * PW'({1'b1, mb});
    norm    = prod[PW-1] ? prod : (prod << 1);
    exp_n   = int'(ea) + int'(eb) - BIAS + (prod[PW-1] ? 1 : 0);
    // fraction = norm[PW-2 -: MW], lsb = norm[MW+1], guard = norm[MW], sticky = rest
    inc     = norm[MW] & (norm[MW+1] | (norm[MW-1:0] != '0));
    rounded = {1'b0, norm[PW-1:MW+1]} + (MW+2)'(inc);
    if (rounded[MW+1]) exp_n = exp_n + 1;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = {1'b0, EW'(EMAX), 1'b1, (MW-1)'(0)};
    else if (a_inf || b_inf)
      y = {sy, EW'(EMAX), MW'(0)};
    else if (a_zero || b_zero)
      y = {sy, (EW+MW)'(0)};
    else if (exp_n >= int'(EMAX))
      y = {sy, EW'(EMAX), MW'(0)};
    else if (exp_n <= 0)
      y = {sy, (EW+MW)'(0)};
    else if (rounded[MW+1])
      y = {sy, EW'(exp_n), MW'(0)};
    else
      y = {sy, EW'(exp_n), rounded[MW-1:0]};
  end

endmodule
