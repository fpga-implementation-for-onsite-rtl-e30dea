// fp_narrow -- IEEE-754 conversion to a narrower binary format, round to nearest even.
//
// Used to round a double-precision result to single precision (EWI/MWI = 11/52,
// EWO/MWO = 8/23), the cast a C float assignment performs.  The fraction is cut to
// MWO bits with a guard bit and a sticky bit and rounded to nearest, ties to even;
// a carry out of the fraction bumps the exponent.  A result too large becomes
// infinity, one below the smallest normal of the narrow format is flushed to a
// signed zero; NaN gives the quiet NaN.  Purely combinational.
module fp_narrow #(
  parameter int unsigned EWI = 11,
  parameter int unsigned MWI = 52,
  parameter int unsigned EWO = 8,
  parameter int unsigned MWO = 23
) (
  input  logic [EWI+MWI:0] a,
  output logic [EWO+MWO:0] y
);
  localparam int unsigned EMAXI = (1 << EWI) - 1;
  localparam int unsigned EMAXO = (1 << EWO) - 1;
  localparam int          REBIAS = ((1 << (EWI - 1)) - 1) - ((1 << (EWO - 1)) - 1);
  localparam int unsigned CUT    = MWI - MWO;  // fraction bits dropped

  logic           s;
  logic [EWI-1:0] e;
  logic [MWI-1:0] m;
  logic           inc;
  logic [MWO+1:0] rounded;
  int             exp_n;

  always_comb begin
    s = a[EWI+MWI];
    e = a[EWI+MWI-1:MWI];
    m = a[MWI-1:0];
    // lsb = m[CUT], guard = m[CUT-1], sticky = m[CUT-2:0]
    inc     = m[CUT-1] & (m[CUT] | (m[CUT-2:0] != '0));
    rounded = {2'b01, m[MWI-1:CUT]} + (MWO+2)'(inc);
    exp_n   = int'(e) - REBIAS + (rounded[MWO+1] ? 1 : 0);
    if (e == EWI'(EMAXI) && m != '0)
      y = {1'b0, EWO'(EMAXO), 1'b1, (MWO-1)'(0)};
    else if (e == EWI'(EMAXI))
      y = {s, EWO'(EMAXO), MWO'(0)};
    else if (e == '0)
      y = {s, (EWO+MWO)'(0)};
    else if (exp_n >= int'(EMAXO))
      y = {s, EWO'(EMAXO), MWO'(0)};
    else if (exp_n <= 0)
      y = {s, (EWO+MWO)'(0)};
    else if (rounded[MWO+1])
      y = {s, EWO'(exp_n), MWO'(0)};
    else
      y = {s, EWO'(exp_n), rounded[MWO-1:0]};
  end

endmodule
