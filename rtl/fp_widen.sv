// fp_widen -- exact conversion of an IEEE-754 value to a wider binary format.
//
// Used to extend a single-precision sample to double precision (EWI/MWI = 8/23,
// EWO/MWO = 11/52) before a double-precision subtraction.  Normal numbers keep
// their value exactly: the exponent is re-biased and the fraction padded with
// zeros.  Infinities and NaNs stay infinities and NaNs; zeros and (flush-to-zero)
// subnormals become a zero of the same sign.  Purely combinational.
module fp_widen #(
  parameter int unsigned EWI = 8,
  parameter int unsigned MWI = 23,
  parameter int unsigned EWO = 11,
  parameter int unsigned MWO = 52
) (
  input  logic [EWI+MWI:0] a,
  output logic [EWO+MWO:0] y
);
  localparam int unsigned EMAXI = (1 << EWI) - 1;
  localparam int unsigned EMAXO = (1 << EWO) - 1;
  localparam int unsigned REBIAS = ((1 << (EWO - 1)) - 1) - ((1 << (EWI - 1)) - 1);

  logic [EWI-1:0] e;
  logic [MWI-1:0] m;

  always_comb begin
    e = a[EWI+MWI-1:MWI];
    m = a[MWI-1:0];
    if (e == EWI'(EMAXI))
      y = {a[EWI+MWI], EWO'(EMAXO), m, (MWO-MWI)'(0)};
    else if (e == '0)
      y = {a[EWI+MWI], (EWO+MWO)'(0)};
    else
      y = {a[EWI+MWI], EWO'(int'(e) + int'(REBIAS)), m, (MWO-MWI)'(0)};
  end

endmodule
