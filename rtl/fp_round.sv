// fp_round: rounding of a wide internal float to IEEE-754 binary64.
//
// The 64-bit mantissa is rounded to 53 bits, to nearest with ties to even,
// using a guard bit and a sticky bit formed from the ten discarded bits. A
// carry out of the mantissa bumps the exponent. The arctangent results that
// reach this block are normal numbers below pi/2, so no overflow or
// subnormal output can arise; subnormal inputs are handled by the caller.
// Round-to-nearest-even is this design's choice: the arctangent method only
// asks for a binary64 result, and the unit as a whole is faithful (1 ulp).
//
// Interface: w is the non-negative magnitude, sign the result sign, y the
// binary64 result. Purely combinational.
module fp_round import atan_pkg::*; (
  input  wfloat_t     w,
  input  logic        sign,
  output logic [63:0] y
);
  logic [WF:0]        mant;
  logic               guard, sticky, up;
  logic [WF+1:0]      mr;
  logic signed [EW-1:0] e;

  always_comb begin
    mant   = w.m[WM -: WF+1];
    guard  = w.m[WM-WF-1];
    sticky = |w.m[WM-WF-2:0];
    up     = guard && (sticky || mant[0]);
    mr     = (WF+2)'(mant) + (WF+2)'(up);
    e      = w.e + EW'(mr[WF+1]);
    if (w.zero)
      y = {sign, 63'b0};
    else if (mr[WF+1])
      y = {sign, WE'(e + EW'(BIAS)), WF'(0)};
    else
      y = {sign, WE'(e + EW'(BIAS)), mr[WF-1:0]};
  end

endmodule
