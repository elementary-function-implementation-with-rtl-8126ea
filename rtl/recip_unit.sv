// recip_unit: reciprocal of a mantissa d in [1, 2).
//
// The arctangent unit needs two reciprocals: 1/x for |x| > 1 and
// 1/(1 + a*b) in the argument reduction. Both use this unit, which follows
// the classic two-step scheme: a piecewise degree-2 polynomial gives about
// 30 correct bits, and one Newton-Raphson iteration doubles that.
//
//   1. The top 9 fraction bits of d select one of 512 intervals with
//      midpoint x0. With dd = d - x0 (|dd| <= 2^-10), the second-order
//      Taylor expansion r0 = 1/x0 - dd/x0^2 + dd^2/x0^3 is accurate to
//      2^-30. Its three coefficient tables are computed at elaboration.
//   2. r = r0 + r0*(1 - d*r0); the error becomes about 2^-60.
//
// Taylor coefficients instead of minimax ones, 36-bit coefficient tables and
// 512 intervals are this design's choices; the two-step method is the one
// the arctangent unit is specified with.
//
// Interface: d is 1.f with WM = 63 fraction bits. r is 1/d with WM fraction
// bits (value r * 2^-63, in (0.5, 1]). The error is below 2^-59. Purely
// combinational.
module recip_unit import atan_pkg::*; (
  input  logic [WM:0] d,
  output logic [WM:0] r
);
  localparam int IB = 9;               // index bits
  localparam int CF = 36;              // fraction bits of the coefficients
  localparam int CW = CF + 1;
  localparam int NI = 1 << IB;

  typedef logic [NI-1:0][CW-1:0] ctab_t;

  // round(2^(CF + 10*j) / X0^j), with x0 = X0 / 1024, X0 = 1024 + 2i + 1
  function automatic ctab_t build(int j);
    ctab_t t;
    logic [127:0] num, den;
    for (int i = 0; i < NI; i++) begin
      den = 128'(1);
      for (int n = 0; n < j; n++) den = den * 128'(1024 + 2*i + 1);
      num  = 128'(1) << (CF + 10*j);
      t[i] = CW'((2*num + den) / (2*den));
    end
    return t;
  endfunction

  localparam ctab_t C0 = build(1);
  localparam ctab_t C1 = build(2);
  localparam ctab_t C2 = build(3);

  logic [IB-1:0]        idx;
  logic signed [WM-IB+1:0] dd;         // d - x0, scale 2^-63
  logic signed [CF-8:0] dd36;          // d - x0, scale 2^-36
  logic signed [2*CF+1:0] t1, dsq, t2;
  logic signed [CW+1:0] r0;            // first approximation, scale 2^-36
  logic [WM+CW+2:0]     p;             // d * r0, scale 2^-(63+36)
  logic signed [WM+CW+3:0] e;          // 1 - d*r0, scale 2^-(63+36)
  logic signed [WM-CF+8:0] e63;        // 1 - d*r0, scale 2^-63
  logic signed [WM+CW+12:0] corr;
  logic signed [WM+2:0]  r1;

  always_comb begin
    idx  = d[WM-1 -: IB];
    dd   = $signed({2'b00, d[WM-IB-1:0]}) - $signed((WM-IB+2)'(1) << (WM-IB-1));
    dd36 = (CF-7)'(dd >>> (WM - CF));
    t1   = (2*CF+2)'($signed({1'b0, C1[idx]}) * dd36);
    dsq  = (2*CF+2)'(dd36 * dd36) >>> CF;
    t2   = (2*CF+2)'($signed({1'b0, C2[idx]}) * dsq);
    r0   = $signed((CW+2)'(C0[idx])) - (CW+2)'(t1 >>> CF) + (CW+2)'(t2 >>> CF);
    // Newton-Raphson: r = r0 + r0 * (1 - d*r0)
    p    = (WM+CW+3)'(d) * (WM+CW+3)'(r0[CW:0]);
    e    = $signed((WM+CW+4)'(1) << (WM+CF)) - $signed({1'b0, p});
    e63  = (WM-CF+9)'(e >>> CF);
    corr = (WM+CW+13)'($signed({1'b0, r0[CW:0]}) * e63) >>> CF;
    r1   = $signed((WM+3)'(r0[CW:0]) << (WM - CF)) + (WM+3)'(corr);
    r    = r1[WM:0];
  end
endmodule
