// poly_eval: sub-range floating-point evaluator of P(x) = x - x^3/3 + x^5/5.
//
// This is the central primitive of the arctangent unit. The polynomial is
// rewritten as P(x) = x * Q(y) with y = x^2 and Q(y) = 1 - y/3 + y^2/5. On
// the sub-range x in [0, 2^-K] (K = 9) the exponent of y is at most -2K, so
// every monomial of Q lies at a known distance below a0 = 1. Q is then
// summed in plain fixed point with FQ = 54+g fraction bits: no alignment
// shifter, no normalisation and no rounding between operators. The shift
// that each monomial needs, i*ey, is folded into tables of pre-shifted
// coefficients indexed by ey (coef_shift_table); below a per-monomial
// threshold the table returns zero.
//
// Operand sizes follow the error budget of a 54-bit result: a1*y is formed
// on 36+g bits (it sits at least 18 places below a0), a2*y^2 on 18+g bits,
// and y = x^2 itself comes from a truncated squarer accurate to 36+g bits.
// Q lies in (1 - 2^-19.5, 1], so x*Q needs at most a one-place left
// normalisation. The final product x*Q uses a truncated multiplier that
// drops the 44 lowest partial-product columns (error below 2^-59 of the
// result), and keeps a 64-bit mantissa; rounding to binary64 is left to
// the caller so that the result can still be added to other terms.
//
// Interface: x is a non-negative number with 0 <= x <= 2^-K (the
// instantiating pipeline asserts the bound). p is the unrounded result. Purely combinational.
module poly_eval import atan_pkg::*; (
  input  ufloat_t x,
  output wfloat_t p
);
  localparam int TW1 = FQ - 2*K;       // width of aligned a1 (39)
  localparam int TW2 = FQ - 4*K;       // width of aligned a2 (21)
  localparam int TM  = 44;             // columns dropped in x*Q

  logic                  carry;
  logic [MY:0]           y_m;          // 1.MY
  logic signed [EW-1:0]  ey;
  logic [TW1-1:0]        t1;
  logic [TW2-1:0]        t2;
  logic [MY2:0]          y_t;          // y mantissa truncated to MY2 bits
  logic [2*MY2+1:0]      y2_full;
  logic [MY2+1:0]        y2_m;         // (1.fy)^2 in [1,4), MY2 fraction bits
  logic [TW1+MY:0]       a1y_full;
  logic [FQ:0]           a1y;          // |a1| * y, FQ fraction bits
  logic [TW2+MY2+1:0]    a2y2_full;
  logic [FQ:0]           a2y2;         // a2 * y^2, FQ fraction bits
  logic [FQ:0]           q;            // Q(y), FQ fraction bits
  logic [WF+FQ+1-TM:0]   xq;           // x.m * Q, WF+FQ-TM fraction bits

  trunc_squarer #(.MW(WF+1), .OF(MY)) u_sq (.m(x.m), .carry(carry), .y_m(y_m));

  assign ey = EW'(2*x.e) + EW'(carry);

  coef_shift_table #(.POW(1), .DEN(3), .FRAC(FQ), .EMAX(-2*K)) u_a1 (.ey(ey), .coef(t1));
  coef_shift_table #(.POW(2), .DEN(5), .FRAC(FQ), .EMAX(-2*K)) u_a2 (.ey(ey), .coef(t2));

  trunc_mult #(.AW(WF+1), .BW(FQ+1), .T(TM)) u_xq (.a(x.m), .b(q), .p(xq));

  always_comb begin
    // a1 * y: aligned coefficient times the 1.fy mantissa
    a1y_full  = (TW1+MY+1)'(t1) * (TW1+MY+1)'(y_m);
    a1y       = (FQ+1)'(a1y_full >> MY);
    // a2 * y^2: mantissa of y truncated further, squared, times aligned a2
    y_t       = y_m[MY -: MY2+1];
    y2_full   = (2*MY2+2)'(y_t) * (2*MY2+2)'(y_t);
    y2_m      = (MY2+2)'(y2_full >> MY2);
    a2y2_full = (TW2+MY2+2)'(t2) * (TW2+MY2+2)'(y2_m);
    a2y2      = (FQ+1)'(a2y2_full >> MY2);
    // Q = 1 - a1*y + a2*y^2, all aligned against a0 = 1
    q         = ((FQ+1)'(1) << FQ) - a1y + a2y2;
    // P = x * Q, normalised by at most one place
    p.zero    = x.zero;
    if (xq[WF+FQ-TM]) begin
      p.m = xq[WF+FQ-TM -: WM+1];
      p.e = x.e;
    end else begin
      p.m = xq[WF+FQ-TM-1 -: WM+1];
      p.e = x.e - EW'(1);
    end
  end
endmodule
