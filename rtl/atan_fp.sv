// atan_fp: pipelined IEEE-754 binary64 arctangent.
//
// atan is odd, so the unit works on |x| and restores the sign at the end.
// For |x| > 1 it uses atan(x) = pi/2 - atan(1/x); the reciprocal unit
// produces z = 1/|x|, otherwise z = |x|. Both branches then share a single
// evaluation of atan(z) for z in [0, 1]:
//
//   * z < 2^-9: atan(z) = P(z) = z - z^3/3 + z^5/5, computed by the
//     sub-range polynomial evaluator (poly_eval) directly.
//   * z >= 2^-9: z is split as a = b + c (arg_split), and
//     atan(a) = atan(b) + atan(t), t = c / (1 + a*b) < 2^-9. atan(b) comes
//     from a 513-entry table, 1/(1+a*b) from a second reciprocal unit, t
//     from the product c * (1/(1+a*b)), and atan(t) = P(t) again from the
//     same polynomial evaluator, whose input is multiplexed between z and t.
//
// The terms are summed in fixed point with 66 fraction bits (and subtracted
// from pi/2 for |x| > 1), normalised and rounded to nearest even. A result
// of the direct branch with |x| <= 1 is rounded straight from the
// evaluator's wide mantissa. Special inputs: NaN gives a quiet NaN,
// +-inf gives +-pi/2 (through z = 0), +-0 gives +-0, and a subnormal x is
// returned unchanged, since atan(x) rounds to x there.
//
// Timing: fully pipelined, one operation per clock, LATENCY = 7 cycles from
// a sampled in_valid to out_valid. The register boundaries are this
// design's own; each stage holds one of the method's operators
// (reciprocal, argument split, inverse, product c*inv, polynomial,
// summation, rounding), so the logic between registers is far deeper than
// in a 400 MHz FPGA pipeline. rst_n (active low, synchronous) clears only
// the valid bits; the data registers need no reset.
//
// Accuracy: results are within one unit in the last place of the exact
// arctangent (not correctly rounded in every case).
module atan_fp import atan_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] x,
  output logic        out_valid,
  output logic [63:0] y
);
  localparam int LATENCY = 7;

  // per-operation flags that travel down the pipeline
  typedef struct packed {
    logic        sign;     // sign of x
    logic        big;      // |x| > 1: result is pi/2 - atan(z)
    logic        nan;      // x is NaN: result is a quiet NaN
    logic        pass;     // x is subnormal: result is x
    logic [63:0] x;        // original operand (NaN payload, subnormal)
  } ctl_t;

  // ---------------------------------------------------------------- stage 1
  // decode, 1/|x| for |x| > 1
  logic [WE-1:0]  ex_f;
  logic [WF-1:0]  fx_f;
  logic [WM:0]    rx_in, rx;
  ctl_t           c0;
  ufloat_t        z0;

  assign ex_f  = x[62:52];
  assign fx_f  = x[51:0];
  assign rx_in = {1'b1, fx_f, (WM-WF)'(0)};

  recip_unit u_rx (.d(rx_in), .r(rx));

  always_comb begin
    logic [WF+1:0] zr;
    c0.sign = x[63];
    c0.nan  = (ex_f == '1) && (fx_f != '0);
    c0.pass = (ex_f == '0) && (fx_f != '0);
    c0.big  = ((ex_f > WE'(BIAS)) || (ex_f == WE'(BIAS) && fx_f != '0)) && !c0.nan;
    c0.x    = x;
    z0.zero = (ex_f == '0) || (ex_f == '1);  // zero, subnormal (bypassed), inf (z = 0), NaN
    z0.e    = EW'(ex_f) - EW'(BIAS);
    z0.m    = {1'b1, fx_f};
    zr      = '0;
    if (c0.big && !z0.zero) begin
      if (fx_f == '0) begin                  // 1/2^e is exact
        z0.e = -z0.e;
      end else begin                          // 1/m in (0.5, 1): round to 53 bits
        zr   = (WF+2)'(rx[WM-1 -: WF+1]) + (WF+2)'(rx[WM-WF-2]);
        z0.e = -z0.e - EW'(1);
        z0.m = zr[WF+1] ? (WF+1)'(1) << WF : zr[WF:0];
        if (zr[WF+1]) z0.e = z0.e + EW'(1);
      end
    end
  end

  ctl_t    c1;
  ufloat_t z1;
  logic    v1;

  // ---------------------------------------------------------------- stage 2
  // branch selection and argument split
  logic        direct1;
  ufloat_t     zs;
  logic [K:0]  k1;
  logic [WF:0] cc1;
  logic [WM:0] den1;
  logic        dtwo1;

  assign direct1 = z1.zero || (z1.e < -EW'(K));
  // the split is only meaningful on [2^-9, 1]; feed it a legal value otherwise
  assign zs = direct1 ? '{zero: 1'b0, e: -EW'(K), m: (WF+1)'(1) << WF} : z1;

  arg_split u_split (.z(zs), .k(k1), .c(cc1), .den(den1), .den_two(dtwo1));

  ctl_t        c2;
  ufloat_t     z2;
  logic        v2, direct2, dtwo2;
  logic [K:0]  k2;
  logic [WF:0] cc2;
  logic [WM:0] den2;

  // ---------------------------------------------------------------- stage 3
  // inverse of 1 + a*b, atan(b) lookup
  logic [WM:0]    inv3;
  logic [FS-1:0]  atb3;

  recip_unit   u_rden (.d(den2), .r(inv3));
  atan_b_table u_atb  (.k(k2), .atb(atb3));

  ctl_t          c3;
  ufloat_t       z3;
  logic          v3, direct3;
  logic [WF:0]   cc3;
  logic [WM:0]   inv3_q;
  logic [FS-1:0] atb4;

  // ---------------------------------------------------------------- stage 4
  // t = c * 1/(1+a*b) (truncated multiplier), normalised and rounded to
  // 53 bits; polynomial input mux
  localparam int TT = 52;                // columns dropped in c * inv
  localparam int TPW = WF + WM + 2 - TT;  // product width (65)
  logic [TPW-1:0] tprod;                 // value tprod * 2^-(62+63-TT)
  ufloat_t        t4, px4;

  trunc_mult #(.AW(WF+1), .BW(WM+1), .T(TT)) u_tmul (.a(cc3), .b(inv3_q), .p(tprod));

  always_comb begin
    logic [6:0]     lead;
    logic [TPW-1:0] tsh;
    logic [WF+1:0]  tr;
    lead  = '0;
    for (int i = 0; i < TPW; i++) if (tprod[i]) lead = 7'(i);
    tsh   = tprod << (7'(TPW-1) - lead);   // leading one to the top bit
    tr    = (WF+2)'(tsh[TPW-1 -: WF+1]) + (WF+2)'(tsh[TPW-2-WF]);
    t4.zero = (tprod == '0);
    t4.e    = EW'(lead) - EW'(WF + 1 + K + WM - TT);
    t4.m    = tr[WF+1] ? (WF+1)'(1) << WF : tr[WF:0];
    if (tr[WF+1]) t4.e = t4.e + EW'(1);
    px4 = direct3 ? z3 : t4;
  end

  ctl_t          c4;
  logic          v4, direct4;
  ufloat_t       px5;
  logic [FS-1:0] atb5;

  // ---------------------------------------------------------------- stage 5
  // sub-range polynomial P(z) or P(t)
  wfloat_t p5;

  poly_eval u_poly (.x(px5), .p(p5));

  ctl_t          c5;
  logic          v5, direct5;
  wfloat_t       p6;
  logic [FS-1:0] atb6;

  // ---------------------------------------------------------------- stage 6
  // atan(z) = atan(b) + P(t) in fixed point; pi/2 - atan(z) for |x| > 1
  logic [FS:0] pfix6, sum6, res6;

  always_comb begin
    logic signed [EW-1:0] rsh;           // right shift of the 1.63 mantissa
    rsh   = -(p6.e + EW'(FS - WM));
    pfix6 = '0;
    if (!p6.zero && rsh < EW'(WM + 1))
      pfix6 = (FS+1)'(p6.m >> rsh);
    sum6 = (direct5 ? '0 : (FS+1)'(atb6)) + pfix6;
    res6 = c5.big ? PI_2_FIX - sum6 : sum6;
  end

  ctl_t        c6;
  logic        v6, use_p7;
  wfloat_t     p7;
  logic [FS:0] res7;

  // ---------------------------------------------------------------- stage 7
  // normalise and round, apply sign and special cases
  wfloat_t     wres7, wsel7;
  logic [63:0] y7;

  fix_normalize u_norm  (.v(res7), .w(wres7));
  assign wsel7 = use_p7 ? p7 : wres7;
  fp_round      u_round (.w(wsel7), .sign(c6.sign), .y(y7));

  // ------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {v1, v2, v3, v4, v5, v6, out_valid} <= '0;
    end else begin
      {v1, v2, v3, v4, v5, v6, out_valid} <= {in_valid, v1, v2, v3, v4, v5, v6};
    end
    c1 <= c0;  z1 <= z0;
    c2 <= c1;  z2 <= z1;  direct2 <= direct1;  k2 <= k1;  cc2 <= cc1;
    den2 <= den1;  dtwo2 <= dtwo1;
    c3 <= c2;  z3 <= z2;  direct3 <= direct2;  cc3 <= dtwo2 ? '0 : cc2;
    inv3_q <= inv3;  atb4 <= atb3;
    c4 <= c3;  direct4 <= direct3;  px5 <= px4;  atb5 <= atb4;
    c5 <= c4;  direct5 <= direct4;  p6 <= p5;  atb6 <= atb5;
    c6 <= c5;  use_p7 <= direct5 && !c5.big;  p7 <= p6;  res7 <= res6;
    if (c6.nan)       y <= {c6.x[63:52], 1'b1, c6.x[50:0]};
    else if (c6.pass) y <= c6.x;
    else              y <= y7;
  end

  // operating ranges of the sub-blocks, checked on valid operations only
  always_ff @(posedge clk) begin
    if (rst_n && v1 && !direct1)
      assert (zs.e >= -EW'(K) && zs.e <= 0 && (zs.e < 0 || zs.m == (WF+1)'(1) << WF))
        else $error("atan_fp: argument split input outside [2^-9, 1]: %h %0d %h", c1.x, zs.e, zs.m);
    if (rst_n && v4)
      assert (px5.zero || px5.e < -EW'(K))
        else $error("atan_fp: polynomial input outside [0, 2^-9)");
    if (rst_n && v6 && !c6.nan && !c6.pass)
      assert (wsel7.zero || (wsel7.e > -EW'(BIAS) && wsel7.e < EW'(2)))
        else $error("atan_fp: result exponent out of range");
  end
endmodule
