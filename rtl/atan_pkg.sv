// atan_pkg: shared widths and number formats of the binary64 arctangent unit.
//
// The unit evaluates atan(x) in IEEE-754 binary64 (wE = 11, wF = 52). The
// polynomial P(x) = x - x^3/3 + x^5/5 is only used on the sub-range
// [0, 2^-K] with K = 9; everything above is reduced to that range with
// atan(a) = atan(b) + atan(c / (1 + a*b)). G is the number of guard bits
// kept beyond the 54 bits of the result; the method calls for 2 or 3 and
// this design uses 3. K, g and the binary64 format are the method's; the
// 66-bit fixed-point sum width FS and the internal formats below are this
// design's own.
//
// Internal numbers that are known to be non-negative are carried in an
// unrounded, unbounded-exponent form (ufloat_t / wfloat_t): a hidden-one
// mantissa plus a two's-complement exponent, so that no subnormal or
// overflow handling is needed inside the datapath.
package atan_pkg;

  localparam int WE  = 11;              // exponent field width (binary64)
  localparam int WF  = 52;              // fraction field width (binary64)
  localparam int BIAS = 1023;
  localparam int K   = 9;               // polynomial sub-range is [0, 2^-K]
  localparam int G   = 3;               // guard bits
  localparam int FQ  = WF + 2 + G;      // fraction bits of Q(y) (54 + g)
  localparam int MY  = WF + 2 - 2*K + G;// fraction bits of y = x^2 (36 + g)
  localparam int MY2 = WF + 2 - 4*K + G;// fraction bits of y^2 (18 + g)
  localparam int WM  = 63;              // fraction bits of wide mantissas
  localparam int FS  = 66;              // fraction bits of the fixed-point sum
  localparam int EW  = 13;              // internal exponent width (signed)

  // value = m * 2^(e - WF), m has its hidden one in bit WF (unless zero)
  typedef struct packed {
    logic                 zero;
    logic signed [EW-1:0] e;
    logic [WF:0]          m;
  } ufloat_t;

  // value = m * 2^(e - WM), m has its hidden one in bit WM (unless zero)
  typedef struct packed {
    logic                 zero;
    logic signed [EW-1:0] e;
    logic [WM:0]          m;
  } wfloat_t;

  // round(pi/2 * 2^FS) and round(pi/4 * 2^FS); pi/2 = 1.921fb54442d18469898cc51701b8...h
  localparam logic [FS:0] PI_2_FIX = 67'h6487ED5110B4611A6;
  localparam logic [FS:0] PI_4_FIX = 67'h3243F6A8885A308D3;

endpackage
