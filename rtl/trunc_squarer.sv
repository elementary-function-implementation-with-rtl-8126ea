// trunc_squarer: truncated mantissa squarer for y = x^2.
//
// The polynomial evaluator only needs y = x^2 to 36+g fraction bits, so the
// square does not have to be exact. This squarer drops the low bits of the
// operand before squaring (keeping OF+3 fraction bits), which removes most
// of the partial products, and truncates the result to OF fraction bits.
// The total error is below 2^-OF (one unit of the output). Dropping operand
// bits is this design's choice of truncation scheme; the required output
// accuracy is the one the algorithm calls for.
//
// Interface: m is a normalised mantissa 1.f (MW bits, hidden one in bit
// MW-1). carry is set when m^2 >= 2, in which case the caller adds one to
// the doubled exponent; y_m is the normalised square 1.f with OF fraction
// bits. Purely combinational.
module trunc_squarer import atan_pkg::*; #(
  parameter int MW = WF + 1,  // input mantissa width (hidden one included)
  parameter int OF = MY       // output fraction bits
) (
  input  logic [MW-1:0] m,
  output logic          carry,
  output logic [OF:0]   y_m
);
  localparam int TW = OF + 4;          // kept operand bits: 1.(OF+3)

  logic [TW-1:0]   mt;
  logic [2*TW-1:0] sq;                 // value sq * 2^-(2*TW-2), in [1,4)

  assign mt    = m[MW-1 -: TW];
  assign sq    = mt * mt;
  assign carry = sq[2*TW-1];
  assign y_m   = carry ? sq[2*TW-1 -: OF+1] : sq[2*TW-2 -: OF+1];
endmodule
