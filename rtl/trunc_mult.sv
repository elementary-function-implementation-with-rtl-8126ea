// trunc_mult: column-truncated unsigned multiplier.
//
// Computes p ~ (a * b) / 2^T without forming the partial-product bits that
// fall in the T least significant columns: each row a*b[j]*2^j is cut at
// column T before it is added. Each row loses less than one unit of p, so
// p lies between exact - min(BW, T) and exact, where exact = (a*b) >> T.
// This saves the low part of the partial-product array when only the
// upper bits of a product are wanted; the arctangent unit uses it for
// x*Q(y) and for c * 1/(1+a*b). No compensation constant is added, so a
// product whose operand rows are all above column T (for example x * 1)
// stays exact. The truncation scheme is this design's choice.
//
// Interface: a (AW bits) and b (BW bits) unsigned, p = AW+BW-T bits.
// Purely combinational.
module trunc_mult #(
  parameter int AW = 53,
  parameter int BW = 58,
  parameter int T  = 44,
  localparam int PW = AW + BW - T
) (
  input  logic [AW-1:0] a,
  input  logic [BW-1:0] b,
  output logic [PW-1:0] p
);
  always_comb begin
    p = '0;
    for (int j = 0; j < BW; j++) begin
      if (b[j]) begin
        if (j >= T) p = p + (PW'(a) << (j - T));
        else        p = p + PW'(a >> (T - j));
      end
    end
  end
endmodule
