// arg_split: argument preparation for atan(a) = atan(b) + atan(c/(1+a*b)).
//
// For z in [2^-K, 1] the polynomial cannot be used directly. z is cast to a
// fixed-point number a with 62 fraction bits and split into an upper chunk
// b (the integer bit and the top 9 fraction bits, k = b*512 in 0..512) and a
// lower chunk c (the remaining 53 bits, c < 2^-9). The denominator 1 + a*b
// is formed from the product of z's 53-bit mantissa with k (a 53 x 10
// product; k only needs its 10th bit for a = 1), aligned right by at most
// 9 places according to the exponent of z, and added to one. The sum lies
// in [1, 2] and is already normalised, so it feeds the reciprocal unit
// without a shifter.
//
// Interface: z must satisfy 2^-K <= z <= 1 (exponent -9..0). k indexes the
// atan(b) table, c is the lower chunk (value c * 2^-62), den the mantissa of
// 1 + a*b truncated to 1.63 and den_two flags the single case 1 + a*b = 2
// (a = b = 1, where c = 0 and den is not used). Purely combinational.
module arg_split import atan_pkg::*; (
  input  ufloat_t      z,
  output logic [K:0]   k,
  output logic [WF:0]  c,
  output logic [WM:0]  den,
  output logic         den_two
);
  localparam int AF = WF + 1 + K;      // fraction bits of a (62)
  localparam int DF = AF + K - 1;      // fraction bits of a*b (70)

  logic [AF:0]        a;               // z as fixed point, value a * 2^-62
  logic [3:0]         sh;              // z.e + K, 0..9
  logic [WF+K+1:0]    mk;              // z.m * k
  logic [DF+1:0]      den_fix;         // 1 + a*b, value den_fix * 2^-70

  always_comb begin
    sh      = 4'(z.e + EW'(K));
    a       = (AF+1)'(z.m) << (sh + 4'd1);
    k       = a[AF -: K+1];
    c       = a[WF:0];
    mk      = (WF+K+2)'(z.m) * (WF+K+2)'(k);
    den_fix = ((DF+2)'(1) << DF) + ((DF+2)'(mk) << sh);
    den_two = den_fix[DF+1];
    den     = den_fix[DF -: WM+1];
  end

endmodule
