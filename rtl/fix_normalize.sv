// fix_normalize: leading-one normalisation of the fixed-point result.
//
// After reconstruction the arctangent is a fixed-point number with FS = 66
// fraction bits and a value in [2^-10, pi/2). This block finds the leading
// one and returns the number as an unrounded wide float (64-bit mantissa
// with hidden one), ready for fp_round. Only the top 11 positions can hold
// the leading one for values of this range; the search still covers the
// whole word, so any non-zero input is normalised correctly. The method
// needs a floating-point result but leaves this stage open; a plain
// priority search and shifter is this design's choice.
//
// Interface: v has value v * 2^-FS. w is the same value, truncated to a
// 64-bit mantissa (only discarded bits are lost for leading-one positions
// above 63). Purely combinational.
module fix_normalize import atan_pkg::*; (
  input  logic [FS:0] v,
  output wfloat_t     w
);
  logic [$clog2(FS+1)-1:0] lead;
  logic [FS+WM+1:0]        shifted;

  always_comb begin
    lead = '0;
    for (int i = 0; i <= FS; i++) if (v[i]) lead = ($clog2(FS+1))'(i);
    shifted = (FS+WM+2)'(v) << (($clog2(FS+1))'(FS) - lead);  // leading one to bit FS
    w.zero = (v == '0);
    w.e    = EW'(lead) - EW'(FS);
    w.m    = shifted[FS -: WM+1];
  end
endmodule
