// atan_b_table: the tabulated first term atan(b) of the reconstruction.
//
// b = k / 512 takes the 513 values 0, 1/512, ..., 1. The table holds
// atan(b) rounded to FS = 66 fraction bits, enough for a result with at
// least 56 significant bits on [2^-9, pi/4]. The entries are computed at
// elaboration with Euler's series
//   atan(x) = sum_n  (2^2n (n!)^2 / (2n+1)!) * x^(2n+1) / (1+x^2)^(n+1),
// whose terms shrink at least by half each step for x <= 1; the sum is
// carried in 110-bit fixed point and rounded at the end.
//
// Interface: k = 0..512 selects b = k/512; atb is atan(b) * 2^66.
// Purely combinational (a ROM).
module atan_b_table import atan_pkg::*; (
  input  logic [K:0]    k,
  output logic [FS-1:0] atb
);
  localparam int NB = (1 << K) + 1;
  localparam int PF = 110;             // working precision of the generator

  typedef logic [NB-1:0][FS-1:0] tab_t;

  function automatic tab_t build();
    tab_t t;
    logic [255:0] term, sum, den, kk;
    for (int i = 0; i < NB; i++) begin
      kk   = 256'(i) * 256'(i);
      den  = 256'(1 << (2*K)) + kk;    // 512^2 + k^2
      term = (256'(i) << (PF + K)) / den;   // x / (1 + x^2)
      sum  = term;
      for (int n = 1; n < 4*PF && term != 0; n++) begin
        term = (term * 256'(2*n) * kk) / (256'(2*n + 1) * den);
        sum  = sum + term;
      end
      t[i] = FS'((sum + (256'(1) << (PF - FS - 1))) >> (PF - FS));
    end
    return t;
  endfunction

  localparam tab_t TAB = build();

  // k only reaches 512 (bit K set) for b = 1
  assign atb = TAB[k[K] ? (K+1)'(NB - 1) : k];
endmodule
