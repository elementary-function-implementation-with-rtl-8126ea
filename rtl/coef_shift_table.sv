// coef_shift_table: a polynomial coefficient, pre-aligned for every exponent
// of y.
//
// In Q(y) = a0 + a1*y + a2*y^2 with y = 2^ey * 1.fy, the monomial ai*y^i is
// ai * 2^(i*ey) * (1.fy)^i. The factor 2^(i*ey) is a pure right shift that
// depends only on ey, so it is folded into the coefficient: this table holds
// |ai| * 2^(i*ey), scaled to FQ fraction bits (the fraction bits of a0 = 1),
// for ey = EMAX, EMAX-1, ... Each line is the previous one shifted right by
// POW places. Once the shifted coefficient drops below the precision of a0
// the entry is zero; every exponent below that threshold reads the final
// zero line. The table contents are rounded to nearest and computed at
// elaboration from the formula round(2^(FQ + POW*ey) / DEN).
//
// Interface: ey is the unbiased exponent of y (two's complement), coef the
// aligned coefficient magnitude (value coef * 2^-FQ). The sign of ai is
// applied by the caller. Exponents above EMAX cannot occur on the sub-range
// and read the first line. Purely combinational (a ROM).
module coef_shift_table import atan_pkg::*; #(
  parameter int POW  = 1,           // monomial order i
  parameter int DEN  = 3,           // |ai| = 1/DEN
  parameter int FRAC = FQ,          // fraction bits of the output
  parameter int EMAX = -2*K,        // largest exponent of y on the sub-range
  localparam int TW  = FRAC + POW*EMAX,           // output width
  localparam int N   = (FRAC + POW*EMAX) / POW + 2 // lines, last one zero
) (
  input  logic signed [EW-1:0] ey,
  output logic [TW-1:0]        coef
);
  typedef logic [N-1:0][TW-1:0] tab_t;

  function automatic tab_t build();
    tab_t t;
    logic [127:0] num;
    int sh;
    for (int s = 0; s < N; s++) begin
      sh = FRAC + POW*(EMAX - s);
      if (sh < 0) t[s] = '0;
      else begin
        num  = 128'(1) << (sh + 1);
        t[s] = TW'((num + 128'(DEN)) / (128'(2*DEN)));
      end
    end
    t[N-1] = '0;
    return t;
  endfunction

  localparam tab_t TAB = build();

  logic signed [EW:0] s;               // line number = EMAX - ey
  always_comb begin
    s = (EW+1)'(EMAX) - (EW+1)'(ey);
    if (s < 0)                     coef = TAB[0];
    else if (s >= (EW+1)'(N))      coef = TAB[N-1];
    else                           coef = TAB[s[$clog2(N)-1:0]];
  end
endmodule
