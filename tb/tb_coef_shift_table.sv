// tb_coef_shift_table: checks both shifted-coefficient tables of Q(y).
//
// For every exponent of y from -2K down to -80 the a1 = 1/3 table (shift
// of one place per exponent step) and the a2 = 1/5 table (two places) must
// hold 2^(FQ + i*ey) / DEN rounded to nearest, which is checked with exact
// integer arithmetic as |coef * DEN - 2^(FQ + i*ey)| <= DEN/2, and zero
// once that shifted value is below half a unit.
module tb_coef_shift_table;
  import atan_pkg::*;
  localparam int TW1 = FQ - 2*K;
  localparam int TW2 = FQ - 4*K;
  logic signed [EW-1:0] ey;
  logic [TW1-1:0] c1;
  logic [TW2-1:0] c2;
  int checks = 0, failures = 0;

  coef_shift_table #(.POW(1), .DEN(3)) u1 (.ey, .coef(c1));
  coef_shift_table #(.POW(2), .DEN(5)) u2 (.ey, .coef(c2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ok(longint coef, int pow, int den, int e);
    int sh;
    logic [127:0] lhs, p2, diff;
    sh = FQ + pow*e;
    if (sh < -1) return coef == 0;
    lhs  = 128'(coef) * 128'(den) * 2;    // doubled to handle 2^-1
    p2   = 128'(1) << (sh + 1);
    diff = lhs > p2 ? lhs - p2 : p2 - lhs;
    return diff <= 128'(den);
  endfunction

  initial begin
    for (int e = -2*K; e >= -80; e--) begin
      ey = EW'(e);
      #1;
      checks += 2;
      if (!ok(longint'(c1), 1, 3, e)) begin failures++; $display("a1 ey=%0d coef=%h", e, c1); end
      if (!ok(longint'(c2), 2, 5, e)) begin failures++; $display("a2 ey=%0d coef=%h", e, c2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
