// tb_poly_eval: checks the sub-range polynomial evaluator.
//
// Random x over the whole sub-range (exponents -10 to -70), plus x = 2^-9
// and x = 0, are evaluated and compared with x*(1 - y/3 + y^2/5),
// y = x^2, computed in double precision by the testbench; the relative
// difference must stay below 2^-52 (the reference itself is only good to
// about 2^-53). The result mantissa must be normalised, and the tiniest
// inputs, where every monomial falls below the threshold, must return x
// exactly.
module tb_poly_eval;
  import atan_pkg::*;
  ufloat_t x;
  wfloat_t p;
  int checks = 0, failures = 0;

  poly_eval dut (.x, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int e, logic [WF-1:0] f);
    real xr, yr, want, got, rel;
    x.zero = 1'b0;
    x.e    = EW'(e);
    x.m    = {1'b1, f};
    #1;
    xr   = real'({1'b1, f}) * ($pow(2.0, real'(e - WF)));
    yr   = xr * xr;
    want = xr * (1.0 - yr / 3.0 + yr * yr / 5.0);
    got  = real'(p.m) * ($pow(2.0, real'(int'(p.e) - WM)));
    rel  = (got - want) / want;
    checks++;
    if (!p.m[WM] || p.zero || rel > 2.0 ** -52 || rel < -(2.0 ** -52)) begin
      failures++;
      if (failures < 10) $display("x=2^%0d*1.%h got %e want %e rel %e", e, f, got, want, rel);
    end
    if (e < -30) begin                    // Q = 1 exactly: P = x
      checks++;
      if (p.m !== {1'b1, f, (WM-WF)'(0)} || p.e !== EW'(e)) begin
        failures++;
        $display("tiny x=2^%0d*1.%h not returned exactly", e, f);
      end
    end
  endtask

  initial begin
    check(-9, '0);
    x = '{zero: 1'b1, e: '0, m: '0};
    #1;
    checks++;
    if (!p.zero) begin failures++; $display("zero input"); end
    for (int i = 0; i < 20000; i++)
      check(-10 - int'($urandom_range(0, 60)), {20'($urandom()), $urandom()});
    for (int i = 0; i < 2000; i++)
      check(-10, {20'($urandom()), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
