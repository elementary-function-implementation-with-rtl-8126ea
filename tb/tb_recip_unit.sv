// tb_recip_unit: checks the mantissa reciprocal.
//
// For random mantissas, interval edges and the ends of [1, 2) it verifies
// with exact integer arithmetic that |d * r - 1| <= 2^-59, i.e. that the
// polynomial start value followed by one Newton-Raphson step reaches the
// accuracy the arctangent unit relies on.
module tb_recip_unit;
  import atan_pkg::*;
  logic [WM:0] d, r;
  int checks = 0, failures = 0;

  recip_unit dut (.d, .r);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [WM:0] dd);
    logic [2*WM+3:0] prod, one, err;
    d = dd;
    #1;
    prod = (2*WM+4)'(d) * (2*WM+4)'(r);          // scale 2^-126
    one  = (2*WM+4)'(1) << (2*WM);
    err  = prod > one ? prod - one : one - prod;
    checks++;
    if (err > ((2*WM+4)'(1) << (2*WM - 59))) begin
      failures++;
      if (failures < 10) $display("d=%h r=%h err=%h", d, r, err);
    end
  endtask

  initial begin
    check({1'b1, 63'h0});
    check('1);
    for (int i = 0; i < 512; i++) begin
      check({1'b1, 9'(i), 54'h0});                 // interval starts
      check({1'b1, 9'(i), 54'h3f_ffff_ffff_ffff}); // interval ends
    end
    for (int i = 0; i < 20000; i++)
      check({1'b1, 31'($urandom()), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
