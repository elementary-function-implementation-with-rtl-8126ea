// tb_trunc_squarer: checks the truncated squarer against the exact square.
//
// For random 53-bit mantissas (and 1.0, the largest mantissa and the
// neighbourhood of sqrt(2)) the exact square is formed in the testbench;
// the result must be normalised and its value, y_m * 2^carry, must lie
// between the exact square less one output unit and the exact square.
// (Just above sqrt(2) the truncation may give 1.11..1 without carry
// instead of 1.00..0 with carry; both are within the error bound.)
module tb_trunc_squarer;
  import atan_pkg::*;
  logic [WF:0] m;
  logic        carry;
  logic [MY:0] y_m;
  int checks = 0, failures = 0;

  trunc_squarer dut (.m, .carry, .y_m);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [WF:0] mm);
    logic [2*WF+1:0] sq;                  // scale 2^-104
    logic [2*WF+1:0] exact;               // scale 2^-MY
    logic [2*WF+1:0] got;
    logic [2*WF+1:0] unit;
    m = mm;
    #1;
    sq    = (2*WF+2)'(mm) * (2*WF+2)'(mm);
    exact = sq >> (2*WF - MY);
    got   = (2*WF+2)'(y_m) << carry;
    unit  = carry ? 2 : 1;
    checks++;
    if (!y_m[MY] || got > exact || exact - got > unit) begin
      failures++;
      if (failures < 10) $display("m=%h carry=%b y=%h exact=%h", mm, carry, y_m, exact);
    end
  endtask

  initial begin
    check({1'b1, 52'h0});
    check('1);
    check(53'h16a09e667f3bcd);            // just below sqrt(2)
    check(53'h16a09e667f3bce);
    for (int i = 0; i < 20000; i++)
      check({1'b1, 20'($urandom()), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
