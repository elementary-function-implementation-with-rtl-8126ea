// tb_trunc_mult: checks the column-truncated multiplier.
//
// Two instances with the sizes the arctangent unit uses (53 x 58 bits
// dropping 44 columns, 53 x 64 bits dropping 52 columns) are driven with
// random operands, all-ones operands and operands whose set bits lie only
// above the cut. The result must lie between exact - min(BW, T) and exact,
// exact = (a*b) >> T being formed in the testbench, and must equal exact
// when no partial-product bit falls below the cut.
module tb_trunc_mult;
  logic [52:0] a1, a2;
  logic [57:0] b1;
  logic [63:0] b2;
  logic [66:0] p1;
  logic [64:0] p2;
  int checks = 0, failures = 0;

  trunc_mult #(.AW(53), .BW(58), .T(44)) u1 (.a(a1), .b(b1), .p(p1));
  trunc_mult #(.AW(53), .BW(64), .T(52)) u2 (.a(a2), .b(b2), .p(p2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic judge(logic [127:0] got, logic [127:0] exact, int bound, bit must_be_exact);
    checks++;
    if (got > exact || exact - got > 128'(bound) || (must_be_exact && got != exact)) begin
      failures++;
      if (failures < 10) $display("got %h exact %h", got, exact);
    end
  endtask

  task automatic check(logic [52:0] a, logic [63:0] b, bit must_be_exact);
    a1 = a; b1 = b[57:0]; a2 = a; b2 = b;
    #1;
    judge(128'(p1), (128'(a) * 128'(b[57:0])) >> 44, 44, must_be_exact);
    judge(128'(p2), (128'(a) * 128'(b)) >> 52, 52, must_be_exact);
  endtask

  initial begin
    check('1, '1, 0);
    check({1'b1, 52'h0}, 64'h0200_0000_0000_0000, 1);   // b = 2^57: one row above both cuts
    check(53'h1f_ffff_ffff_ffff, 64'h0300_0000_0000_0000, 1);
    for (int i = 0; i < 20000; i++)
      check({$urandom(), $urandom()}, {$urandom(), $urandom()}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
