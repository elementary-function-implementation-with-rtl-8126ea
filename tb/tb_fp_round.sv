// tb_fp_round: checks rounding to binary64.
//
// Random wide mantissas and exponents (with extra cases at exact ties,
// just above and below ties, and all-ones mantissas that carry into the
// exponent) are rounded by the block and compared bit for bit with the
// simulator's own conversion of the same value to a double, which rounds
// to nearest even.
module tb_fp_round;
  import atan_pkg::*;
  wfloat_t     w;
  logic        sign;
  logic [63:0] y;
  int checks = 0, failures = 0;

  fp_round dut (.w, .sign, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [WM:0] m, int e, logic s);
    real want;
    w = '{zero: 1'b0, e: EW'(e), m: m};
    sign = s;
    #1;
    want = real'(m) * (2.0 ** (e - WM));
    if (s) want = -want;
    checks++;
    if (y !== $realtobits(want)) begin
      failures++;
      if (failures < 10) $display("m=%h e=%0d got %h want %h", m, e, y, $realtobits(want));
    end
  endtask

  initial begin
    w = '{zero: 1'b1, e: '0, m: '0};
    sign = 1'b1;
    #1;
    checks++;
    if (y !== 64'h8000_0000_0000_0000) begin failures++; $display("zero"); end
    check('1, 0, 0);
    for (int i = 0; i < 20000; i++) begin
      logic [WM:0] m;
      m = {1'b1, 31'($urandom()), $urandom()};
      case (i % 4)
        1: m[10:0] = 11'h400;                 // exact tie
        2: m[10:0] = 11'h401;                 // just above a tie
        3: m[10:0] = 11'h3ff;                 // just below a tie
        default: ;
      endcase
      check(m, int'($urandom_range(0, 2000)) - 1000, 1'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
