// tb_arg_split: checks the argument split for the reconstruction.
//
// For random z in [2^-9, 1] and the ends of the range it checks that
// k*2^53 + c reassembles the fixed-point value of z exactly, that
// k = b*512 stays within 1..512, and that den equals 1 + a*b computed in
// the testbench from a and b with exact integer arithmetic and truncated
// to 63 fraction bits; den_two must flag exactly the case a = 1.
module tb_arg_split;
  import atan_pkg::*;
  ufloat_t     z;
  logic [K:0]  k;
  logic [WF:0] c;
  logic [WM:0] den;
  logic        den_two;
  int checks = 0, failures = 0;

  arg_split dut (.z, .k, .c, .den, .den_two);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int e, logic [WF-1:0] f);
    logic [127:0] a, ab, want;
    z = '{zero: 1'b0, e: EW'(e), m: {1'b1, f}};
    #1;
    a    = 128'({1'b1, f}) << (e + 10);          // scale 2^-62
    ab   = a * 128'(k);                           // scale 2^-71
    want = ((128'(1) << 71) + ab) >> 8;           // scale 2^-63
    checks += 3;
    if (((128'(k) << 53) | 128'(c)) != a) begin
      failures++;
      $display("split z=2^%0d*1.%h k=%0d c=%h", e, f, k, c);
    end
    if (k == 0 || k > 512) begin failures++; $display("k=%0d", k); end
    if (den_two != (e == 0)) begin
      failures++;
      $display("den_two z=2^%0d", e);
    end else if (!den_two && 128'(den) != want) begin
      failures++;
      $display("den z=2^%0d*1.%h got %h want %h", e, f, den, want);
    end
  endtask

  initial begin
    check(-9, '0);
    check(0, '0);
    check(-1, '1);
    for (int i = 0; i < 20000; i++)
      check(-1 - int'($urandom_range(0, 8)), {20'($urandom()), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
