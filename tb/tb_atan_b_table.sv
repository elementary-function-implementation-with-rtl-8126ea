// tb_atan_b_table: checks the atan(b) table.
//
// Five entries are compared exactly with values computed independently to
// 66 fraction bits with high-precision decimal arithmetic (b = 1/512,
// 100/512, 1/2, 300/512, 511/512), b = 1 with round(pi/4 * 2^66), and
// every entry with the simulator's double-precision atan (to 2^-52) and
// for strict monotonicity.
module tb_atan_b_table;
  import atan_pkg::*;
  logic [K:0]    k;
  logic [FS-1:0] atb, prev;
  int checks = 0, failures = 0;

  atan_b_table dut (.k, .atb);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exact(int kk, logic [FS-1:0] want);
    k = (K+1)'(kk);
    #1;
    checks++;
    if (atb !== want) begin
      failures++;
      $display("k=%0d got %h want %h", kk, atb, want);
    end
  endtask

  initial begin
    exact(1,   66'h1ffffd5555bbbbb);
    exact(100, 66'hc58377143ce145dd);
    exact(256, 66'h1dac670561bb4f68b);
    exact(300, 66'h21ebc516cfc52a002);
    exact(511, 66'h3233f2a7ddaf92b4b);
    exact(512, FS'(PI_4_FIX));
    prev = '0;
    for (int i = 0; i <= 512; i++) begin
      real r, d;
      k = (K+1)'(i);
      #1;
      r = $atan(real'(i) / 512.0);
      d = real'(atb) / (2.0 ** FS) - r;
      checks++;
      if (d > 2.0 ** -52 || d < -(2.0 ** -52)) begin
        failures++;
        $display("k=%0d off by %e", i, d);
      end
      checks++;
      if (i > 0 && atb <= prev) begin
        failures++;
        $display("k=%0d not increasing", i);
      end
      prev = atb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
