// tb_fix_normalize: checks the leading-one normalisation.
//
// Random fixed-point values with every possible leading-one position, plus
// zero, must come back with the hidden one set, the exponent of their
// leading one, and the mantissa equal to the input shifted accordingly.
module tb_fix_normalize;
  import atan_pkg::*;
  logic [FS:0] v;
  wfloat_t     w;
  int checks = 0, failures = 0;

  fix_normalize dut (.v, .w);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '0;
    #1;
    checks++;
    if (!w.zero) begin failures++; $display("zero not flagged"); end
    for (int i = 0; i < 20000; i++) begin
      int pos;
      logic [FS:0] r, want;
      pos = i % (FS + 1);
      r   = {$urandom(), $urandom(), $urandom()};
      v   = (r >> (FS - pos)) | ((FS+1)'(1) << pos);
      #1;
      want = pos >= WM ? v >> (pos - WM) : v << (WM - pos);
      checks++;
      if (w.zero || w.e != EW'(pos - FS) || (FS+1)'(w.m) != want) begin
        failures++;
        if (failures < 10) $display("v=%h pos=%0d got e=%0d m=%h", v, pos, w.e, w.m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
