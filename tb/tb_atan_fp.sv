// tb_atan_fp: end-to-end test of the binary64 arctangent pipeline.
//
// Streams operands from every range the unit distinguishes through the
// pipeline, one per clock, and compares each result with the simulator's
// own double-precision atan (an independent implementation). A result
// passes when it is within MAX_ULP units in the last place of the
// reference; special values must match exactly. It also checks that
// every result appears exactly LATENCY cycles after its operand, and
// counts how often each mechanism of the design was exercised: the
// direct polynomial branch, the reconstruction branch, the |x| > 1
// reciprocal branch with both sub-branches, negative operands, and the
// special cases (NaN, infinity, zero, subnormal). A mechanism never
// exercised counts as a failure.
module tb_atan_fp;
  localparam int LATENCY = 7;
  localparam int MAX_ULP = 1;
  localparam int N       = 4000;

  logic        clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [63:0] x = '0, y;
  int checks = 0, failures = 0, max_ulp = 0;
  int n_direct = 0, n_recon = 0, n_big_direct = 0, n_big_recon = 0;
  int n_neg = 0, n_nan = 0, n_inf = 0, n_zero = 0, n_sub = 0;
  logic [63:0] q_x [$];
  longint      q_t [$];
  longint      cycle = 0;

  atan_fp dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #(10 * (N + 100) * 2);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rand_in_exp(int e_lo, int e_hi);
    logic [63:0] r;
    int e;
    e = e_lo + int'($urandom_range(0, e_hi - e_lo));
    r = {1'b0, 11'(e + 1023), $urandom(), $urandom()} ;
    r[51:0] = {20'($urandom()), $urandom()};
    r[63]   = $urandom_range(0, 1) == 1;
    return r;
  endfunction

  function automatic logic [63:0] stimulus(int i);
    case (i % 12)
      0: return rand_in_exp(-40, -10);                 // direct polynomial, |x| < 2^-9
      1: return rand_in_exp(-9, -1);                   // reconstruction
      2: return rand_in_exp(-9, -1);
      3: return rand_in_exp(0, 0);                     // [1, 2): reciprocal + reconstruction
      4: return rand_in_exp(1, 8);                     // |x| > 1, 1/x >= 2^-9
      5: return rand_in_exp(9, 60);                    // |x| > 512: 1/x < 2^-9
      6: return rand_in_exp(-1022, -41);               // tiny normal operands
      7: return rand_in_exp(61, 1023);                 // huge operands
      8: return {$urandom_range(0,1) == 1, 11'h3ff, 52'h0} ; // +-1
      9: return {$urandom_range(0,1) == 1, 11'(1023 + $urandom_range(0, 20)), 52'h0}; // powers of two > 1
      10: case ($urandom_range(0, 3))
            0: return {$urandom_range(0,1) == 1, 11'h7ff, 20'($urandom() | 1), $urandom()};
            1: return {$urandom_range(0,1) == 1, 11'h7ff, 52'h0};
            2: return {$urandom_range(0,1) == 1, 63'h0};
            default: return {$urandom_range(0,1) == 1, 11'h0, 20'($urandom()), $urandom() | 1};
          endcase
      11: begin                                        // branch boundaries +-2 ulp
            logic [63:0] b;
            case ($urandom_range(0, 3))
              0: b = {1'b0, 11'(1023 - 9), 52'h0};      // 2^-9: direct / reconstruction
              1: b = {1'b0, 11'(1023 + 9), 52'h0};      // 512: 1/x crosses 2^-9
              2: b = {1'b0, 11'(1023), 52'h0};          // 1: |x| > 1 branch
              default: b = {1'b0, 11'(1023 - 1), 52'h0};
            endcase
            b = b + 64'($urandom_range(0, 4)) - 64'd2;
            b[63] = $urandom_range(0, 1) == 1;
            return b;
          end
      default: return {1'b0, 11'(1023 - 9), 52'($urandom())}; // just above 2^-9
    endcase
  endfunction

  function automatic longint ulp_dist(logic [63:0] a, logic [63:0] b);
    longint ia, ib;
    ia = a[63] ? -longint'(a[62:0]) : longint'(a[62:0]);
    ib = b[63] ? -longint'(b[62:0]) : longint'(b[62:0]);
    return ia > ib ? ia - ib : ib - ia;
  endfunction

  // classify and compare one result
  task automatic check(logic [63:0] xi, logic [63:0] yo);
    logic [63:0] ref_y;
    longint d;
    logic [10:0] e;
    e = xi[62:52];
    checks++;
    if (xi[63]) n_neg++;
    if (e == 11'h7ff && xi[51:0] != 0) begin
      n_nan++;
      if (!(yo[62:51] == 12'hfff)) begin failures++; $display("NaN in, got %h", yo); end
      return;
    end
    if (e == 11'h7ff) n_inf++;
    else if (e == 0 && xi[51:0] == 0) n_zero++;
    else if (e == 0) n_sub++;
    else if (e > 1023 && e < 1023 + 9) n_big_recon++;
    else if (e > 1023) n_big_direct++;
    else if (e == 1023 && xi[51:0] != 0) n_big_recon++;
    else if (e < 1023 - 9) n_direct++;
    else n_recon++;
    ref_y = $realtobits($atan($bitstoreal(xi)));
    if (e == 0) ref_y = xi;           // atan(x) rounds to x for subnormal x
    d = ulp_dist(ref_y, yo);
    if (d > longint'(max_ulp)) max_ulp = int'(d);
    if (d > MAX_ULP) begin
      failures++;
      if (failures < 20) $display("MISMATCH x=%h got=%h ref=%h (%0d ulp)", xi, yo, ref_y, d);
    end
  endtask

  // monitor: results in order, each LATENCY cycles after its operand
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [63:0] xi;
      longint t;
      xi = q_x.pop_front();
      t  = q_t.pop_front();
      checks++;
      if (cycle - t != LATENCY) begin
        failures++;
        $display("latency %0d, expected %0d", cycle - t, LATENCY);
      end
      check(xi, y);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      x        <= stimulus(i);
      in_valid <= ($urandom_range(0, 7) != 0);    // occasional bubbles
      @(posedge clk);
      if (in_valid) begin q_x.push_back(x); q_t.push_back(cycle); end
    end
    in_valid <= 0;
    repeat (LATENCY + 5) @(posedge clk);
    if (q_x.size() != 0) begin failures++; $display("%0d results missing", q_x.size()); end
    $display("paths: direct=%0d recon=%0d big_recon=%0d big_direct=%0d neg=%0d nan=%0d inf=%0d zero=%0d sub=%0d max_ulp=%0d",
             n_direct, n_recon, n_big_recon, n_big_direct, n_neg, n_nan, n_inf, n_zero, n_sub, max_ulp);
    if (n_direct == 0 || n_recon == 0 || n_big_recon == 0 || n_big_direct == 0 || n_neg == 0 ||
        n_nan == 0 || n_inf == 0 || n_zero == 0 || n_sub == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
