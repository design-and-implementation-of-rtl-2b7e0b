// tb_mul_q: checks the Q-format multiplier at its default format (10-bit Q9
// times 14-bit Q0 to a saturated 10-bit Q0 result) against an integer model:
// floor(a*b / 2^9) clipped to [-512, 511]. Directed corner cases (largest
// magnitudes, exact limits, negative rounding) plus 2000 random pairs.
module tb_mul_q;
  logic signed [9:0]  a;
  logic signed [13:0] b;
  logic signed [9:0]  y;
  logic               sat;
  int checks = 0, failures = 0;

  mul_q dut (.a, .b, .y, .sat);

  task automatic check(input int av, input int bv);
    longint full, sh, exp_y;
    bit exp_sat;
    a = 10'(av); b = 14'(bv);
    #1;
    full = longint'(av) * longint'(bv);
    sh   = (full >= 0) ? full / 512 : -((-full + 511) / 512);   // floor
    exp_sat = (sh > 511) || (sh < -512);
    exp_y   = (sh > 511) ? 511 : (sh < -512) ? -512 : sh;
    checks++;
    if (longint'(y) != exp_y || sat != exp_sat) begin
      failures++;
      $display("FAIL a=%0d b=%0d y=%0d sat=%0b expected %0d %0b", av, bv, y, sat, exp_y, exp_sat);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(511, 8191);
    check(-512, -8192);
    check(-512, 8191);
    check(256, 1022);      // 0.5 * 1022 = 511, at the limit
    check(256, 1024);      // 512: saturates
    check(-1, 1);          // -1/512 floors to -1
    check(1, 511);         // 511/512 floors to 0
    check(511, 3);
    for (int i = 0; i < 2000; i++)
      check($signed(10'($urandom)), $signed(14'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
