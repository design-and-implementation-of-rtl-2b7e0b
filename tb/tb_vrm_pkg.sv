// tb_vrm_pkg: checks the shared definitions of the VRM controller package:
// the clamp function used by every controller output (negative values to 0,
// values above the limit to the limit, the rest unchanged), the bit positions
// of the SET mode word, the register address map and the reset defaults
// (200 kHz triangle at 200 MHz, 0.4 us dead-time). Expected values are
// written out independently here. A watchdog ends the run if it hangs.
module tb_vrm_pkg;
  import vrm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_t s;
    logic [11:0] raw;
    int v, hi, e;
    // clamp_u against a plain integer model
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk);
      v  = int'($urandom_range(0, 40000)) - 20000;
      hi = int'($urandom_range(0, 4095));
      if (i % 7 == 0) v = hi + (i % 3) - 1;      // around the limit
      if (i % 11 == 0) v = (i % 2 != 0) ? 0 : -1;    // around zero
      e = (v < 0) ? 0 : (v > hi) ? hi : v;
      chk(clamp_u(v, word_t'(hi)) == word_t'(e), $sformatf("clamp_u(%0d,%0d)", v, hi));
    end
    chk(clamp_u(32'sh7fffffff, 12'd4095) == 12'd4095, "clamp_u max int");
    chk(clamp_u(-32'sh7fffffff, 12'd100) == 12'd0, "clamp_u min int");
    // SET bit positions, one field at a time
    s = '0; s.pwm_en = 1;   chk(12'(s) == 12'h001, "pwm_en bit 0");
    s = '0; s.syms = 1;     chk(12'(s) == 12'h002, "syms bit 1");
    s = '0; s.phsh = 1;     chk(12'(s) == 12'h004, "phsh bit 2");
    s = '0; s.phn = 3'd7;   chk(12'(s) == 12'h038, "phn bits 5:3");
    s = '0; s.act = 1;      chk(12'(s) == 12'h040, "act bit 6");
    s = '0; s.samp = 2'd3;  chk(12'(s) == 12'h180, "samp bits 8:7");
    s = '0; s.saw_down = 1; chk(12'(s) == 12'h200, "saw_down bit 9");
    s = '0; s.lead_en = 1;  chk(12'(s) == 12'h400, "lead_en bit 10");
    s = '0; s.ff_en = 1;    chk(12'(s) == 12'h800, "ff_en bit 11");
    raw = 12'(SET_DEFAULT);
    chk(raw == 12'b1001_1101_1101, $sformatf("SET_DEFAULT %h", raw));
    // register map
    chk(REG_KP == 0 && REG_KI == 1 && REG_KLA == 2 && REG_KLB == 3, "addr 0-3");
    chk(REG_KLK == 4 && REG_CKI == 5 && REG_CKD == 6 && REG_FS == 7, "addr 4-7");
    chk(REG_DT == 8 && REG_SET == 9 && REG_ILLMT == 10 && REG_KVF == 11, "addr 8-11");
    // widths and defaults
    chk(W == 12 && Q == 10 && DTW == 7 && NPH == 4 && $bits(word_t) == 12, "widths");
    chk(200_000_000 / (2 * int'(FSW_DEFAULT)) == 200_000, "FSW_DEFAULT = 200 kHz");
    chk(int'(DT_DEFAULT) * 5 == 400, "DT_DEFAULT = 400 ns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
