// tb_pi_ctrl: drives the FSM-based PI with a sequence of voltage samples and
// compares every output with an independent model of
//   e = cmd - fb, vi = lim(vi + Kvi*e) in Q10 on [0, 4095.999],
//   y = lim((vi + Kvp*e) / 2^10) on [0, 4095].
// It checks the latency (y and done 4 clocks after the edge that samples
// cs_n low), that the FSM waits in its final state while cs_n stays low and
// computes once per request, and that both limiters are exercised.
module tb_pi_ctrl;
  import vrm_pkg::*;
  logic  clk = 0, rst_n = 0, cs_n = 1;
  word_t kp, ki, cmd, fb, y;
  logic  done, int_sat, out_sat;
  int checks = 0, failures = 0;
  longint m_vi = 0;
  int n_isat = 0, n_osat = 0;

  pi_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int c, input int f, input int hold);
    longint e, s, ey;
    int lat;
    bit isat, osat;
    cmd = 12'(c); fb = 12'(f);
    @(negedge clk); cs_n = 0;
    lat = 0;
    do begin @(posedge clk); #1; lat++; if (lat == hold) cs_n = 1; end while (!done && lat < 20);
    // model
    e = longint'(c) - longint'(f);
    s = m_vi + longint'(ki) * e;
    isat = (s < 0) || (s > 64'd4194303);
    m_vi = (s < 0) ? 0 : (s > 64'd4194303) ? 64'd4194303 : s;
    s = m_vi + longint'(kp) * e;
    osat = (s < 0) || (s > 64'd4194303);
    ey = (s < 0) ? 0 : (s > 64'd4194303) ? 4095 : s >>> 10;
    n_isat += int'(isat); n_osat += int'(osat);
    checks++;
    if (longint'(y) != ey || lat != 5 || int_sat != isat || out_sat != osat) begin
      failures++;
      $display("FAIL c=%0d f=%0d y=%0d exp %0d lat=%0d sat=%0b%0b exp %0b%0b",
               c, f, y, ey, lat, int_sat, out_sat, isat, osat);
    end
    // hold low longer: no second computation may start
    if (hold > lat) begin
      repeat (hold - lat) begin
        @(posedge clk); #1;
        checks++;
        if (done) begin failures++; $display("FAIL extra done while cs_n low"); end
      end
      cs_n = 1;
    end
    @(negedge clk); cs_n = 1;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    kp = 12'd2048; ki = 12'd256;   // Kvp = 2, Kvi = 0.25
    cmd = 0; fb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    step(1638, 1500, 1);       // positive error
    step(1638, 1600, 12);      // hold cs_n low for 12 clocks
    step(1638, 1700, 1);       // negative error
    step(1638, 1638, 1);
    step(1000, 3000, 1);       // large negative: limiters at 0
    step(4095, 0, 1);          // large positive: output limiter at 4095
    kp = 12'd1024; ki = 12'd1024;
    for (int i = 0; i < 300; i++) step($urandom_range(0, 4095), $urandom_range(0, 4095), 1);
    checks++;
    if (n_isat == 0 || n_osat == 0) begin
      failures++; $display("FAIL limiters not exercised %0d %0d", n_isat, n_osat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
