// tb_pwm_deadtime: drives the comparator/dead-time stage with a model carrier
// (triangle 0..N..1 or rising sawtooth 0..N-1) and checks, per period, the
// on-time of the upper switch, the on-time of the lower switch and every
// both-off gap against closed forms, with t = vcmd - DT:
//   triangle: upper 2t-1, lower 2(N-vcmd)+1, each gap DT clocks (2 per period)
//   sawtooth: upper t, lower N-DT-vcmd, each gap DT clocks (2 per period)
// It also checks that the duty command is taken only at a period start, that
// the two switches are never on together, and that en = 0 turns both off.
module tb_pwm_deadtime;
  import vrm_pkg::*;
  logic  clk = 0, rst_n = 0, en = 1, syms = 0, period_start;
  word_t nmax, cnt, vcmd, ref_q;
  logic [DTW-1:0] dt;
  logic  ph, phc;
  int checks = 0, failures = 0;
  int k = 0;
  bit tb_asym = 0;
  int tb_n = 20;

  pwm_deadtime dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model carrier, advanced at each edge
  function automatic int car(input int kk);
    int t;
    if (tb_asym) return kk % tb_n;
    t = kk % (2 * tb_n);
    return (t <= tb_n) ? t : 2 * tb_n - t;
  endfunction
  always_comb begin
    cnt          = 12'(car(k));
    period_start = (cnt == 0);
  end
  always @(posedge clk) k <= k + 1;

  task automatic measure(input bit asym, input int n, input int v, input int d);
    int per, up, lo, gap, ngap, badgap, t, eu, el;
    @(negedge clk); tb_asym = asym; tb_n = n; nmax = 12'(n); syms = asym; dt = 7'(d); vcmd = 12'(v);
    k = 0;
    per = asym ? n : 2 * n;
    repeat (2 * per + 2) @(negedge clk);      // reference latched, pipeline filled
    // align to a period start as seen at the outputs (one clock later)
    while (!(period_start)) @(negedge clk);
    @(negedge clk);
    up = 0; lo = 0; gap = 0; ngap = 0; badgap = 0;
    for (int i = 0; i < per; i++) begin
      up += int'(ph); lo += int'(phc);
      if (!ph && !phc) gap++;
      else if (gap > 0) begin ngap++; if (gap != d) badgap++; gap = 0; end
      @(negedge clk);
    end
    if (gap > 0) begin ngap++; if (gap != d) badgap++; end
    t = v - d;
    if (!asym) begin eu = 2 * t - 1; el = 2 * (n - v) + 1; end
    else       begin eu = t;         el = n - d - v;       end
    checks++;
    if (up != eu || lo != el || ngap != (d == 0 ? 0 : 2) || badgap != 0 || int'(ref_q) != v) begin
      failures++;
      $display("FAIL asym=%0b n=%0d v=%0d dt=%0d up=%0d/%0d lo=%0d/%0d gaps=%0d bad=%0d",
               asym, n, v, d, up, eu, lo, el, ngap, badgap);
    end
  endtask

  // never both on
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (ph && phc) begin failures++; $display("FAIL shoot-through"); end
  end

  initial begin
    dt = 7'd3; vcmd = 12'd10; nmax = 12'd20;
    repeat (3) @(posedge clk); rst_n = 1;
    measure(0, 20, 10, 3);
    measure(0, 20, 15, 0);
    measure(1, 20, 10, 3);
    measure(1, 40, 25, 5);
    measure(0, 500, 200, 80);     // full size: 200 kHz, 0.4 us dead-time at 200 MHz
    for (int i = 0; i < 30; i++) begin
      int n, d, v;
      n = $urandom_range(20, 200); d = $urandom_range(1, 10);
      v = $urandom_range(d + 2, n - d - 2);
      measure(1'($urandom), n, v, d);
    end
    // the reference is only taken at a period start
    @(negedge clk); tb_asym = 0; tb_n = 50; nmax = 50; syms = 0; vcmd = 12'd20; k = 0;
    repeat (5) @(negedge clk);
    vcmd = 12'd30;
    repeat (3) @(negedge clk);
    checks++;
    if (ref_q != 12'd20) begin failures++; $display("FAIL reference taken mid-period"); end
    // disable
    en = 0; repeat (3) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      checks++;
      if (ph || phc) begin failures++; $display("FAIL output while disabled"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
