// tb_phase_shifter: checks the divider offsets P*k/n and the release times of
// the phase carriers for n = 1..4 phases, triangle and sawtooth periods, with
// and without phase shift, and at the full-size setting (FSW = 500, triangle,
// 4 phases: releases at 0, 250, 500, 750 clocks). Phases beyond n must never
// run; restart must clear and re-run the sequence.
module tb_phase_shifter;
  import vrm_pkg::*;
  logic       clk = 0, rst_n = 0, restart = 0, phsh = 1, syms = 0;
  logic [2:0] phn = 3;
  word_t      nmax = 12'd500;
  logic [3:0] run;
  logic [W:0] offset [4];
  int checks = 0, failures = 0;

  phase_shifter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic trial(input bit sh, input bit asym, input int n, input int fsw);
    int per, exp_t [4], seen [4];
    @(negedge clk); phsh = sh; syms = asym; phn = 3'(n - 1); nmax = 12'(fsw); restart = 1;
    @(negedge clk); restart = 0;
    per = asym ? fsw : 2 * fsw;
    for (int k = 0; k < 4; k++) begin
      exp_t[k] = (k >= n) ? -1 : (!sh) ? 0 : (per * k) / n;
      if (sh && n == 4) exp_t[k] = (per / 4) * k;
      seen[k] = -1;
    end
    // time t = number of edges after restart was released; run[k] rises on edge t = offset+1
    for (int t = 1; t <= per + 5; t++) begin
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) if (run[k] && seen[k] < 0) seen[k] = t - 1;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] != exp_t[k]) begin
        failures++;
        $display("FAIL sh=%0b asym=%0b n=%0d fsw=%0d phase %0d released at %0d exp %0d",
                 sh, asym, n, fsw, k, seen[k], exp_t[k]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    trial(1, 0, 4, 500);
    trial(1, 1, 4, 500);
    trial(1, 0, 3, 500);
    trial(1, 1, 3, 100);
    trial(1, 0, 2, 333);
    trial(1, 0, 1, 100);
    trial(0, 0, 4, 100);
    for (int i = 0; i < 20; i++)
      trial(1'($urandom), 1'($urandom), $urandom_range(1, 4), $urandom_range(2, 300));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
