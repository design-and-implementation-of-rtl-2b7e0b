// tb_dpwm: runs the four-phase DPWM at its full-size setting (FSW = 500
// triangle = 200 kHz per phase at a 200 MHz clock, DT = 80 = 0.4 us) and
// checks, from the gate signals alone: the period of every phase (1000
// clocks), the interleaving (PHk rises 250*(k-1) clocks after PH1 with equal
// duty commands), the 16 % duty point at 0.4 us dead-time, each phase's on-time 2(vcmd-DT)-1 with its own command,
// that no pair is ever on together, and the mode switches: sawtooth carrier
// (period FSW), two phases (phases 3, 4 silent, 180 degrees), phase shift
// off (all aligned) and output disable.
module tb_dpwm;
  import vrm_pkg::*;
  localparam int P = 4;
  logic  clk = 0, rst_n = 0, en = 1, restart = 0, syms = 0, saw_down = 0, phsh = 1;
  logic [2:0] phn = 3;
  word_t fsw = 12'd500;
  logic [DTW-1:0] dt = 7'd80;
  word_t vcmd [P];
  logic [P-1:0] ph, phc, run, period_start;
  word_t cnt [P], ref_q [P];
  int checks = 0, failures = 0;
  longint t = 0;

  dpwm dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) t <= t + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (|(ph & phc)) begin failures++; $display("FAIL shoot-through %b %b", ph, phc); end
  end

  // measure first two rising edges and the on-time in between, per phase
  task automatic measure(input int window, output longint r1 [P], output longint r2 [P],
                         output int on [P]);
    logic [P-1:0] last;
    for (int k = 0; k < P; k++) begin r1[k] = -1; r2[k] = -1; on[k] = 0; end
    last = ph;
    for (int i = 0; i < window; i++) begin
      @(posedge clk); #1;
      for (int k = 0; k < P; k++) begin
        if (ph[k] && !last[k]) begin
          if (r1[k] < 0) r1[k] = t; else if (r2[k] < 0) r2[k] = t;
        end
        if (r1[k] >= 0 && r2[k] < 0 && ph[k]) on[k]++;
      end
      last = ph;
    end
  endtask

  task automatic config_(input bit asym, input bit sh, input int nph);
    @(negedge clk); syms = asym; phsh = sh; phn = 3'(nph - 1); restart = 1;
    @(negedge clk); restart = 0;
    repeat (2500) @(negedge clk);      // carriers released, commands latched
  endtask

  initial begin
    longint r1 [P], r2 [P];
    int on [P], per;
    for (int k = 0; k < P; k++) vcmd[k] = 12'd200;
    repeat (3) @(posedge clk); rst_n = 1;

    // 1) full-size 4-phase interleaved, equal commands
    config_(0, 1, 4);
    measure(2600, r1, r2, on);
    for (int k = 0; k < P; k++) begin
      checks++;
      if (r2[k] - r1[k] != 1000 || on[k] != 2 * (200 - 80) - 1 ||
          ((r1[k] - r1[0]) % 1000 + 1000) % 1000 != 250 * k) begin
        failures++;
        $display("FAIL 4ph phase %0d r1=%0d r2=%0d on=%0d lag=%0d", k, r1[k], r2[k], on[k], r1[k] - r1[0]);
      end
    end
    // 1b) the published operating point: 200 kHz, 0.4 us dead-time, about 16 %
    //     duty per phase (Vcmd = 160: on-time 159 of 1000 clocks), 90 degrees apart
    for (int k = 0; k < P; k++) vcmd[k] = 12'd160;
    repeat (2100) @(negedge clk);
    measure(2600, r1, r2, on);
    for (int k = 0; k < P; k++) begin
      checks++;
      if (r2[k] - r1[k] != 1000 || on[k] != 159 ||
          ((r1[k] - r1[0]) % 1000 + 1000) % 1000 != 250 * k) begin
        failures++;
        $display("FAIL 16%% point phase %0d on=%0d lag=%0d", k, on[k], r1[k] - r1[0]);
      end
    end
    // 2) per-phase commands
    vcmd[0] = 12'd150; vcmd[1] = 12'd250; vcmd[2] = 12'd350; vcmd[3] = 12'd450;
    repeat (2100) @(negedge clk);
    measure(2600, r1, r2, on);
    for (int k = 0; k < P; k++) begin
      checks++;
      if (on[k] != 2 * (int'(vcmd[k]) - 80) - 1) begin
        failures++; $display("FAIL per-phase duty %0d on=%0d", k, on[k]);
      end
    end
    for (int k = 0; k < P; k++) vcmd[k] = 12'd200;
    // 3) sawtooth carrier, period FSW
    config_(1, 1, 4);
    measure(1300, r1, r2, on);
    for (int k = 0; k < P; k++) begin
      checks++;
      if (r2[k] - r1[k] != 500 || on[k] != 200 - 80 ||
          ((r1[k] - r1[0]) % 500 + 500) % 500 != 125 * k) begin
        failures++; $display("FAIL saw phase %0d per=%0d on=%0d lag=%0d", k, r2[k] - r1[k], on[k], r1[k] - r1[0]);
      end
    end
    // 4) two phases
    config_(0, 1, 2);
    measure(2600, r1, r2, on);
    checks++;
    if (r1[2] >= 0 || r1[3] >= 0 || ((r1[1] - r1[0]) % 1000 + 1000) % 1000 != 500) begin
      failures++; $display("FAIL 2ph r1=%0d %0d %0d %0d", r1[0], r1[1], r1[2], r1[3]);
    end
    // 5) no phase shift
    config_(0, 0, 4);
    measure(2600, r1, r2, on);
    checks++;
    if (r1[1] != r1[0] || r1[2] != r1[0] || r1[3] != r1[0]) begin
      failures++; $display("FAIL aligned %0d %0d %0d %0d", r1[0], r1[1], r1[2], r1[3]);
    end
    // 6) disable
    en = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (|ph || |phc) begin failures++; $display("FAIL output while disabled"); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
