// tb_carrier_gen: checks the carrier sequences against closed-form models
// over several periods: triangle c(k) = k mod 2N folded at N (period 2N),
// rising sawtooth k mod N, falling sawtooth N-1 - (k mod N), k = clock edges
// since run rose. Also checks period_start and peak, the hold while run = 0,
// and the full-size carrier (N = 500, 200 kHz at 200 MHz) period of 1000.
module tb_carrier_gen;
  import vrm_pkg::*;
  logic  clk = 0, rst_n = 0, run = 0, syms = 0, saw_down = 0;
  word_t nmax, cnt;
  logic  period_start, peak;
  int checks = 0, failures = 0;

  carrier_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(input bit asym, input bit down, input int n, input int k);
    int t;
    if (!asym) begin
      t = k % (2 * n);
      return (t <= n) ? t : 2 * n - t;
    end
    return down ? n - 1 - (k % n) : k % n;
  endfunction

  task automatic run_mode(input bit asym, input bit down, input int n, input int periods);
    int per, e, starts;
    @(negedge clk); run = 0; syms = asym; saw_down = down; nmax = 12'(n);
    repeat (3) @(negedge clk);
    checks++;
    if (int'(cnt) != model(asym, down, n, 0)) begin failures++; $display("FAIL hold value"); end
    run = 1;
    per = asym ? n : 2 * n;
    starts = 0;
    for (int k = 1; k <= per * periods; k++) begin
      @(posedge clk); #1;
      e = model(asym, down, n, k);
      checks++;
      if (int'(cnt) != e || period_start != (k % per == 0) || peak != (!asym && e == n)) begin
        failures++;
        $display("FAIL asym=%0b down=%0b n=%0d k=%0d cnt=%0d exp %0d ps=%0b pk=%0b", asym, down, n, k,
                 cnt, e, period_start, peak);
      end
      starts += int'(period_start);
    end
    checks++;
    if (starts != periods) begin failures++; $display("FAIL %0d period starts", starts); end
  endtask

  initial begin
    nmax = 12'd10;
    repeat (3) @(posedge clk); rst_n = 1;
    run_mode(0, 0, 10, 4);
    run_mode(1, 0, 10, 4);
    run_mode(1, 1, 10, 4);
    run_mode(0, 0, 2, 5);
    run_mode(0, 0, 500, 2);
    run_mode(1, 1, 777, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
