// tb_sample_avg: feeds alternating rising/falling-slope current samples and
// checks that in both-edges mode every output is the mean of the last two
// samples (first one passed through), and in single mode the sample itself,
// one clock after in_valid.
module tb_sample_avg;
  import vrm_pkg::*;
  logic  clk = 0, rst_n = 0, both = 1, in_valid = 0, out_valid;
  word_t in, out;
  int checks = 0, failures = 0;
  int prev = -1;

  sample_avg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int v);
    int e;
    @(negedge clk); in = 12'(v); in_valid = 1;
    @(negedge clk); in_valid = 0;
    e = (both && prev >= 0) ? (prev + v) / 2 : v;
    checks++;
    if (!out_valid || int'(out) != e) begin
      failures++; $display("FAIL both=%0b in=%0d out=%0d exp %0d", both, v, out, e);
    end
    prev = both ? v : -1;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid stuck"); end
  endtask

  initial begin
    in = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    put(1200); put(800); put(1210); put(790);   // ripple around 1000
    both = 0; put(1500); put(500);
    both = 1; prev = -1;
    for (int i = 0; i < 300; i++) put($urandom_range(0, 4095));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
