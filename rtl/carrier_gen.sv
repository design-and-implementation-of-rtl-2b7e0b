// carrier_gen: PWM carrier counter of one phase. With syms = 0 it is a
// symmetric triangular carrier that counts 0, 1, ..., N, N-1, ..., 1 (period
// 2N clocks, used for dual-edge modulation); with syms = 1 it is an asymmetric
// sawtooth of period N clocks that counts up 0..N-1 (saw_down = 0) or down
// N-1..0 (saw_down = 1). N is the programmed carrier count FSW (values below 2
// are treated as 2). The carrier choice, the doubled count of the symmetric
// carrier and the increasing/decreasing sawtooth follow the DPWM description;
// the exact count sequence is this design's choice.
// While run = 0 the counter is held at its period start. period_start is high
// in the clock in which cnt is at the start of a period (triangle valley, or
// the first value of the sawtooth), and peak when a triangle is at N.
module carrier_gen
  import vrm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  input  logic  syms,
  input  logic  saw_down,
  input  word_t nmax,
  output word_t cnt,
  output logic  period_start,
  output logic  peak
);
  word_t n;
  logic  up;          // triangle direction

  assign n = (nmax < 12'd2) ? 12'd2 : nmax;

  function automatic word_t first_value(input logic asym, input logic down, input word_t nn);
    return (asym && down) ? nn - 12'd1 : '0;
  endfunction

  always_comb begin
    period_start = (cnt == first_value(syms, saw_down, n));
    peak         = !syms && (cnt == n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      up  <= 1'b1;
    end else if (!run) begin
      cnt <= first_value(syms, saw_down, n);
      up  <= 1'b1;
    end else if (!syms) begin
      // triangle
      if (up) begin
        if (cnt >= n) begin cnt <= n - 12'd1; up <= 1'b0; end
        else            cnt <= cnt + 12'd1;
        if (cnt == n - 12'd1) up <= 1'b0;
      end else begin
        if (cnt == 12'd1 || cnt == '0) begin cnt <= '0; up <= 1'b1; end
        else                               cnt <= cnt - 12'd1;
      end
    end else if (!saw_down) begin
      cnt <= (cnt >= n - 12'd1) ? '0 : cnt + 12'd1;
    end else begin
      cnt <= (cnt == '0 || cnt > n - 12'd1) ? n - 12'd1 : cnt - 12'd1;
    end
  end
endmodule
