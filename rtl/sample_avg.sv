// sample_avg: averages the two inductor-current samples of a switching period.
// The ADC is triggered in the middle of the on-time (rising slope of i_L) and
// in the middle of the off-time (falling slope); in that both-edges mode each
// new sample is averaged with the one before it, so every output is the mean
// of one rising-slope and one falling-slope sample, i.e. the period's true
// average current. With both = 0 (one sample per period) the sample is passed
// on unchanged. The first sample after reset, or after leaving single mode, is
// passed on as is. out follows one clock after in_valid, with out_valid.
module sample_avg
  import vrm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  both,
  input  logic  in_valid,
  input  word_t in,
  output logic  out_valid,
  output word_t out
);
  word_t prev;
  logic  have_prev;
  logic [W:0] s;

  assign s = {1'b0, prev} + {1'b0, in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0; have_prev <= 1'b0; out <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (!both) have_prev <= 1'b0;
      if (in_valid) begin
        prev      <= in;
        have_prev <= both;
        out       <= (both && have_prev) ? s[W:1] : in;
      end
    end
  end
endmodule
