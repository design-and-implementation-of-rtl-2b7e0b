// sync_sampling: interlaced synchronous sampling signal generator. For every
// phase it triggers the ADC in the middle of the upper switch's on-time and in
// the middle of its off-time, where the inductor current ramp crosses its
// period average and the switching noise of the edges is furthest away.
// The phase carrier is compared with two points:
//   symmetric triangle: valley (cnt = 0) = middle of on-time,
//                       peak   (cnt = N) = middle of off-time;
//   sawtooth:           cnt = REF/2      = middle of on-time,
//                       cnt = (REF+N)/2  = middle of off-time.
// samp selects rising-slope samples (01), falling-slope samples (10) or both
// (11); 00 gives none. Phases beyond phan+1 give none. act sets the polarity
// of the ADC triggers (1 active high). adc_any is the union of all phase
// triggers, active high: the interlaced sampling clock of the controller.
// slope tells which sample a trigger is (1 = rising-slope, on-time). Triggers
// are one-clock pulses registered one clock after the carrier value.
// The sampling points, the pin set and the encodings follow the sampling
// generator's description (syms here is 1 for symmetric, as on its pin list);
// the comparison points of the sawtooth are this design's choice.
module sync_sampling
  import vrm_pkg::*;
#(
  parameter int unsigned PHASES = NPH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              act,
  input  logic [1:0]        phan,
  input  logic              syms,
  input  word_t             fsw,
  input  word_t             ref_in [PHASES],
  input  word_t             cnt    [PHASES],
  input  logic [PHASES-1:0] run,
  input  logic [1:0]        samp,
  output logic [PHASES-1:0] adc,
  output logic [PHASES-1:0] slope,
  output logic              adc_any
);
  word_t             n;
  logic [PHASES-1:0] hit_on, hit_off, pulse;
  logic [W:0]        mid_off [PHASES];
  logic [PHASES-1:0] pulse_q;

  assign n = (fsw < 12'd2) ? 12'd2 : fsw;

  always_comb begin
    for (int k = 0; k < PHASES; k++) begin
      mid_off[k] = ({1'b0, ref_in[k]} + {1'b0, n}) >> 1;
      if (syms) begin
        hit_on[k]  = (cnt[k] == '0);
        hit_off[k] = (cnt[k] == n);
      end else begin
        hit_on[k]  = (cnt[k] == (ref_in[k] >> 1));
        hit_off[k] = ({1'b0, cnt[k]} == mid_off[k]);
      end
      pulse[k] = run[k] && (k <= int'(phan)) &&
                 ((samp[0] && hit_on[k]) || (samp[1] && hit_off[k]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pulse_q <= '0;
      slope   <= '0;
      adc_any <= 1'b0;
    end else begin
      pulse_q <= pulse;
      slope   <= hit_on;
      adc_any <= |pulse;
    end
  end

  assign adc = act ? pulse_q : ~pulse_q;
endmodule
