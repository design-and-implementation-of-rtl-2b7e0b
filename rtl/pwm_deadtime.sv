// pwm_deadtime: comparator and dead-time generator of one phase pair.
// The duty command is latched once per carrier period (at period_start), so a
// new controller result never cuts a pulse short. The upper switch is on while
// the carrier is below the reference lowered by the dead-time,
//   ph  = cnt <  vcmd - DT,
// and the lower switch while the carrier is at or above the reference,
//   phc = cnt >= vcmd,
// so every transition has DT clocks with both switches off. On a triangular
// carrier that gives DT clocks at each of the two edges, on a sawtooth DT
// clocks at the comparator edge; at the sawtooth wrap the lower switch is
// also released DT clocks early (cnt >= N - DT) so the wrap edge gets the same
// gap. Lowering the reference instead of lengthening the lower pulse, and DT
// counted in system clocks, follow the DPWM description; the wrap guard and
// ">=" for the lower switch are this design's choice.
// Outputs are registered: they follow the carrier by one clock.
module pwm_deadtime
  import vrm_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           syms,
  input  word_t          nmax,
  input  word_t          cnt,
  input  logic           period_start,
  input  word_t          vcmd,
  input  logic [DTW-1:0] dt,
  output word_t          ref_q,        // latched reference
  output logic           ph,
  output logic           phc
);
  logic signed [W+1:0] thr_hi;
  word_t               n;
  logic                up_on, lo_on;

  assign n      = (nmax < 12'd2) ? 12'd2 : nmax;
  assign thr_hi = $signed({2'b00, ref_q}) - $signed({7'd0, dt});

  always_comb begin
    up_on = $signed({2'b00, cnt}) < thr_hi;
    lo_on = (cnt >= ref_q);
    if (syms && ({1'b0, cnt} + {6'd0, dt} >= {1'b0, n})) lo_on = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q <= '0;
      ph    <= 1'b0;
      phc   <= 1'b0;
    end else begin
      if (period_start) ref_q <= vcmd;
      ph  <= en && up_on;
      phc <= en && lo_on;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(ph && phc))
    else $error("upper and lower switch on together");
endmodule
