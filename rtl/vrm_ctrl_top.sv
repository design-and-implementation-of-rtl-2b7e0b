// vrm_ctrl_top: programmable digital controller for a four-phase interleaved
// synchronous buck voltage regulator module (VRM). It closes two loops:
//   voltage loop  v_com = PI(CMD - FBV), optionally followed by a lead IIR
//                 stage, run once per output-voltage sample;
//   current loop  one deadbeat controller per phase, run once per averaged
//                 phase-current sample: duty = Kc*(min(v_com + i_dem, IL_lmt)
//                 - i_L) + Kvf*FBV, limited to [0, D_lmt];
// and drives an interleaved DPWM whose phase carriers are 360/n degrees apart.
// The sampling generator triggers each phase's current ADC in the middle of
// the on-time and of the off-time, so the two samples average to the true
// period-mean current; the controller of a phase runs as soon as its sample
// arrives and the DPWM latches the new duty at the next carrier period.
//
// Interface: serial coefficient port (rw_n, select, sclk, sdata; see
// coef_regs), voltage command cmd, current demand idem (the per-phase load
// current predicted by the load), ADC results fbv (output voltage) and fbc[k]
// (phase currents) each with a one-clock valid strobe, gate drives p[k]/pc[k]
// and ADC triggers adc[k]. Status outputs show the duty commands, v_com and
// the limiter flags. All 12-bit words are unsigned. Reset is active low and,
// as on the DPWM pin, also holds the gate drives off.
// The block split, the interleaved sampling/control timing and the signal set
// follow the controller's functional block diagram and pin lists; register
// map, strobes and status outputs are this design's own.
module vrm_ctrl_top
  import vrm_pkg::*;
#(
  parameter int unsigned PHASES = NPH
) (
  input  logic              clk,
  input  logic              rst_n,
  // coefficient interface
  input  logic              rw_n,
  input  logic              select,
  input  logic              sclk,
  input  logic              sdata,
  // commands
  input  word_t             cmd,
  input  word_t             idem,
  // ADC results
  input  word_t             fbv,
  input  logic              fbv_valid,
  input  word_t             fbc       [PHASES],
  input  logic [PHASES-1:0] fbc_valid,
  // gate drives and ADC triggers
  output logic [PHASES-1:0] p,
  output logic [PHASES-1:0] pc,
  output logic [PHASES-1:0] adc,
  output logic              adc_any,
  // status
  output word_t             duty      [PHASES],
  output word_t             vcom,
  output logic              v_sat,
  output logic [PHASES-1:0] ilim_hit,
  output logic [PHASES-1:0] dlim_hit
);
  // ---------------- registers ----------------
  word_t          kp, ki, kla, klb, klk, kc, d_lmt, fsw, il_lmt, kvf;
  logic [DTW-1:0] dt;
  set_t           set;
  logic           wr;
  reg_addr_e      wr_addr;

  coef_regs u_regs (
    .clk, .rst_n, .rw_n, .select, .sclk, .sdata,
    .kp, .ki, .kla, .klb, .klk, .kc, .d_lmt, .fsw, .dt, .set, .il_lmt, .kvf,
    .wr, .wr_addr
  );

  // A change of carrier timing restarts the carriers so that the phase
  // offsets are recomputed and re-applied.
  logic [W+5:0] timing_q;
  logic [W+5:0] timing;
  logic         restart;
  assign timing  = {fsw, set.syms, set.saw_down, set.phsh, set.phn};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) timing_q <= {FSW_DEFAULT, SET_DEFAULT.syms, SET_DEFAULT.saw_down,
                             SET_DEFAULT.phsh, SET_DEFAULT.phn};
    else        timing_q <= timing;
  end
  assign restart = (timing != timing_q);

  // ---------------- voltage loop ----------------
  word_t vo_q, pi_y;
  logic  pi_done, pi_isat, pi_osat, lead_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         vo_q <= '0;
    else if (fbv_valid) vo_q <= fbv;
  end

  pi_ctrl u_pi (
    .clk, .rst_n, .cs_n(!fbv_valid), .kp, .ki, .cmd, .fb(fbv),
    .y(pi_y), .done(pi_done), .int_sat(pi_isat), .out_sat(pi_osat)
  );

  lead_iir u_lead (
    .clk, .rst_n, .start(pi_done), .en(set.lead_en),
    .ka(kla), .kb(klb), .kk(klk), .x(pi_y), .y(vcom), .done(lead_done)
  );

  assign v_sat = pi_isat || pi_osat;

  // ---------------- current loop, per phase ----------------
  word_t             il_avg [PHASES];
  logic [PHASES-1:0] il_valid, cc_done;
  logic              both;
  assign both = (set.samp == 2'b11);

  for (genvar k = 0; k < PHASES; k++) begin : g_cur
    sample_avg u_avg (
      .clk, .rst_n, .both, .in_valid(fbc_valid[k]), .in(fbc[k]),
      .out_valid(il_valid[k]), .out(il_avg[k])
    );
    current_ctrl u_cc (
      .clk, .rst_n, .start(il_valid[k]), .ff_en(set.ff_en),
      .vcom, .idem, .il(il_avg[k]), .vo(vo_q), .kc, .kvf, .il_lmt, .d_lmt,
      .so(duty[k]), .done(cc_done[k]),
      .ilim_hit(ilim_hit[k]), .dlim_hit(dlim_hit[k])
    );
  end

  // ---------------- DPWM and synchronous sampling ----------------
  word_t             cnt   [PHASES];
  word_t             ref_q [PHASES];
  logic [PHASES-1:0] run, pstart, slope;

  dpwm #(.PHASES(PHASES)) u_dpwm (
    .clk, .rst_n, .en(set.pwm_en), .restart, .syms(set.syms),
    .saw_down(set.saw_down), .phsh(set.phsh), .phn(set.phn), .fsw, .dt,
    .vcmd(duty), .ph(p), .phc(pc), .cnt, .ref_q, .run, .period_start(pstart)
  );

  sync_sampling #(.PHASES(PHASES)) u_samp (
    .clk, .rst_n, .act(set.act),
    .phan((set.phn > 3'd3) ? 2'd3 : set.phn[1:0]),
    .syms(!set.syms),                 // sampler pin: 1 = symmetric
    .fsw, .ref_in(ref_q), .cnt, .run, .samp(set.samp),
    .adc, .slope, .adc_any
  );

  logic unused_ok;
  assign unused_ok = lead_done ^ (^cc_done) ^ (^pstart) ^ (^slope) ^ wr ^ (^wr_addr);
endmodule
