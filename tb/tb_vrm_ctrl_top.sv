// tb_vrm_ctrl_top: end-to-end test of the VRM controller at its default size
// (four phases, 12-bit data, FSW = 500 triangle = 200 kHz per phase at a
// 200 MHz clock, 0.4 us dead-time). Registers are written through the serial
// port only.
// Part A (exact): ADC results are driven directly. After every voltage sample
// v_com is compared with an integer model of PI (and lead stage, when on);
// after every pair of current samples the phase duty is compared with a model
// of sample averaging and the deadbeat current loop with feed-forward. The
// gate on-time is compared with the duty command, the sawtooth mode and the
// phase-count setting are checked on the gates.
// Part B (closed loop): the controller drives a behavioural four-phase buck
// (5 V to 2 V, 50 nH per phase, 1 mF) through its ADC triggers. The load
// steps from 0.2 A to 50 A at 10 A/us and, 300 us later, back to 0.2 A, once
// with and once without the current-demand feed-forward; the output must
// settle within 2 % of 2 V after each step and the dip with feed-forward must
// not exceed the dip without it. Scales:
// 0..5 V and 0..20 A per phase on 12 bits. Gains: Kvp = 4, Kvi = 0.1,
// Kc = 5/1024 (deadbeat: one duty count moves the phase current by 1 A =
// 205 codes per period), Kvf = 128/1024 (N/V_in in codes, which cancels the
// output voltage from the current loop). This run uses a 40 ns dead-time
// (DT = 8): the proportional current loop can add only about 20 duty counts,
// less than the 80 counts a 0.4 us dead-time takes from the duty.
// Part C repeats the closed loop at 100 kHz per phase (FS = 1000) and a
// 10 A load and requires the mean output within 2 % of 2 V.
// Every mechanism (serial writes, both limiters of each loop, lead stage,
// feed-forward on/off, averaging, both carrier types, phase count, ADC
// triggers, closed-loop load step) is counted and must occur.
module tb_vrm_ctrl_top;
  import vrm_pkg::*;
  localparam int P = 4;
  logic clk = 0, rst_n = 0;
  logic rw_n = 1, select = 0, sclk = 0, sdata = 0;
  word_t cmd, idem;
  word_t fbv, fbv_tb, fbv_pl;
  logic  fbv_valid, fbv_valid_tb = 0, fbv_valid_pl;
  word_t fbc [P], fbc_tb [P], fbc_pl [P];
  logic [P-1:0] fbc_valid, fbc_valid_tb = '0, fbc_valid_pl;
  logic [P-1:0] p, pc, adc, ilim_hit, dlim_hit;
  logic  adc_any, v_sat;
  word_t duty [P], vcom;
  bit    closed = 0;
  real   io = 0.2, vo, il [P];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_wr = 0, n_vsat = 0, n_ilim = 0, n_dlim = 0, n_lead = 0, n_ffoff = 0,
      n_avg = 0, n_saw = 0, n_2ph = 0, n_adc = 0, n_step = 0, n_ontime = 0,
      n_100k = 0;

  vrm_ctrl_top dut (
    .clk, .rst_n, .rw_n, .select, .sclk, .sdata, .cmd, .idem,
    .fbv, .fbv_valid, .fbc, .fbc_valid, .p, .pc, .adc, .adc_any,
    .duty, .vcom, .v_sat, .ilim_hit, .dlim_hit
  );

  buck4_plant plant (
    .clk, .hold(!closed), .p, .pc, .adc, .adc_any, .io, .fbv(fbv_pl), .fbv_valid(fbv_valid_pl),
    .fbc(fbc_pl), .fbc_valid(fbc_valid_pl), .vo, .il
  );

  assign fbv       = closed ? fbv_pl : fbv_tb;
  assign fbv_valid = closed ? fbv_valid_pl : fbv_valid_tb;
  assign fbc       = closed ? fbc_pl : fbc_tb;
  assign fbc_valid = closed ? fbc_valid_pl : fbc_valid_tb;

  always #2.5 clk = ~clk;       // 200 MHz

  initial begin
    repeat (2500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (|(p & pc)) begin failures++; $display("FAIL shoot-through"); end
    if (adc_any) n_adc++;
  end

  // ---------------- host side ----------------
  task automatic wreg(input reg_addr_e a, input logic [11:0] v);
    logic [15:0] bits;
    bits = {a, v};
    @(negedge clk); rw_n = 0; select = 1;
    repeat (4) @(negedge clk);
    for (int i = 15; i >= 0; i--) begin
      sdata = bits[i];
      repeat (4) @(negedge clk); sclk = 1;
      repeat (4) @(negedge clk); sclk = 0;
    end
    repeat (4) @(negedge clk); select = 0;
    repeat (6) @(negedge clk); rw_n = 1;
    n_wr++;
  endtask

  // ---------------- integer model of the control law ----------------
  longint m_vi = 0, m_x1 = 0, m_y1 = 0, m_vcom = 0, m_vo = 0;
  longint m_prev [P];
  bit     m_have [P];
  int     r_kp, r_ki, r_ka, r_kb, r_kk, r_kc, r_kvf, r_illmt, r_dlmt;
  bit     r_lead = 0, r_ff = 1;

  function automatic longint lim(input longint v, input longint lo, input longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic void model_v(input longint c, input longint f);
    longint e, s, y, u;
    e = c - f;
    s = m_vi + longint'(r_ki) * e;
    m_vi = lim(s, 0, 4194303);
    s = m_vi + longint'(r_kp) * e;
    y = (s < 0) ? 0 : (s > 4194303) ? 4095 : s >>> 10;
    if (r_lead) begin
      u = lim((y * 1024 + longint'(r_ka) * m_x1) >>> 10, -16384, 16383);
      m_vcom = lim((longint'(r_kk) * u + longint'(r_kb) * m_y1) >>> 10, 0, 4095);
    end else m_vcom = y;
    m_x1 = y; m_y1 = m_vcom;
    m_vo = f;
  endfunction

  function automatic longint model_i(input int k, input longint smp);
    longint il_, icmd, err, s;
    il_ = m_have[k] ? (m_prev[k] + smp) / 2 : smp;
    m_prev[k] = smp; m_have[k] = 1;
    icmd = m_vcom + (r_ff ? longint'(idem) : 0);
    err  = ((icmd > r_illmt) ? r_illmt : icmd) - il_;
    s    = lim((longint'(r_kvf) * m_vo) >>> 10, -8192, 8191) + lim((longint'(r_kc) * err) >>> 10, -8192, 8191);
    return lim(s, 0, r_dlmt);
  endfunction

  task automatic vsample(input int f);
    @(negedge clk); fbv_tb = 12'(f); fbv_valid_tb = 1;
    @(negedge clk); fbv_valid_tb = 0;
    repeat (14) @(negedge clk);
    model_v(longint'(cmd), f);
    checks++;
    if (longint'(vcom) != m_vcom) begin
      failures++; $display("FAIL vcom=%0d model %0d (fb=%0d)", vcom, m_vcom, f);
    end
    if (v_sat) n_vsat++;
    if (r_lead) n_lead++;
  endtask

  task automatic isample(input int k, input int a, input int b);
    longint e;
    for (int j = 0; j < 2; j++) begin
      @(negedge clk); fbc_tb[k] = 12'(j == 0 ? a : b); fbc_valid_tb[k] = 1;
      @(negedge clk); fbc_valid_tb[k] = 0;
      repeat (8) @(negedge clk);
      e = model_i(k, j == 0 ? a : b);
      checks++;
      if (longint'(duty[k]) != e) begin
        failures++; $display("FAIL phase %0d duty=%0d model %0d", k, duty[k], e);
      end
      if (ilim_hit[k]) n_ilim++;
      if (dlim_hit[k]) n_dlim++;
    end
    if (a != b) n_avg++;
  endtask

  // on-time of phase k over one period, from the gate signal
  task automatic ontime(input int k, input int per, output int on, output int period);
    int cntp;
    logic last;
    on = 0; cntp = 0; period = -1;
    // sample at falling clock edges: find a rising gate edge
    @(negedge clk); while (p[k]) @(negedge clk);
    while (!p[k]) @(negedge clk);
    last = 1'b1;
    while (period < 0 && cntp <= 3 * per) begin
      if (p[k]) on++;
      @(negedge clk); cntp++;
      if (p[k] && !last) period = cntp;
      last = p[k];
    end
  endtask

  function automatic word_t set_word(input bit lead, input bit ff, input bit saw, input int nph,
                                    input bit en = 1'b1);
    set_t s;
    s = SET_DEFAULT;
    s.pwm_en = en;
    s.lead_en = lead; s.ff_en = ff; s.syms = saw; s.phn = 3'(nph - 1);
    return word_t'(s);
  endfunction

  // ---------------- closed-loop run ----------------
  int KP_B = 4095, KI_B = 100, KC_B = 5, KVF_B = 128, DT_B = 8, KVF_C = 250;
  initial begin
    void'($value$plusargs("KP=%d", KP_B)); void'($value$plusargs("KI=%d", KI_B));
    void'($value$plusargs("KC=%d", KC_B)); void'($value$plusargs("KVF=%d", KVF_B));
    void'($value$plusargs("DT=%d", DT_B)); void'($value$plusargs("KVFC=%d", KVF_C));
  end
  task automatic load_step(input bit ff, output real dip, output real vfinal, output real vmax_dev,
                           output real over, output real vrel);
    real t_us, vmin, vmax;
    @(negedge clk); rst_n = 0; closed = 0; io = 0.2;
    repeat (5) @(negedge clk); rst_n = 1;
    wreg(REG_KP, 12'(KP_B)); wreg(REG_KI, 12'(KI_B)); wreg(REG_CKI, 12'(KC_B));
    wreg(REG_KVF, 12'(KVF_B)); wreg(REG_CKD, 12'd480); wreg(REG_DT, 12'(DT_B));
    wreg(REG_SET, set_word(0, ff, 0, 4, 1'b0));
    // gates off until the loops have seen a few samples
    closed = 1;
    repeat (2000) @(negedge clk);
    wreg(REG_SET, set_word(0, ff, 0, 4));
    // settle at light load
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      idem = word_t'($rtoi(io / 4.0 / 20.0 * 4095.0));
    end
    // 0.2 A -> 50 A at 10 A/us
    vmin = vo;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk);
      t_us = i * 0.005;
      io = (t_us < 4.98) ? 0.2 + 10.0 * t_us : 50.0;
      idem = word_t'($rtoi(io / 4.0 / 20.0 * 4095.0));
      if (vo < vmin) vmin = vo;
    end
    dip = 2.0 - vmin;
    // average over the last 10 us
    vfinal = 0.0; vmax_dev = 0.0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      vfinal += vo / 2000.0;
    end
    // release: 50 A -> 0.2 A at the same slew rate, report the overshoot
    vmax = vo;
    for (int i = 0; i < 200000; i++) begin
      @(negedge clk);
      t_us = i * 0.005;
      io = (t_us < 4.98) ? 50.0 - 10.0 * t_us : 0.2;
      idem = word_t'($rtoi(io / 4.0 / 20.0 * 4095.0));
      if (vo > vmax) vmax = vo;
    end
    over = vmax - 2.0;
    vrel = 0.0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      vrel += vo / 2000.0;
    end
    n_step++;
  endtask

  // 100 kHz per phase (FS = 1000): steady regulation at 2 V under a 10 A load.
  // Kc is unchanged (one duty count still moves the current by about 1 A per
  // period, as N and the period both double); Kvf is N/V_in in codes,
  // 1024 * 1000 / 4095 = 250. A larger Kvf makes the output-voltage path a
  // net positive feedback that the clamped voltage loop cannot pull back.
  task automatic run_100k(output real vavg, output real vpp);
    real vmin, vmax;
    @(negedge clk); rst_n = 0; closed = 0; io = 10.0;
    repeat (5) @(negedge clk); rst_n = 1;
    wreg(REG_FS, 12'd1000);
    wreg(REG_KP, 12'(KP_B)); wreg(REG_KI, 12'(KI_B)); wreg(REG_CKI, 12'(KC_B));
    wreg(REG_KVF, 12'(KVF_C)); wreg(REG_CKD, 12'd960); wreg(REG_DT, 12'(DT_B));
    wreg(REG_SET, set_word(0, 1, 0, 4, 1'b0));
    closed = 1;
    idem = word_t'($rtoi(io / 4.0 / 20.0 * 4095.0));
    repeat (2000) @(negedge clk);
    wreg(REG_SET, set_word(0, 1, 0, 4));
    repeat (300000) @(negedge clk);
    vavg = 0.0; vmin = vo; vmax = vo;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      vavg += vo / 20000.0;
      if (vo < vmin) vmin = vo;
      if (vo > vmax) vmax = vo;
    end
    vpp = vmax - vmin;
    n_100k++;
  endtask

  initial begin
    int on, per;
    real dip_ff, dip_noff, vf_ff, vf_noff, dev, v100, r100, ov_ff, ov_noff, vr_ff, vr_noff;
    cmd = 12'd1638;              // 2.0 V on a 0..5 V, 12-bit sense range
    idem = '0;
    fbv_tb = '0;
    for (int k = 0; k < P; k++) begin fbc_tb[k] = '0; m_prev[k] = 0; m_have[k] = 0; end
    repeat (5) @(posedge clk); rst_n = 1;

    // ---------- Part A ----------
    r_kp = 2048; r_ki = 256; r_kc = 2048; r_kvf = 256; r_illmt = 3000; r_dlmt = 450;
    r_ka = -512; r_kb = 256; r_kk = 1536;
    wreg(REG_KP, 12'(r_kp)); wreg(REG_KI, 12'(r_ki)); wreg(REG_CKI, 12'(r_kc));
    wreg(REG_KVF, 12'(r_kvf)); wreg(REG_ILLMT, 12'(r_illmt)); wreg(REG_CKD, 12'(r_dlmt));
    wreg(REG_KLA, 12'(r_ka)); wreg(REG_KLB, 12'(r_kb)); wreg(REG_KLK, 12'(r_kk));
    idem = 12'd600;
    for (int i = 0; i < 40; i++) begin
      vsample((i == 5) ? 4000 : (i == 6) ? 0 : $urandom_range(1400, 1900));
      for (int k = 0; k < P; k++)
        isample(k, $urandom_range(0, 3000), $urandom_range(0, 3000));
      if (i == 20) begin r_lead = 1; wreg(REG_SET, set_word(1, 1, 0, 4)); end
      if (i == 30) begin r_ff = 0; n_ffoff++; wreg(REG_SET, set_word(1, 0, 0, 4)); end
    end
    // gate on-time follows the duty command: on = 2 (duty - DT) - 1 per 1000-clock period
    r_lead = 0; r_ff = 1; wreg(REG_SET, set_word(0, 1, 0, 4));
    vsample(1638);
    isample(0, 1000, 1000);
    repeat (2200) @(negedge clk);
    ontime(0, 1000, on, per);
    checks++;
    if (on != 2 * (int'(duty[0]) - 80) - 1 || per != 1000) begin
      failures++; $display("FAIL on-time %0d period %0d for duty %0d", on, per, duty[0]);
    end else n_ontime++;
    // sawtooth carrier: period FSW = 500
    wreg(REG_SET, set_word(0, 1, 1, 4));
    repeat (2200) @(negedge clk);
    ontime(0, 500, on, per);
    checks++;
    if (on != int'(duty[0]) - 80 || per != 500) begin
      failures++; $display("FAIL sawtooth on-time %0d period %0d", on, per);
    end else n_saw++;
    // two phases: phases 3 and 4 stay off, their ADC triggers too
    wreg(REG_SET, set_word(0, 1, 0, 2));
    repeat (2200) @(negedge clk);
    begin
      bit quiet = 1;
      for (int i = 0; i < 2000; i++) begin
        @(negedge clk);
        if (p[2] || p[3] || pc[2] || pc[3] || adc[2] || adc[3]) quiet = 0;
      end
      checks++;
      if (!quiet) begin failures++; $display("FAIL phases 3/4 active with two phases"); end
      else n_2ph++;
    end

    // ---------- Part B ----------
    load_step(1, dip_ff, vf_ff, dev, ov_ff, vr_ff);
    load_step(0, dip_noff, vf_noff, dev, ov_noff, vr_noff);
    n_ffoff++;
    $display("load step 0.2 A -> 50 A: dip %0.1f mV with feed-forward, %0.1f mV without; final %0.4f V / %0.4f V",
             dip_ff * 1000.0, dip_noff * 1000.0, vf_ff, vf_noff);
    checks++;
    if (vf_ff < 1.96 || vf_ff > 2.04 || vf_noff < 1.96 || vf_noff > 2.04) begin
      failures++; $display("FAIL output not regulated");
    end
    $display("load release 50 A -> 0.2 A: overshoot %0.1f mV with feed-forward, %0.1f mV without; final %0.4f V / %0.4f V",
             ov_ff * 1000.0, ov_noff * 1000.0, vr_ff, vr_noff);
    checks++;
    if (vr_ff < 1.96 || vr_ff > 2.04 || vr_noff < 1.96 || vr_noff > 2.04) begin
      failures++; $display("FAIL output not regulated after the load release");
    end
    checks++;
    if (dip_ff > dip_noff + 0.001) begin failures++; $display("FAIL feed-forward did not reduce the dip"); end

    // ---------- Part C ----------
    run_100k(v100, r100);
    $display("100 kHz per phase, 10 A load: mean %0.4f V, ripple %0.1f mV peak to peak", v100, r100 * 1000.0);
    checks++;
    if (v100 < 1.96 || v100 > 2.04) begin failures++; $display("FAIL output not regulated at 100 kHz"); end

    // ---------- mechanisms ----------
    $display("mechanisms: writes=%0d vsat=%0d ilim=%0d dlim=%0d lead=%0d ffoff=%0d avg=%0d saw=%0d two-phase=%0d adc=%0d steps=%0d ontime=%0d 100k=%0d",
             n_wr, n_vsat, n_ilim, n_dlim, n_lead, n_ffoff, n_avg, n_saw, n_2ph, n_adc, n_step, n_ontime, n_100k);
    checks++;
    if (n_wr == 0 || n_vsat == 0 || n_ilim == 0 || n_dlim == 0 || n_lead == 0 || n_ffoff == 0 ||
        n_avg == 0 || n_saw == 0 || n_2ph == 0 || n_adc == 0 || n_step == 0 || n_ontime == 0 || n_100k == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
