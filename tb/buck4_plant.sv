// buck4_plant: behavioural model (not synthesizable, real arithmetic) of a
// four-phase synchronous buck power stage with its current and voltage ADCs,
// for closed-loop simulation of the controller. Per clock of period TS it
// integrates each phase inductor, di/dt = (v_sw - v_o - r_L i)/L, with v_sw =
// VIN while the upper switch is on, 0 while the lower one is on and, in the
// dead-time, 0 or VIN through the body diode depending on the current sign;
// and the output capacitor with its ESR, dv_C/dt = (sum i - i_o)/C,
// v_o = v_C + r_C (sum i - i_o). Defaults: 5 V in, 50 nH per phase, 1 mF,
// 1 mOhm ESRs, 200 MHz clock. The ADCs sample on the trigger pulses and
// return 12-bit codes ADC_LAT clocks later with a valid strobe: phase current
// 0..IFS amperes (clipped), output voltage 0..VFS volts, the voltage sampled
// on every phase trigger. The load current io is driven by the testbench;
// hold keeps the stage at rest (no inductor current, v_o = V0).
module buck4_plant #(
  parameter real VIN = 5.0,
  parameter real L   = 50e-9,
  parameter real C   = 1e-3,
  parameter real RL  = 1e-3,
  parameter real RC  = 1e-3,
  parameter real TS  = 5e-9,
  parameter real IFS = 20.0,
  parameter real VFS = 5.0,
  parameter int  ADC_LAT = 20,
  parameter real V0  = 2.0
) (
  input  logic        clk,
  input  logic        hold,      // keep the initial state: no current, v_o = V0
  input  logic [3:0]  p,
  input  logic [3:0]  pc,
  input  logic [3:0]  adc,
  input  logic        adc_any,
  input  real         io,
  output logic [11:0] fbv,
  output logic        fbv_valid,
  output logic [11:0] fbc [4],
  output logic [3:0]  fbc_valid,
  output real         vo,
  output real         il [4]
);
  real vc = 2.0;
  int  cnt_c [4];
  int  cnt_v;
  logic [11:0] code_c [4];
  logic [11:0] code_v;

  function automatic logic [11:0] to_code(input real x, input real fs);
    real c;
    c = x / fs * 4095.0;
    if (c < 0.0) c = 0.0;
    if (c > 4095.0) c = 4095.0;
    return 12'($rtoi(c + 0.5));
  endfunction

  initial begin
    for (int k = 0; k < 4; k++) begin il[k] = 0.0; cnt_c[k] = -1; fbc[k] = '0; end
    cnt_v = -1; vo = 2.0; fbv = '0; fbv_valid = 0; fbc_valid = '0;
  end

  always @(posedge clk) begin
    real itot, vsw;
    itot = 0.0;
    if (hold) begin
      vc = V0;
      for (int k = 0; k < 4; k++) il[k] = 0.0;
    end
    for (int k = 0; k < 4; k++) begin
      if (p[k])                vsw = VIN;
      else if (pc[k])          vsw = 0.0;
      else if (il[k] >= 0.0)   vsw = 0.0;
      else                     vsw = VIN;
      il[k] = il[k] + (vsw - vo - RL * il[k]) * TS / L;
      itot += il[k];
    end
    vc = vc + (itot - io) * TS / C;
    vo = vc + RC * (itot - io);
    // ADCs
    fbc_valid <= '0;
    fbv_valid <= 1'b0;
    for (int k = 0; k < 4; k++) begin
      if (adc[k]) begin code_c[k] = to_code(il[k], IFS); cnt_c[k] = ADC_LAT; end
      else if (cnt_c[k] > 0) cnt_c[k]--;
      else if (cnt_c[k] == 0) begin fbc[k] <= code_c[k]; fbc_valid[k] <= 1'b1; cnt_c[k] = -1; end
    end
    if (adc_any) begin code_v = to_code(vo, VFS); cnt_v = ADC_LAT; end
    else if (cnt_v > 0) cnt_v--;
    else if (cnt_v == 0) begin fbv <= code_v; fbv_valid <= 1'b1; cnt_v = -1; end
  end
endmodule
