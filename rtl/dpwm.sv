// dpwm: interleaved multiphase digital PWM generator (counter-comparator
// type). Per phase it has a carrier generator (triangle or sawtooth, chosen by
// SYMS), a comparator with dead-time generator and a latched duty command;
// a shared phase shifter releases the phase carriers P*k/n clocks apart.
// Up to four complementary pairs PHn / PHnC are produced.
//
// Programmable as in the DPWM pin list: en (the RST pin, 0 disables the
// outputs), syms (0 symmetric triangle, 1 asymmetric sawtooth), phsh (phase
// shift on/off), phn (phases in use minus one), fsw (carrier count N; the
// switching period is 2N clocks for a triangle and N for a sawtooth), dt
// (dead-time in clocks) and vcmd (duty command). One duty command per phase
// is taken, so that the current loop of every phase sets its own duty.
// saw_down selects a decreasing instead of an increasing sawtooth, and
// restart re-applies changed timing settings by restarting the carriers.
// The carriers and latched references are brought out for the synchronous
// sampling generator. Outputs lag the carrier by one clock.
module dpwm
  import vrm_pkg::*;
#(
  parameter int unsigned PHASES = NPH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              restart,
  input  logic              syms,
  input  logic              saw_down,
  input  logic              phsh,
  input  logic [2:0]        phn,
  input  word_t             fsw,
  input  logic [DTW-1:0]    dt,
  input  word_t             vcmd  [PHASES],
  output logic [PHASES-1:0] ph,
  output logic [PHASES-1:0] phc,
  output word_t             cnt   [PHASES],
  output word_t             ref_q [PHASES],
  output logic [PHASES-1:0] run,
  output logic [PHASES-1:0] period_start
);
  logic [W:0]        offset [PHASES];
  logic [PHASES-1:0] peak;

  phase_shifter #(.PHASES(PHASES)) u_shift (
    .clk, .rst_n, .restart, .phsh, .phn, .syms, .nmax(fsw), .run, .offset
  );

  for (genvar k = 0; k < PHASES; k++) begin : g_ph
    carrier_gen u_car (
      .clk, .rst_n, .run(run[k]), .syms, .saw_down, .nmax(fsw),
      .cnt(cnt[k]), .period_start(period_start[k]), .peak(peak[k])
    );
    pwm_deadtime u_dt (
      .clk, .rst_n, .en(en && run[k]), .syms, .nmax(fsw), .cnt(cnt[k]),
      .period_start(period_start[k] && run[k]), .vcmd(vcmd[k]), .dt,
      .ref_q(ref_q[k]), .ph(ph[k]), .phc(phc[k])
    );
  end

  // Offsets and peaks are used inside the shifter and by the sampler.
  logic unused_ok;
  assign unused_ok = ^peak ^ ^offset[0];
endmodule
