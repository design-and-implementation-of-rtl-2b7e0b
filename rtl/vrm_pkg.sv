// vrm_pkg: widths, register map and mode word shared by the multiphase VRM
// controller. Every data path is 12 bits wide, matching the 12-bit ADCs and the
// 0..4095 ranges of the controller, DPWM and sampling pins. Gains are unsigned
// Q10 (0..4), lead zero/pole coefficients signed Q10 (-2..2). The register
// addresses and the packing of the mode word (set_t) are this design's own
// choice; the register names follow the controller's block diagram.
package vrm_pkg;

  localparam int unsigned W      = 12;   // data word
  localparam int unsigned Q      = 10;   // fraction bits of gains
  localparam int unsigned DTW    = 7;    // dead-time field, 0..127 clocks
  localparam int unsigned NPH    = 4;    // phase pairs
  localparam int unsigned AW     = 4;    // register address bits

  typedef logic [W-1:0] word_t;

  // Register addresses of the serial coefficient interface.
  typedef enum logic [AW-1:0] {
    REG_KP    = 4'd0,   // voltage loop proportional gain Kvp, Q10
    REG_KI    = 4'd1,   // voltage loop integral gain Kvi, Q10
    REG_KLA   = 4'd2,   // lead zero coefficient A, signed Q10
    REG_KLB   = 4'd3,   // lead pole coefficient B, signed Q10
    REG_KLK   = 4'd4,   // lead gain K, Q10
    REG_CKI   = 4'd5,   // current loop gain Kc, Q10
    REG_CKD   = 4'd6,   // duty limiter D_lmt
    REG_FS    = 4'd7,   // carrier count FSW
    REG_DT    = 4'd8,   // dead-time DT (low 7 bits)
    REG_SET   = 4'd9,   // mode word, set_t
    REG_ILLMT = 4'd10,  // per-phase current command limiter IL_lmt
    REG_KVF   = 4'd11   // output-voltage feed-forward gain, Q10
  } reg_addr_e;

  // Mode word. syms follows the DPWM pin: 0 symmetric (triangle), 1 asymmetric.
  typedef struct packed {
    logic       ff_en;     // 11: current-demand feed-forward enable
    logic       lead_en;   // 10: lead compensator in series after the PI
    logic       saw_down;  // 9 : asymmetric carrier counts down instead of up
    logic [1:0] samp;      // 8:7 sampling: 01 rising, 10 falling, 11 both
    logic       act;       // 6 : ADC trigger polarity, 1 active high
    logic [2:0] phn;       // 5:3 phases in use minus one (clamped to 3)
    logic       phsh;      // 2 : phase shift enable
    logic       syms;      // 1 : 0 symmetric, 1 asymmetric carrier
    logic       pwm_en;    // 0 : PWM output enable
  } set_t;

  localparam set_t SET_DEFAULT = '{ff_en: 1'b1, lead_en: 1'b0, saw_down: 1'b0,
                                   samp: 2'b11, act: 1'b1, phn: 3'd3,
                                   phsh: 1'b1, syms: 1'b0, pwm_en: 1'b1};

  // 200 kHz per phase from a 200 MHz clock with a triangular carrier:
  // period = 2*FSW clocks = 1000. Dead-time 0.4 us = 80 clocks per edge.
  localparam word_t FSW_DEFAULT = 12'd500;
  localparam word_t DT_DEFAULT  = 12'd80;

  // Saturate a signed value to the unsigned range [0, hi].
  function automatic word_t clamp_u(input logic signed [31:0] v, input word_t hi);
    if (v < 0)                       return '0;
    else if (v > $signed({20'd0, hi})) return hi;
    else                             return word_t'(v);
  endfunction

endpackage
