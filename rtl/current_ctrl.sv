// current_ctrl: deadbeat current loop of one phase with load-current
// feed-forward. The voltage compensator output v_com and the predicted current
// demand i_dem are added to form the phase current command; the command is
// limited to IL_lmt, the averaged inductor current sample i_L is subtracted,
// and the error is multiplied by the deadbeat gain Kc (~ L/T). An output
// voltage feed-forward term, Kvf * v_o, is added after the current gain and
// the sum is limited to [0, D_lmt] to give the duty command S_o for the DPWM.
//
// One adder and one multiplier, scheduled by an FSM:
//   S1  icmd <= v_com + (ff_en ? i_dem : 0)
//   S2  err  <= min(icmd, IL_lmt) - i_L ;  m <= Kvf * v_o
//   S3  acc  <= m ;                        m <= Kc * err
//   S4  so   <= lim(acc + m, 0, D_lmt) ; done
// so so is updated 4 clocks after start. Products go through mul_q (Q10 in,
// integer out, saturated to 14 bits signed). The signals, gains and limiters
// are those of the controller's pin list; the schedule, the per-phase scale of
// i_dem and the gain on the voltage feed-forward are this design's choice.
module current_ctrl
  import vrm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  ff_en,
  input  word_t vcom,      // voltage loop output
  input  word_t idem,      // current demand feed-forward (per-phase scale)
  input  word_t il,        // inductor current sample
  input  word_t vo,        // output voltage sample
  input  word_t kc,        // current loop gain, Q10
  input  word_t kvf,       // voltage feed-forward gain, Q10
  input  word_t il_lmt,    // current command limiter
  input  word_t d_lmt,     // duty limiter
  output word_t so,        // duty command
  output logic  done,
  output logic  ilim_hit,  // current command was limited in the last update
  output logic  dlim_hit   // duty was limited in the last update
);
  typedef enum logic [2:0] {IDLE, S1, S2, S3, S4} state_e;
  state_e state;

  localparam int unsigned MO = W + 2;          // 14-bit signed products

  logic [W:0]            icmd;                 // 13-bit unsigned sum
  logic signed [W+1:0]   err;                  // 14-bit signed
  logic signed [MO-1:0]  m, acc;
  logic signed [W+1:0]   mul_b;
  word_t                 mul_a;
  logic signed [MO-1:0]  mul_y;
  logic                  mul_sat;
  logic [W:0]            icmd_l;

  // The one multiplier
  mul_q #(.WA(W + 1), .WB(W + 2), .QF(Q), .WO(MO)) u_mul (
    .a   ($signed({1'b0, mul_a})),
    .b   (mul_b),
    .y   (mul_y),
    .sat (mul_sat)
  );

  always_comb begin
    if (state == S2) begin
      mul_a = kvf;
      mul_b = $signed({2'b00, vo});
    end else begin
      mul_a = kc;
      mul_b = err;
    end
    icmd_l = (icmd > {1'b0, il_lmt}) ? {1'b0, il_lmt} : icmd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      icmd <= '0; err <= '0; m <= '0; acc <= '0;
      so <= '0; done <= 1'b0; ilim_hit <= 1'b0; dlim_hit <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) state <= S1;
        S1: begin
          icmd  <= {1'b0, vcom} + (ff_en ? {1'b0, idem} : '0);
          state <= S2;
        end
        S2: begin
          ilim_hit <= (icmd > {1'b0, il_lmt});
          err      <= $signed({1'b0, icmd_l}) - $signed({2'b00, il});
          m        <= mul_y;
          state    <= S3;
        end
        S3: begin
          acc   <= m;
          m     <= mul_y;
          state <= S4;
        end
        S4: begin
          so       <= clamp_u(32'(acc) + 32'(m), d_lmt);
          dlim_hit <= (32'(acc) + 32'(m) > $signed({20'd0, d_lmt})) ||
                      (32'(acc) + 32'(m) < 0);
          done     <= 1'b1;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // mul_sat is informative only: the saturated product is used as is.
  logic unused_ok;
  assign unused_ok = mul_sat;
endmodule
