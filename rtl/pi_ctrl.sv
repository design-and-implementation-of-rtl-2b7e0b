// pi_ctrl: voltage-loop PI compensator, G(z) = Kvp + Kvi/(1 - z^-1), in the
// backward-difference form. The error e = cmd - fb goes to a proportional
// branch and to an integrator made of Kvi, an adder, a limiter and a unit
// delay; the two branches are added and limited to the 12-bit output word.
//
// One adder and one multiplier are shared under a small FSM (idle, S1..S5):
//   idle  wait while cs_n = 1
//   S1    e    <= cmd - fb                         (adder)
//   S2    p    <= Kvi * e                          (multiplier)
//   S3    vi   <= lim(vi + p) ; p <= Kvp * e       (adder, multiplier)
//   S4    y    <= lim((vi + p) >> Q) ; done pulse  (adder)
//   S5    wait while cs_n = 0, then back to idle
// The state names, the cs self-loops on idle and S5 and the one-adder /
// one-multiplier budget follow the controller description; the exact work done
// in each state is this design's choice. y changes 4 clocks after the edge that
// sees cs_n low, together with a one-clock done pulse.
//
// Gains are unsigned Q10 (0..4). The integrator keeps the Q10 product, so no
// fraction is lost between samples, and is limited to the output range
// [0, 4095] (in Q10) as anti-windup. The output is unsigned 0..4095.
module pi_ctrl
  import vrm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cs_n,      // start, active low; hold low at most until done
  input  word_t kp,        // Kvp, Q10
  input  word_t ki,        // Kvi, Q10
  input  word_t cmd,       // voltage command v*
  input  word_t fb,        // output voltage feedback v_o
  output word_t y,         // v_com
  output logic  done,
  output logic  int_sat,   // integrator limiter engaged on the last update
  output logic  out_sat    // output limiter engaged on the last update
);
  typedef enum logic [2:0] {IDLE, S1, S2, S3, S4, S5} state_e;
  state_e state;

  localparam int unsigned IW = W + Q + 2;                 // integrator, signed
  localparam logic signed [IW-1:0] VI_MAX = IW'({W{1'b1}}) <<< Q | IW'((1 << Q) - 1);

  logic signed [W:0]      e;       // 13-bit signed error
  logic signed [2*W+1:0]  p;       // 13 x 13 product, Q10
  logic signed [IW-1:0]   vi;      // integrator, Q10
  logic signed [2*W+3:0]  sum;     // shared adder output

  // The one adder: operands selected by state.
  always_comb begin
    unique case (state)
      S1:      sum = (2*W+4)'($signed({1'b0, cmd})) - (2*W+4)'($signed({1'b0, fb}));
      default: sum = (2*W+4)'(vi) + (2*W+4)'(p);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      e       <= '0;
      p       <= '0;
      vi      <= '0;
      y       <= '0;
      done    <= 1'b0;
      int_sat <= 1'b0;
      out_sat <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (!cs_n) state <= S1;
        S1: begin
          e     <= sum[W:0];
          state <= S2;
        end
        S2: begin
          p     <= $signed({1'b0, ki}) * e;
          state <= S3;
        end
        S3: begin
          if (sum > (2*W+4)'(VI_MAX)) begin
            vi <= VI_MAX; int_sat <= 1'b1;
          end else if (sum < 0) begin
            vi <= '0;     int_sat <= 1'b1;
          end else begin
            vi <= sum[IW-1:0]; int_sat <= 1'b0;
          end
          p     <= $signed({1'b0, kp}) * e;
          state <= S4;
        end
        S4: begin
          if (sum > (2*W+4)'(VI_MAX)) begin
            y <= '1; out_sat <= 1'b1;
          end else if (sum < 0) begin
            y <= '0; out_sat <= 1'b1;
          end else begin
            y <= sum[Q+W-1:Q]; out_sat <= 1'b0;
          end
          done  <= 1'b1;
          state <= S5;
        end
        S5: if (cs_n) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
