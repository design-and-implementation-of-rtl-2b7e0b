// lead_iir: first-order IIR compensator G(z) = K (z + A) / (z - B) with
// programmable zero A, pole B and gain K, used as a lead stage in series after
// the voltage PI. Difference equation realised:
//   u(n) = x(n) + A x(n-1)
//   y(n) = K u(n) + B y(n-1)
// which is exactly the transfer function above. One multiplier and one adder
// are shared by an FSM:
//   S0  m   <= A * x(n-1)
//   S1  u   <= sat((x << Q) + m) >> Q
//   S2  m   <= K * u
//   S3  acc <= m ; m <= B * y(n-1)
//   S4  y   <= lim((acc + m) >> Q), x(n-1) <= x, y(n-1) <= y ; done
// so y is updated 5 clocks after the start pulse. A and B are signed Q10
// (-2..2), K unsigned Q10 (0..4); x and y are unsigned 12-bit words and y is
// limited to 0..4095. The coefficient formats follow the controller
// description; the state schedule (one state more than a four-state
// multiply-add-add-multiply schedule, so that K multiplies the numerator only)
// and the output limiter are this design's choice.
// With en = 0 the stage is bypassed: y <= x one clock after start, and the
// delay registers still track x so that switching the stage in is smooth.
module lead_iir
  import vrm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  en,
  input  word_t ka,        // A, signed Q10
  input  word_t kb,        // B, signed Q10
  input  word_t kk,        // K, unsigned Q10
  input  word_t x,
  output word_t y,
  output logic  done
);
  typedef enum logic [2:0] {IDLE, S0, S1, S2, S3, S4} state_e;
  state_e state;

  localparam int unsigned MW = 2*W + 2;        // 13 x 15 product fits in 28
  logic signed [MW+1:0] m, acc;
  logic signed [W+2:0]  u;                     // 15-bit signed
  word_t                x1, y1, xs;
  logic signed [MW+3:0] sum;
  logic signed [MW+3:0] us;

  always_comb begin
    us  = ((MW+4)'($signed({1'b0, xs})) <<< Q) + (MW+4)'(m);
    sum = (MW+4)'(acc) + (MW+4)'(m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      m <= '0; acc <= '0; u <= '0;
      x1 <= '0; y1 <= '0; xs <= '0;
      y <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          xs <= x;
          if (en) state <= S0;
          else begin
            y <= x; x1 <= x; y1 <= x; done <= 1'b1;
          end
        end
        S0: begin
          m     <= (MW+2)'($signed(ka) * $signed({1'b0, x1}));
          state <= S1;
        end
        S1: begin
          // u is kept to 15 bits signed: |u| < 3 * 4096
          if ((us >>> Q) > 16383)       u <= 15'sd16383;
          else if ((us >>> Q) < -16384) u <= -15'sd16384;
          else                          u <= (W+3)'(us >>> Q);
          state <= S2;
        end
        S2: begin
          m     <= (MW+2)'($signed({1'b0, kk}) * u);
          state <= S3;
        end
        S3: begin
          acc   <= m;
          m     <= (MW+2)'($signed(kb) * $signed({1'b0, y1}));
          state <= S4;
        end
        S4: begin
          y  <= clamp_u(32'(sum >>> Q), '1);
          y1 <= clamp_u(32'(sum >>> Q), '1);
          x1 <= xs;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
