// mul_q: signed fixed-point multiplier with radix-point alignment and
// saturation. The full product of a (WA bits) and b (WB bits) is formed, the
// QF fraction bits are dropped by an arithmetic shift, and the rest is
// saturated to a signed WO-bit result; sat flags that the limit was applied.
// This is the multiplier format of the controller's compensators: a 10-bit Q9
// operand times a 14-bit Q0 operand gives 23 significant bits, the 9 fraction
// bits are deleted and the remaining integer part is clipped to a 10-bit
// signed Q0 word. The defaults reproduce exactly that case. Combinational.
module mul_q #(
  parameter int unsigned WA = 10,
  parameter int unsigned WB = 14,
  parameter int unsigned QF = 9,
  parameter int unsigned WO = 10
) (
  input  logic signed [WA-1:0] a,
  input  logic signed [WB-1:0] b,
  output logic signed [WO-1:0] y,
  output logic                 sat
);
  localparam int unsigned WP = WA + WB;

  logic signed [WP-1:0] prod, shifted;
  localparam logic signed [WP-1:0] MAXV = WP'((64'sd1 <<< (WO-1)) - 1);
  localparam logic signed [WP-1:0] MINV = -(WP'(64'sd1 <<< (WO-1)));

  always_comb begin
    prod    = WP'(a) * WP'(b);
    shifted = prod >>> QF;
    sat     = 1'b0;
    if (shifted > MAXV) begin
      y   = MAXV[WO-1:0];
      sat = 1'b1;
    end else if (shifted < MINV) begin
      y   = MINV[WO-1:0];
      sat = 1'b1;
    end else begin
      y = shifted[WO-1:0];
    end
  end
endmodule
