// phase_shifter: interleaves the phases of the DPWM. A divider turns the
// carrier period P (FSW clocks for a sawtooth, 2*FSW for a triangle) and the
// number of phases n = PHN+1 into up to three start offsets P*k/n, k = 1..3:
// for four phases by shifting (P/4, P/2, P/4*3), for three phases by a true
// division, for two by one shift. A delay circuit then counts clocks from the
// (re)start and releases the carrier of phase k+1 (run[k] = 1) when the count
// reaches its offset; phase 1 runs at once. Each released carrier then runs
// freely, so phase k+1 lags phase 1 by P*k/n clocks, i.e. 360/n degrees.
// With phsh = 0 all phases in use start together (no interleaving). Phases
// beyond n never run. restart (or reset) clears every run flag and starts the
// sequence again, which is how a change of FSW, PHN, PHSH or carrier type is
// applied. The divider/delay split follows the phase-shifter circuit of the
// DPWM; the restart input is this design's choice. offset[0] is always 0
// (phase 1 is the reference); it is kept as an output so the offset array
// indexes the same way as the phases.
module phase_shifter
  import vrm_pkg::*;
#(
  parameter int unsigned PHASES = NPH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic              phsh,
  input  logic [2:0]        phn,
  input  logic              syms,
  input  word_t             nmax,
  output logic [PHASES-1:0] run,
  output logic [W:0]        offset [PHASES]   // start offset of each phase
);
  logic [W:0] per;          // carrier period in clocks, up to 2*4095
  logic [W:0] cnt;          // delay-circuit counter
  logic [2:0] nph;          // phases in use, 1..PHASES
  word_t      n;

  assign n   = (nmax < 12'd2) ? 12'd2 : nmax;
  assign per = syms ? {1'b0, n} : {n, 1'b0};
  assign nph = (phn >= 3'(PHASES - 1)) ? 3'(PHASES) : phn + 3'd1;

  // Divider: offsets P*k/n
  always_comb begin
    for (int k = 0; k < PHASES; k++) begin
      offset[k] = '0;
      if (phsh && k < int'(nph)) begin
        unique case (nph)
          3'd2:    offset[k] = (k == 1) ? per >> 1 : '0;
          3'd3:    offset[k] = (W+1)'(({2'b00, per} * (W+3)'(k)) / (W+3)'(3));
          3'd4:    offset[k] = (W+1)'((per >> 2) * (W+1)'(k));
          default: offset[k] = '0;
        endcase
      end
    end
  end

  // Delay circuit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      run <= '0;
    end else if (restart) begin
      cnt <= '0;
      run <= '0;
    end else begin
      if (!(&run)) cnt <= cnt + 1'b1;
      for (int k = 0; k < PHASES; k++)
        if (k < int'(nph) && cnt == offset[k]) run[k] <= 1'b1;
    end
  end
endmodule
