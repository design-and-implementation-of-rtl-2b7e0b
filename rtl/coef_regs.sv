// coef_regs: coefficient setting and register interface. A host (a soft
// processor in a typical FPGA system) writes the controller's gains, limits
// and PWM settings over a 4-wire serial port: SELECT frames a transfer, DATA
// is shifted in MSB first on each rising edge of SCLK, and R/W = 0 marks a
// write. A write frame carries 16 bits, a 4-bit register address (see
// vrm_pkg::reg_addr_e) followed by a 12-bit value; the register is written
// when SELECT falls after exactly 16 bits. Frames of another length, and
// frames with R/W = 1, change nothing (this port has no read-back path).
// The serial pins are asynchronous to clk: each passes a two-flop
// synchronizer and SCLK edges are detected in the clk domain, so SCLK must be
// slower than clk/4. A write takes effect on the 3rd clock edge after SELECT falls at the
// pins; wr pulses for one clock with wr_addr then.
// The register names (KP, KI, KLA, KLB, KLK, CKI, CKD, FS, DT, SET) come from
// the controller's block diagram; the serial frame, the address map, the
// extra IL_lmt and Kvf registers and the reset values are this design's own.
module coef_regs
  import vrm_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rw_n,     // 1 read, 0 write
  input  logic          select,
  input  logic          sclk,
  input  logic          sdata,
  output word_t         kp,
  output word_t         ki,
  output word_t         kla,
  output word_t         klb,
  output word_t         klk,
  output word_t         kc,
  output word_t         d_lmt,
  output word_t         fsw,
  output logic [DTW-1:0] dt,
  output set_t          set,
  output word_t         il_lmt,
  output word_t         kvf,
  output logic          wr,
  output reg_addr_e     wr_addr
);
  logic [2:0] sclk_s, sel_s;
  logic [1:0] dat_s, rw_s;
  logic [AW+W-1:0] shreg;
  logic [4:0]      nbits;
  logic            sclk_rise, sel_fall;

  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign sel_fall  = !sel_s[1] && sel_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; sel_s <= '0; dat_s <= '0; rw_s <= '1;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      sel_s  <= {sel_s[1:0], select};
      dat_s  <= {dat_s[0], sdata};
      rw_s   <= {rw_s[0], rw_n};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg   <= '0;
      nbits   <= '0;
      wr      <= 1'b0;
      wr_addr <= REG_KP;
      kp <= '0; ki <= '0; kla <= '0; klb <= '0; klk <= 12'd1024;
      kc <= '0; d_lmt <= '1; fsw <= FSW_DEFAULT; dt <= DTW'(DT_DEFAULT);
      set <= SET_DEFAULT; il_lmt <= '1; kvf <= '0;
    end else begin
      wr <= 1'b0;
      if (sel_s[1] && sclk_rise) begin
        shreg <= {shreg[AW+W-2:0], dat_s[1]};
        if (nbits != 5'd31) nbits <= nbits + 5'd1;
      end
      if (!sel_s[1]) nbits <= '0;
      if (sel_fall && nbits == 5'(AW + W) && !rw_s[1]) begin
        wr      <= 1'b1;
        wr_addr <= reg_addr_e'(shreg[AW+W-1:W]);
        unique case (shreg[AW+W-1:W])
          REG_KP:    kp     <= shreg[W-1:0];
          REG_KI:    ki     <= shreg[W-1:0];
          REG_KLA:   kla    <= shreg[W-1:0];
          REG_KLB:   klb    <= shreg[W-1:0];
          REG_KLK:   klk    <= shreg[W-1:0];
          REG_CKI:   kc     <= shreg[W-1:0];
          REG_CKD:   d_lmt  <= shreg[W-1:0];
          REG_FS:    fsw    <= shreg[W-1:0];
          REG_DT:    dt     <= shreg[DTW-1:0];
          REG_SET:   set    <= set_t'(shreg[W-1:0]);
          REG_ILLMT: il_lmt <= shreg[W-1:0];
          REG_KVF:   kvf    <= shreg[W-1:0];
          default:   ;
        endcase
      end
    end
  end
endmodule
