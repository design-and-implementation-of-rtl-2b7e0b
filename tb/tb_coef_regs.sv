// tb_coef_regs: writes every register through the serial port (SCLK at 1/8
// of clk) and checks its output, the reset values, the write strobe and its
// timing (3 clocks after SELECT falls), and that a read frame (R/W = 1), a
// short frame and a long frame leave the registers unchanged.
module tb_coef_regs;
  import vrm_pkg::*;
  logic  clk = 0, rst_n = 0, rw_n = 1, select = 0, sclk = 0, sdata = 0;
  word_t kp, ki, kla, klb, klk, kc, d_lmt, fsw, il_lmt, kvf;
  logic [DTW-1:0] dt;
  set_t  set;
  logic  wr;
  reg_addr_e wr_addr;
  int checks = 0, failures = 0;

  coef_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input bit rd, input int nb, input logic [15:0] bits);
    int lat;
    @(negedge clk); rw_n = rd; select = 1;
    repeat (4) @(negedge clk);
    for (int i = nb - 1; i >= 0; i--) begin
      sdata = (i < 16) ? bits[i] : 1'b0;
      repeat (4) @(negedge clk); sclk = 1;
      repeat (4) @(negedge clk); sclk = 0;
    end
    repeat (4) @(negedge clk); select = 0;
    lat = 0;
    while (!wr && lat < 8) begin @(posedge clk); #1; lat++; end
    checks++;
    if (!rd && nb == 16) begin
      if (lat != 3 || wr_addr != reg_addr_e'(bits[15:12])) begin
        failures++; $display("FAIL write strobe lat=%0d addr=%0d", lat, wr_addr);
      end
    end else if (wr) begin
      failures++; $display("FAIL unexpected write");
    end
    rw_n = 1;
    repeat (4) @(negedge clk);
  endtask

  function automatic logic [W-1:0] rd(input int a);
    case (a)
      0: return kp;   1: return ki;   2: return kla;  3: return klb;
      4: return klk;  5: return kc;   6: return d_lmt; 7: return fsw;
      8: return W'(dt); 9: return set; 10: return il_lmt; 11: return kvf;
      default: return '0;
    endcase
  endfunction

  initial begin
    logic [W-1:0] mirror [12];
    repeat (3) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    // reset values
    checks++;
    if (fsw != 12'd500 || dt != 7'd80 || set != SET_DEFAULT || d_lmt != 12'hfff || kp != 0) begin
      failures++; $display("FAIL reset values");
    end
    for (int a = 0; a < 12; a++) mirror[a] = rd(a);
    for (int r = 0; r < 40; r++) begin
      int a;
      logic [W-1:0] v;
      a = $urandom_range(0, 11); v = 12'($urandom);
      frame(0, 16, {4'(a), v});
      mirror[a] = (a == 8) ? W'(v[DTW-1:0]) : v;
      for (int b = 0; b < 12; b++) begin
        checks++;
        if (rd(b) !== mirror[b]) begin
          failures++; $display("FAIL reg %0d = %h expected %h", b, rd(b), mirror[b]);
        end
      end
    end
    frame(1, 16, {4'd0, 12'h123});   // read frame
    frame(0, 15, {4'd0, 12'h124});   // short frame
    frame(0, 17, {4'd0, 12'h125});   // long frame
    for (int b = 0; b < 12; b++) begin
      checks++;
      if (rd(b) !== mirror[b]) begin failures++; $display("FAIL reg %0d changed", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
