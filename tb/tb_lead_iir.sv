// tb_lead_iir: runs the first-order IIR stage on a step and on random inputs
// and compares each output with an integer model of
//   u = floor((x*2^10 + A*x1) / 2^10), y = lim(floor((K*u + B*y1) / 2^10)),
// x1, y1 the previous input and output. Checks the 5-clock latency, the
// bypass with en = 0 (output on the clock that takes start) and that the delay registers track x in bypass.
module tb_lead_iir;
  import vrm_pkg::*;
  logic  clk = 0, rst_n = 0, start = 0, en = 1;
  word_t ka, kb, kk, x, y;
  logic  done;
  int checks = 0, failures = 0;
  longint mx1 = 0, my1 = 0;

  lead_iir dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fdiv(input longint v);   // floor(v / 1024)
    return v >>> 10;
  endfunction

  task automatic run(input int xv);
    longint u, ey;
    int lat;
    x = 12'(xv);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    if (en) begin
      u  = fdiv(longint'(xv) * 1024 + longint'($signed(ka)) * mx1);
      if (u > 16383) u = 16383; if (u < -16384) u = -16384;
      ey = fdiv(longint'(kk) * u + longint'($signed(kb)) * my1);
      if (ey < 0) ey = 0; if (ey > 4095) ey = 4095;
    end else ey = xv;
    checks++;
    if (longint'(y) != ey || lat != (en ? 6 : 1)) begin
      failures++;
      $display("FAIL en=%0b x=%0d y=%0d exp %0d lat=%0d", en, xv, y, ey, lat);
    end
    mx1 = xv; my1 = ey;
  endtask

  initial begin
    // lead: zero at -0.5 (A = -0.5 -> z - 0.5), pole at 0.25, K = 1.5
    ka = 12'(-512); kb = 12'd256; kk = 12'd1536; x = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) run(1000);      // step response
    en = 0;
    for (int i = 0; i < 4; i++) run(2000 + i);  // bypass
    en = 1;
    ka = 12'd1024; kb = 12'(-1024); kk = 12'd4095;
    for (int i = 0; i < 300; i++) begin
      if (i == 150) begin ka = 12'($urandom); kb = 12'($urandom); kk = 12'($urandom); end
      run($urandom_range(0, 4095));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
