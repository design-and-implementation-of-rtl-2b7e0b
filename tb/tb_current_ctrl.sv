// tb_current_ctrl: checks the deadbeat current loop of one phase against an
// integer model: icmd = vcom + (ff_en ? idem : 0), err = min(icmd, IL_lmt) -
// il, duty = lim(sat14(floor(Kvf*vo/2^10)) + sat14(floor(Kc*err/2^10)), 0,
// D_lmt), with the limiter flags. Checks the 4-clock latency, the effect of
// switching the current-demand feed-forward, and both limiters.
module tb_current_ctrl;
  import vrm_pkg::*;
  logic  clk = 0, rst_n = 0, start = 0, ff_en = 1;
  word_t vcom, idem, il, vo, kc, kvf, il_lmt, d_lmt, so;
  logic  done, ilim_hit, dlim_hit;
  int checks = 0, failures = 0, n_il = 0, n_dl = 0, n_ff = 0;

  current_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat14(input longint v);
    return (v > 8191) ? 8191 : (v < -8192) ? -8192 : v;
  endfunction

  task automatic run();
    longint icmd, err, s, ey;
    bit eil, edl;
    int lat;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    icmd = longint'(vcom) + (ff_en ? longint'(idem) : 0);
    eil  = icmd > longint'(il_lmt);
    err  = (eil ? longint'(il_lmt) : icmd) - longint'(il);
    s    = sat14((longint'(kvf) * longint'(vo)) >>> 10) + sat14((longint'(kc) * err) >>> 10);
    edl  = (s < 0) || (s > longint'(d_lmt));
    ey   = (s < 0) ? 0 : (s > longint'(d_lmt)) ? longint'(d_lmt) : s;
    n_il += int'(eil); n_dl += int'(edl);
    checks++;
    if (longint'(so) != ey || lat != 5 || ilim_hit != eil || dlim_hit != edl) begin
      failures++;
      $display("FAIL so=%0d exp %0d lat=%0d flags=%0b%0b exp %0b%0b", so, ey, lat,
               ilim_hit, dlim_hit, eil, edl);
    end
  endtask

  initial begin
    word_t so_off;
    kc = 12'd2048; kvf = 12'd256; il_lmt = 12'd3000; d_lmt = 12'd900;
    vcom = 12'd400; idem = 12'd200; il = 12'd450; vo = 12'd1638;
    repeat (3) @(posedge clk); rst_n = 1;
    ff_en = 0; run(); so_off = so;
    ff_en = 1; run();
    checks++;
    if (so <= so_off) begin failures++; $display("FAIL feed-forward did not raise duty"); end
    else n_ff++;
    vcom = 12'd2900; idem = 12'd500; run();            // current limiter
    vcom = 12'd0; idem = 12'd0; il = 12'd2000; run();  // duty below 0
    for (int i = 0; i < 400; i++) begin
      vcom = 12'($urandom_range(0, 2047)); idem = 12'($urandom_range(0, 2047));
      il = 12'($urandom); vo = 12'($urandom); kc = 12'($urandom); kvf = 12'($urandom);
      il_lmt = 12'($urandom); d_lmt = 12'($urandom); ff_en = 1'($urandom);
      run();
    end
    checks++;
    if (n_il == 0 || n_dl == 0 || n_ff == 0) begin failures++; $display("FAIL mechanism missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
