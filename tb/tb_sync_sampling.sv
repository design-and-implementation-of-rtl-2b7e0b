// tb_sync_sampling: drives the sampling generator with four model carriers,
// a quarter period apart, and checks every ADC trigger against the sampling
// points worked out here: triangle valley (mid on-time) and peak (mid
// off-time), sawtooth REF/2 and (REF+N)/2. For each mode it counts triggers
// per phase over whole periods (1 per period for rising or falling sampling,
// 2 for both, 0 for none), checks the carrier value one clock before each
// trigger, the ADC polarity (ACT), the phase count (PHAN) and that adc_any is
// the union of the phase triggers.
module tb_sync_sampling;
  import vrm_pkg::*;
  localparam int P = 4;
  logic clk = 0, rst_n = 0, act = 1, syms = 1;
  logic [1:0] phan = 3, samp = 3;
  word_t fsw = 12'd40;
  word_t ref_in [P], cnt [P];
  logic [P-1:0] run = '1, adc, slope;
  logic adc_any;
  int checks = 0, failures = 0;
  int k = 0;
  word_t cnt_d [P];

  sync_sampling dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int car(input bit tri_, input int n, input int kk);
    int t;
    if (!tri_) return kk % n;
    t = kk % (2 * n);
    return (t <= n) ? t : 2 * n - t;
  endfunction

  always_comb
    for (int p = 0; p < P; p++)
      cnt[p] = 12'(car(syms, int'(fsw), k + (syms ? 2 * int'(fsw) : int'(fsw)) * (P - p) / P));
  always @(posedge clk) begin
    k <= k + 1;
    cnt_d <= cnt;
  end

  task automatic trial(input bit sym, input logic [1:0] sm, input logic [1:0] pn, input bit a, input int n);
    int per, nper, hits [P], exp_hits, bad;
    logic [P-1:0] pulses;
    @(negedge clk); syms = sym; samp = sm; phan = pn; act = a; fsw = 12'(n);
    for (int p = 0; p < P; p++) ref_in[p] = 12'(n / 4 + 3 * p);
    k = 0;
    per = sym ? 2 * n : n;
    nper = 3;
    repeat (per + 3) @(negedge clk);
    for (int p = 0; p < P; p++) hits[p] = 0;
    bad = 0;
    for (int i = 0; i < per * nper; i++) begin
      @(negedge clk);
      pulses = a ? adc : ~adc;
      checks++;
      if (adc_any != |pulses) bad++;
      for (int p = 0; p < P; p++) if (pulses[p]) begin
        int c, on_pt, off_pt;
        hits[p]++;
        c = int'(cnt_d[p]);
        on_pt  = sym ? 0 : int'(ref_in[p]) / 2;
        off_pt = sym ? n : (int'(ref_in[p]) + n) / 2;
        if (!((sm[0] && c == on_pt) || (sm[1] && c == off_pt)) || p > int'(pn)) bad++;
      end
    end
    exp_hits = int'(sm[0]) + int'(sm[1]);
    for (int p = 0; p < P; p++) begin
      checks++;
      if (hits[p] != ((p <= int'(pn)) ? exp_hits * nper : 0)) begin
        failures++;
        $display("FAIL sym=%0b samp=%0d phan=%0d act=%0b phase %0d hits=%0d", sym, sm, pn, a, p, hits[p]);
      end
    end
    if (bad != 0) begin
      failures++; $display("FAIL sym=%0b samp=%0d: %0d misplaced triggers", sym, sm, bad);
    end
  endtask

  initial begin
    for (int p = 0; p < P; p++) ref_in[p] = 12'd10;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      trial(1, 2'(s), 3, 1, 40);
      trial(0, 2'(s), 3, 1, 40);
    end
    trial(1, 3, 1, 1, 40);
    trial(1, 3, 3, 0, 40);      // active-low triggers
    trial(0, 3, 2, 0, 60);
    trial(1, 3, 3, 1, 500);     // full-size carrier
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
