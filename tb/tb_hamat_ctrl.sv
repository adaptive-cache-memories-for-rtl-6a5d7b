// Self-checking testbench of hamat_ctrl.
//
// Each trial loads accounting counts for four threads, pulses interval_end
// and checks the chosen configuration, the four AAR values and the decision
// latency (cfg_update 299 cycles after interval_end) against a model here
// that computes, in 64-bit integers and from the published timing figures,
// T_j[c], n_j, AAR[c] = sum_j n_j^2 * 2^24 / T_j[c] and the best c.
// Trials mix random counts with shaped ones: a single thread whose hits lie
// deep in the MRU stack (D2 should win: with the published latencies its
// B partition is as fast as its A partition, and it is never slower than D3), several
// threads hitting only at MRU position 0 (the smallest, fastest
// configuration should win), a mix of the two, and an all-zero interval
// (configuration kept, no update). Every case also runs under the AMAT
// policy (policy_amat = 1), checked against the lowest sum_j T_j[c] and a
// 35-cycle decision: a single thread gets the same choice as under HAMAT,
// while the mix, which HAMAT keeps at D0, upsizes to D2 for the sake of the
// one miss-prone thread.
module tb_hamat_ctrl;
  import cache_pkg::*;

  localparam int unsigned CW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic interval_end, policy_amat, accept, cfg_update, busy;
  logic [CW-1:0] l1_hits [NTHREADS][WAYS];
  logic [CW-1:0] l1_misses [NTHREADS];
  logic [CW-1:0] l2_hits [NTHREADS][WAYS];
  logic [CW-1:0] l2_misses [NTHREADS];
  cfg_t cfg;
  logic [63:0] aar [NUM_CFG];

  hamat_ctrl #(.NT(NTHREADS), .CNT_W(CW)) dut (.*);

  int checks = 0, failures = 0;
  int picked [4] = '{0, 0, 0, 0};
  int unsigned f [4] = '{1590, 1000, 760, 440};
  int unsigned aw [4] = '{1, 2, 4, 8};
  int unsigned l1b [4] = '{7, 5, 2, 2};
  int unsigned l2b [4] = '{42, 27, 12, 12};

  function automatic longint ref_cost(input int c, input int t);
    longint per = 1000000 / f[c];
    if (t < 8)       return ((t < aw[c]) ? 2 : l1b[c]) * per;
    if (t == 8)      return ((c == 3) ? 2 : l1b[c]) * per;
    if (t < 17)      return ((t - 9 < aw[c]) ? 12 : l2b[c]) * per;
    return ((c == 3) ? 12 : l2b[c]) * per + 80000;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic trial(input int kind, input bit pol);
    longint T, n, exp_aar [4], exp_tsum [4];
    int best, best_h, best_a, cyc;
    cfg_t cfg_before;
    @(negedge clk);
    for (int j = 0; j < NTHREADS; j++) begin
      for (int p = 0; p < WAYS; p++) begin
        l1_hits[j][p] = CW'($urandom_range(0, 2000));
        l2_hits[j][p] = CW'($urandom_range(0, 200));
      end
      l1_misses[j] = CW'($urandom_range(0, 500));
      l2_misses[j] = CW'($urandom_range(0, 100));
      if (kind == 1 || kind == 3) begin          // thread j: deep MRU hits, or silent
        for (int p = 0; p < WAYS; p++) begin
          l1_hits[j][p] = (p >= 4 && (j == 0 || kind == 1)) ? CW'(3000) : '0;
          l2_hits[j][p] = (p >= 4 && (j == 0 || kind == 1)) ? CW'(400) : '0;
        end
        l1_misses[j] = (j == 0 || kind == 1) ? CW'(400) : '0;
        l2_misses[j] = (j == 0 || kind == 1) ? CW'(20) : '0;
        if (kind == 1 && j > 0) begin l1_misses[j] = '0; l2_misses[j] = '0;
          foreach (l1_hits[j][p]) begin l1_hits[j][p] = '0; l2_hits[j][p] = '0; end end
      end
      if (kind == 2 || (kind == 3 && j > 0)) begin   // MRU-0 hits only
        foreach (l1_hits[j][p]) begin l1_hits[j][p] = (p == 0) ? CW'(6000) : '0; l2_hits[j][p] = '0; end
        l1_misses[j] = CW'(10); l2_misses[j] = CW'(1);
      end
      if (kind == 4) begin
        foreach (l1_hits[j][p]) begin l1_hits[j][p] = '0; l2_hits[j][p] = '0; end
        l1_misses[j] = '0; l2_misses[j] = '0;
      end
    end
    // model
    for (int c = 0; c < 4; c++) begin
      exp_aar[c] = 0;
      exp_tsum[c] = 0;
      for (int j = 0; j < NTHREADS; j++) begin
        n = l1_misses[j];
        for (int p = 0; p < WAYS; p++) n += l1_hits[j][p];
        T = longint'(l1_misses[j]) * ref_cost(c, 8) + longint'(l2_misses[j]) * ref_cost(c, 17);
        for (int p = 0; p < WAYS; p++)
          T += longint'(l1_hits[j][p]) * ref_cost(c, p) + longint'(l2_hits[j][p]) * ref_cost(c, 9 + p);
        if (n != 0) exp_aar[c] += ((n * n) << 24) / T;
        exp_tsum[c] += T;
      end
    end
    best_h = 0;
    for (int c = 1; c < 4; c++) if (exp_aar[c] > exp_aar[best_h]) best_h = c;
    best_a = 0;
    for (int c = 1; c < 4; c++) if (exp_tsum[c] < exp_tsum[best_a]) best_a = c;
    best = pol ? best_a : best_h;
    cfg_before = cfg;
    interval_end = 1;
    policy_amat = pol;
    @(negedge clk);
    interval_end = 0;
    policy_amat = $urandom_range(0, 1);   // ignored after interval_end
    cyc = 1;
    while (!cfg_update && cyc < 400) begin @(negedge clk); cyc++; end
    if (kind == 4) begin
      check(!cfg_update && cfg == cfg_before, "empty interval keeps the configuration");
      return;
    end
    check(cyc == (pol ? 35 : 299), $sformatf("decision latency %0d (policy %0d)", cyc, pol));
    if (!pol)
      for (int c = 0; c < 4; c++)
        check(longint'(aar[c]) == exp_aar[c], $sformatf("aar[%0d] %0d exp %0d", c, aar[c], exp_aar[c]));
    check(int'(cfg) == best, $sformatf("kind %0d policy %0d chose D%0d exp D%0d", kind, pol, cfg, best));
    if (kind == 1) check(best == 2, "single deep-MRU thread upsizes to D2");
    if (kind == 1) check(best_a == best_h, "one thread: both policies agree");
    if (kind == 2) check(best == 0, "MRU-0 threads stay at D0");
    if (kind == 3) check(best == (pol ? 2 : 0),
                         "mix: HAMAT keeps D0 for the efficient threads, AMAT upsizes to D2");
    picked[cfg]++;
  endtask

  initial begin
    interval_end = 0;
    policy_amat = 0;
    foreach (l1_misses[j]) begin
      l1_misses[j] = 0; l2_misses[j] = 0;
      foreach (l1_hits[j][p]) begin l1_hits[j][p] = 0; l2_hits[j][p] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 120; i++) trial((i / 2) % 5, i[0]);
    $display("picked D0=%0d D1=%0d D2=%0d D3=%0d", picked[0], picked[1], picked[2], picked[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
