// Self-checking testbench of amat_unit.
//
// Loads random counts for the 18 accounting classes and checks, for all
// four configurations, the total access time against a sum computed here
// directly from the published frequencies (1590, 1000, 760, 440 MHz) and
// latencies (L1 A/B 2/7, 2/5, 2/2, 2/-; L2 A/B 12/42, 12/27, 12/12, 12/-;
// memory 80 ns), and that `done` comes exactly COST_W + 1 = 33 cycles after
// `start`.
module tb_amat_unit;
  import cache_pkg::*;

  localparam int unsigned CW = 16;
  localparam int unsigned AW = CW + COST_W + $clog2(NTERMS);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [CW-1:0] counts [NTERMS];
  logic [AW-1:0] total [NUM_CFG];

  amat_unit #(.CNT_W(CW)) dut (.*);

  int checks = 0, failures = 0;
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

  initial begin
    longint exp;
    int n;
    start = 0;
    foreach (counts[t]) counts[t] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      logic [CW-1:0] saved [NTERMS];
      @(negedge clk);
      foreach (counts[t]) counts[t] = (it == 0) ? '1 : CW'($urandom);
      saved = counts;
      start = 1;
      @(negedge clk);
      start = 0;
      foreach (counts[t]) counts[t] = CW'($urandom);   // captured at start: must not matter
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      checks++;
      if (n != COST_W + 1) begin failures++; $display("FAIL latency %0d", n); end
      for (int c = 0; c < 4; c++) begin
        exp = 0;
        for (int t = 0; t < 18; t++) exp += longint'(saved[t]) * ref_cost(c, t);
        checks++;
        if (longint'(total[c]) != exp) begin
          failures++; $display("FAIL cfg %0d total %0d exp %0d", c, total[c], exp);
        end
      end
    end
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
