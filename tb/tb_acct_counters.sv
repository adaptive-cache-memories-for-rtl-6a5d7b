// Self-checking testbench of acct_counters.
//
// Drives random accounting events (thread, hit, MRU position) for several
// intervals and compares every counter with a model kept by the
// testbench, at every interval boundary and at the end. The boundary cycle
// carries an event too, which must land in the new interval. A final burst
// with CNT_W = 6 checks that the counters saturate.
module tb_acct_counters;
  import cache_pkg::*;

  localparam int unsigned CW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ev_valid, ev_hit, clear;
  logic [TID_W-1:0] ev_tid;
  pos_t ev_pos;
  logic [CW-1:0] hits [NTHREADS][WAYS];
  logic [CW-1:0] misses [NTHREADS];

  acct_counters #(.NT(NTHREADS), .CNT_W(CW)) dut (.*);

  int checks = 0, failures = 0;
  int mh [NTHREADS][WAYS];
  int mm [NTHREADS];

  function automatic int sat(input int v);
    return (v > (1 << CW) - 1) ? (1 << CW) - 1 : v;
  endfunction

  task automatic compare(input string when);
    for (int t = 0; t < NTHREADS; t++) begin
      checks++;
      if (int'(misses[t]) != sat(mm[t])) begin
        failures++; $display("FAIL %s miss t%0d %0d exp %0d", when, t, misses[t], sat(mm[t]));
      end
      for (int p = 0; p < WAYS; p++) begin
        checks++;
        if (int'(hits[t][p]) != sat(mh[t][p])) begin
          failures++; $display("FAIL %s hit t%0d p%0d %0d exp %0d", when, t, p, hits[t][p], sat(mh[t][p]));
        end
      end
    end
  endtask

  task automatic model_clear();
    foreach (mm[t]) begin mm[t] = 0; foreach (mh[t][p]) mh[t][p] = 0; end
  endtask

  task automatic step(input bit do_clear, input int ev_prob);
    @(negedge clk);
    ev_valid = ($urandom_range(0, 99) < ev_prob);
    ev_tid = TID_W'($urandom); ev_hit = $urandom_range(0, 3) != 0;
    ev_pos = pos_t'($urandom); clear = do_clear;
    @(posedge clk);
    if (do_clear) begin compare("interval end"); model_clear(); end
    if (ev_valid) begin
      if (ev_hit) mh[ev_tid][ev_pos]++; else mm[ev_tid]++;
    end
  endtask

  initial begin
    ev_valid = 0; ev_hit = 0; ev_tid = 0; ev_pos = 0; clear = 0;
    model_clear();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      for (int i = 0; i < 300; i++) step(0, 70);
      step(1, 100);
    end
    for (int i = 0; i < 3000; i++) step(0, 100);   // saturate
    @(negedge clk) ev_valid = 0;
    compare("saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
