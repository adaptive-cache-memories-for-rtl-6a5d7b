// Workload testbench of ls_domain_top: synthetic single-, dual- and
// quad-thread mixes.
//
// Thread 0 plays a miss-prone, capacity-hungry program: bursts of accesses
// at random over 24 lines, so its hits lie deep in the MRU stack. The other
// threads are cache-efficient: each sweeps the words of one line per burst,
// so nearly all its hits are at MRU position 0. Threads take turns in
// bursts of eight requests. The same reduced-size domain as in
// tb_ls_domain_top runs each mix (1, 2 and 4 threads) for 2,400 requests,
// first under the HAMAT policy and then under the older AMAT policy
// (lowest total access time), and the testbench records the A-partition
// associativity chosen at every decision after the first three of each
// run. Expected, as the two policies are meant to behave: alone, thread 0
// makes the domain upsize under either policy; with efficient threads
// sharing the core, HAMAT chooses a smaller A partition than for thread 0
// alone, and a smaller one than AMAT chooses for the same two-thread mix
// (with four threads thread 0 makes only a quarter of the references, and
// both policies stay small).
// Between two and four threads no order is required: the extra threads
// also add capacity pressure. Every response is checked against a byte
// image of memory.
`timescale 1ns / 1ps
module tb_smt_workloads;
  import cache_pkg::*;

  localparam int unsigned LB = 64, LW = LB * 8;

  logic clk, locked, rst_n = 0;
  int   n_clk_changes;
  logic core_req_valid, core_req_ready, core_resp_valid, core_resp_hit;
  mem_req_t core_req;
  logic [63:0] core_resp_rdata;
  logic [TID_W-1:0] core_resp_tid;
  logic [4:0] retire_cnt;
  logic policy_amat;
  logic mem_req_valid, mem_req_ready, mem_we, mem_resp_valid;
  logic [PADDR_W-1:0] mem_addr;
  logic [LW-1:0] mem_wdata, mem_rdata;
  cfg_t cfg;
  logic cfg_update;
  int n_mem_reads, n_mem_writes;

  ls_domain_top #(.L1_SETS(4), .L2_SETS(16), .LINE_BYTES(LB), .LSQ_DEPTH(32),
                  .INTERVAL_LEN(3000), .CNT_W(16)) dut (.*);

  tb_pll_model #(.LOCK_MIN_NS(200), .LOCK_MAX_NS(400)) pll (
    .cfg, .clk, .locked, .n_changes(n_clk_changes));

  tb_line_mem #(.LINE_W(LW), .ADDR_W(PADDR_W), .DELAY(20)) mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .we(mem_we),
    .addr(mem_addr), .wdata(mem_wdata), .resp_valid(mem_resp_valid),
    .rdata(mem_rdata), .n_reads(n_mem_reads), .n_writes(n_mem_writes));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [7:0] img [logic [PADDR_W-1:0]];
  mem_req_t pending [$];

  function automatic logic [7:0] ref_byte(input logic [PADDR_W-1:0] a);
    logic [31:0] w;
    if (img.exists(a)) return img[a];
    w = 32'({a[PADDR_W-1:6], 6'b0}) ^ 32'(a[5:2]) ^ 32'h5a3c_0000;
    return w[a[1:0]*8 +: 8];
  endfunction

  always @(posedge clk) if (rst_n && core_resp_valid) begin
    mem_req_t r;
    logic [63:0] exp;
    if (pending.size() == 0) check(0, "response without request");
    else begin
      r = pending.pop_front();
      for (int b = 0; b < 8; b++) begin
        if (r.we && r.be[b]) img[{r.addr[PADDR_W-1:3], 3'(b)}] = r.wdata[b*8 +: 8];
        exp[b*8 +: 8] = ref_byte({r.addr[PADDR_W-1:3], 3'(b)});
      end
      check(core_resp_rdata == exp && core_resp_tid == r.tid, "response");
    end
  end

  // A associativity at each decision of the current mix
  int n_dec = 0, sum_ways = 0, n_used = 0;
  always @(posedge clk) if (rst_n && cfg_update) begin
    n_dec++;
    if (n_dec > 3) begin sum_ways += int'(A_WAYS[cfg]); n_used++; end
  end

  always @(negedge clk) retire_cnt <= rst_n ? 5'($urandom_range(0, 8)) : 5'd0;

  function automatic mem_req_t gen(input int nthreads, input int idx);
    mem_req_t r;
    int t, burst;
    r = '0;
    r.wdata = {$urandom, $urandom};
    r.be = 8'($urandom);
    burst = idx / 8;
    t = burst % nthreads;
    r.tid = TID_W'(t);
    if (t == 0) begin
      r.we = ($urandom_range(0, 9) == 0);
      r.addr = PADDR_W'($urandom_range(0, 23) * 64 + $urandom_range(0, 7) * 8);
    end else begin
      r.we = 0;
      r.addr = PADDR_W'((2000 + t * 8 + (burst / nthreads) % 4) * 64 + (idx % 8) * 8);
    end
    return r;
  endfunction

  real avg [2][3];                   // [policy: 0 HAMAT, 1 AMAT][mix]
  int  mix_threads [3] = '{1, 2, 4};

  initial begin
    core_req_valid = 0; core_req = '0; retire_cnt = 0; policy_amat = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (!(dut.u_l1.req_ready && dut.l1d_ready)) @(posedge clk);
    for (int pm = 0; pm < 6; pm++) begin
      int m, pol;
      m = pm % 3;
      pol = pm / 3;
      policy_amat = (pol == 1);
      n_dec = 0; sum_ways = 0; n_used = 0;
      for (int i = 0; i < 2400; i++) begin
        @(negedge clk);
        core_req_valid = 1;
        core_req = gen(mix_threads[m], i);
        @(posedge clk);
        while (!core_req_ready) @(posedge clk);
        pending.push_back(core_req);
      end
      @(negedge clk) core_req_valid = 0;
      wait (pending.size() == 0);
      avg[pol][m] = (n_used > 0) ? real'(sum_ways) / n_used : 0.0;
      $display("%s, %0d thread(s): %0d decisions, average A associativity %.2f",
               pol ? "AMAT " : "HAMAT", mix_threads[m], n_used, avg[pol][m]);
      check(n_used > 0, "decisions in every mix");
    end
    check(avg[0][0] > 1.0, "one capacity-hungry thread upsizes under HAMAT");
    check(avg[1][0] > 1.0, "one capacity-hungry thread upsizes under AMAT");
    check(avg[0][2] < avg[0][0], "four threads choose a smaller A partition than one");
    check(avg[0][1] < avg[1][1], "with two threads HAMAT chooses a smaller A partition than AMAT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
