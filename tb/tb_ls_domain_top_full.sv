// Full-size testbench of ls_domain_top: every parameter at its default
// (256 KB 8-way L1 DCache, 2 MB 8-way L2, 64-byte lines, 32-entry LSQ,
// 15,000-instruction interval).
//
// After the reset sweeps of both caches it has one thread store to and load
// from a handful of lines, checking the data; the first touch of each line
// misses in both caches and later ones hit in the L1. Commits are then fed
// until the first 15,000-instruction interval ends, and the test checks that
// the controller makes a decision, that it picks the configuration a
// hand calculation from the published timing gives (D2, because the misses
// dominate), and that the clock follows.
`timescale 1ns / 1ps
module tb_ls_domain_top_full;
  import cache_pkg::*;

  localparam int unsigned LW = 512;

  logic clk, locked, rst_n = 0;
  int   n_clk_changes;
  logic core_req_valid, core_req_ready, core_resp_valid, core_resp_hit;
  mem_req_t core_req;
  logic [63:0] core_resp_rdata;
  logic [TID_W-1:0] core_resp_tid;
  logic [4:0] retire_cnt;
  logic policy_amat = 1'b0;          // HAMAT decisions
  logic mem_req_valid, mem_req_ready, mem_we, mem_resp_valid;
  logic [PADDR_W-1:0] mem_addr;
  logic [LW-1:0] mem_wdata, mem_rdata;
  cfg_t cfg;
  logic cfg_update;
  int n_mem_reads, n_mem_writes;

  ls_domain_top dut (.*);

  tb_pll_model #(.LOCK_MIN_NS(200), .LOCK_MAX_NS(400)) pll (
    .cfg, .clk, .locked, .n_changes(n_clk_changes));

  tb_line_mem #(.LINE_W(LW), .ADDR_W(PADDR_W), .DELAY(50)) mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .we(mem_we),
    .addr(mem_addr), .wdata(mem_wdata), .resp_valid(mem_resp_valid),
    .rdata(mem_rdata), .n_reads(n_mem_reads), .n_writes(n_mem_writes));

  int checks = 0, failures = 0, decisions = 0, hits = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n && cfg_update) decisions++;

  task automatic access(input bit we, input logic [PADDR_W-1:0] a,
                        input logic [63:0] wd, output logic [63:0] rd, output logic hit);
    @(negedge clk);
    core_req_valid = 1;
    core_req = '{we: we, addr: a, wdata: wd, be: 8'hff, tid: 2'd1};
    @(posedge clk);
    while (!core_req_ready) @(posedge clk);
    @(negedge clk) core_req_valid = 0;
    while (!core_resp_valid) @(posedge clk);
    rd = core_resp_rdata;
    hit = core_resp_hit;
    check(core_resp_tid == 2'd1, "response thread");
  endtask

  initial begin
    logic [63:0] rd;
    logic hit;
    int waited;
    core_req_valid = 0; core_req = '0; retire_cnt = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (!(dut.u_l1.req_ready && dut.l1d_ready)) @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      logic [PADDR_W-1:0] a;
      a = 40'h12_3456_0000 + PADDR_W'(k * 64 * 4096 + k * 8);
      access(1, a, {32'hcafe_0000 + 32'(k), 32'h1234_5678}, rd, hit);
      check(!hit, "first touch misses");
      access(0, a, '0, rd, hit);
      check(hit, "second touch hits");
      check(rd == {32'hcafe_0000 + 32'(k), 32'h1234_5678}, "load returns stored word");
      access(0, a ^ 40'h8, '0, rd, hit);
      check(hit, "same line, other word hits");
      if (hit) hits++;
    end
    check(n_mem_reads == 8, $sformatf("L2 refills from memory: %0d", n_mem_reads));
    // commit one interval's worth of instructions
    @(negedge clk) retire_cnt = 5'd24;
    waited = 0;
    while (decisions == 0 && waited < 5000) begin @(posedge clk); waited++; end
    @(negedge clk) retire_cnt = 5'd0;
    check(decisions == 1, "a decision after 15,000 committed instructions");
    check(waited > 620 && waited < 1000, $sformatf("decision after %0d cycles", waited));
    // 16 MRU-0 hits, 8 L1 misses, 8 L2 misses (ps, from the published timing):
    //   D0: 16*1258 + 8*4403 + 8*(26418+80000) = 906696
    //   D1: 16*2000 + 8*5000 + 8*(27000+80000) = 928000
    //   D2: 16*2632 + 8*2632 + 8*(15789+80000) = 829480
    //   D3: 16*4544 + 8*4544 + 8*(27264+80000) = 967168
    check(cfg == 2, "the misses make D2 the best configuration");
    #500ns;
    check(n_clk_changes == 1 && locked, "clock moved to the new frequency");
    $display("decision after %0d cycles, D%0d, aar = %0d %0d %0d %0d", waited, cfg,
             dut.aar[0], dut.aar[1], dut.aar[2], dut.aar[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
