// End-to-end testbench of ls_domain_top.
//
// The load/store domain runs on the clock of a PLL model that follows the
// configuration the domain chooses, with a behavioural main memory behind
// the L2. The sizes are reduced (4 L1 sets, 16 L2 sets, 64-byte lines,
// 3000-instruction intervals, 0.2-0.4 us lock time) so that several
// decisions happen in a short run. A request generator plays three phases:
//   1. one thread re-using 24 lines spread over all L1 sets, so most hits
//      lie at MRU positions 1..5 (B partition in D0): HAMAT should upsize;
//   2. four threads each sweeping the words of its own four lines, so most
//      hits are at MRU position 0: HAMAT should go back to D0;
//   3. four threads storing and loading at random over 400 lines, more than
//      the L2 holds, for L1/L2 misses and write-backs at every level.
// Every response is checked in order against a byte image of memory (data
// and thread). The run counts each mechanism of the design and counts a
// failure for any that never happened: LSQ full, L1 A hit, L1 B hit, L1
// miss, L1 write-back, L2 A hit, L2 B hit, L2 miss, memory write-back,
// interval end, decision, upsizing, downsizing, clock change.
`timescale 1ns / 1ps
module tb_ls_domain_top;
  import cache_pkg::*;

  localparam int unsigned LB = 64, LW = LB * 8;

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

  // ---------------- reference model ----------------
  logic [7:0] img [logic [PADDR_W-1:0]];
  mem_req_t pending [$];

  function automatic logic [7:0] ref_byte(input logic [PADDR_W-1:0] a);
    logic [31:0] w;
    if (img.exists(a)) return img[a];
    w = 32'({a[PADDR_W-1:6], 6'b0}) ^ 32'(a[5:2]) ^ 32'h5a3c_0000;
    return w[a[1:0]*8 +: 8];
  endfunction

  int n_resp = 0;
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
      check(core_resp_rdata == exp, "response data");
      check(core_resp_tid == r.tid, "response thread");
      n_resp++;
    end
  end

  // ---------------- mechanism counters ----------------
  int m_lsq_full, m_l1_a, m_l1_b, m_l1_miss, m_l1_wb, m_l2_a, m_l2_b, m_l2_miss,
      m_mem_wb, m_intervals, m_decisions, m_up, m_down;
  initial begin
    m_lsq_full = 0; m_l1_a = 0; m_l1_b = 0; m_l1_miss = 0; m_l1_wb = 0; m_l2_a = 0;
    m_l2_b = 0; m_l2_miss = 0; m_mem_wb = 0; m_intervals = 0; m_decisions = 0;
    m_up = 0; m_down = 0;
  end
  cfg_t last_cfg = 0;
  always @(posedge clk) if (rst_n) begin
    if (core_req_valid && !core_req_ready) m_lsq_full++;
    if (dut.u_l1.acct_valid) begin
      if (!dut.u_l1.acct_hit) m_l1_miss++;
      else if (int'(dut.u_l1.acct_pos) < int'(A_WAYS[dut.u_l1.u_core.cfg_q])) m_l1_a++;
      else m_l1_b++;
    end
    if (dut.u_l2.acct_valid) begin
      if (!dut.u_l2.acct_hit) m_l2_miss++;
      else if (int'(dut.u_l2.acct_pos) < int'(A_WAYS[dut.u_l2.cfg_q])) m_l2_a++;
      else m_l2_b++;
    end
    if (dut.l1d_valid && dut.l1d_ready && dut.l1d_we) m_l1_wb++;
    if (mem_req_valid && mem_req_ready && mem_we) m_mem_wb++;
    if (dut.accept) m_intervals++;
    if (cfg_update) begin
      m_decisions++;
      $display("decision at %0t: D%0d -> D%0d  aar = %0d %0d %0d %0d", $time, last_cfg, cfg,
               dut.aar[0], dut.aar[1], dut.aar[2], dut.aar[3]);
    end
    if (cfg > last_cfg) m_up++;
    if (cfg < last_cfg) m_down++;
    last_cfg <= cfg;
  end

  // ---------------- request generator ----------------
  int phase = 0;
  cfg_t cfg_after [3];
  int seq_idx = 0;

  function automatic mem_req_t gen();
    mem_req_t r;
    int line, t;
    r = '0;
    r.wdata = {$urandom, $urandom};
    r.be = 8'($urandom);
    case (phase)
      0: begin
        line = $urandom_range(0, 23);
        r.tid = 0;
        r.we = ($urandom_range(0, 9) == 0);
        r.addr = PADDR_W'(line * 64 + $urandom_range(0, 7) * 8);
      end
      1: begin
        t = (seq_idx / 8) % 4;
        line = 1000 + t * 4 + (seq_idx / 32) % 4;
        r.tid = TID_W'(t);
        r.we = 0;
        r.addr = PADDR_W'(line * 64 + (seq_idx % 8) * 8);
      end
      default: begin
        line = $urandom_range(0, 399);
        r.tid = TID_W'($urandom);
        r.we = ($urandom_range(0, 9) < 4);
        r.addr = PADDR_W'(line * 64 + $urandom_range(0, 7) * 8);
      end
    endcase
    return r;
  endfunction

  // commit stream: 0..8 instructions per load/store-domain cycle
  always @(negedge clk) retire_cnt <= rst_n ? 5'($urandom_range(0, 8)) : 5'd0;

  initial begin
    int sent;
    core_req_valid = 0; core_req = '0; retire_cnt = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (!(dut.u_l1.req_ready && dut.l1d_ready)) @(posedge clk);   // reset sweeps done
    for (phase = 0; phase < 3; phase++) begin
      sent = 0;
      seq_idx = 0;
      while (sent < 3000) begin
        @(negedge clk);
        core_req_valid = 1;
        core_req = gen();
        @(posedge clk);
        while (!core_req_ready) @(posedge clk);
        pending.push_back(core_req);
        sent++;
        seq_idx++;
      end
      @(negedge clk) core_req_valid = 0;
      wait (pending.size() == 0);
      repeat (2000) @(posedge clk);     // let the last decisions land
      cfg_after[phase] = cfg;
      $display("phase %0d done, configuration D%0d", phase, cfg);
    end
    check(n_resp == 9000, "every request answered");
    check(cfg_after[0] != 0, "single thread with deep MRU hits upsizes");
    check(cfg_after[1] == 0, "threads with MRU-0 hits return to D0");
    check(m_lsq_full > 0, "LSQ full stall happened");
    check(m_l1_a > 0, "L1 A hits");
    check(m_l1_b > 0, "L1 B hits");
    check(m_l1_miss > 0, "L1 misses");
    check(m_l1_wb > 0, "L1 write-backs to L2");
    check(m_l2_a > 0, "L2 A hits");
    check(m_l2_b > 0, "L2 B hits");
    check(m_l2_miss > 0, "L2 misses");
    check(m_mem_wb > 0, "L2 write-backs to memory");
    check(m_intervals > 0, "interval ends");
    check(m_decisions > 0, "decisions");
    check(m_up > 0, "upsizing");
    check(m_down > 0, "downsizing");
    check(n_clk_changes > 0, "clock frequency changes");
    $display("lsq_full=%0d l1 A=%0d B=%0d miss=%0d wb=%0d  l2 A=%0d B=%0d miss=%0d  mem_wb=%0d",
             m_lsq_full, m_l1_a, m_l1_b, m_l1_miss, m_l1_wb, m_l2_a, m_l2_b, m_l2_miss, m_mem_wb);
    $display("intervals=%0d decisions=%0d up=%0d down=%0d clock_changes=%0d",
             m_intervals, m_decisions, m_up, m_down, n_clk_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
