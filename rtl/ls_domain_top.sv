// Adaptive load/store clock domain of an SMT core.
//
// The load/store domain holds the load/store queue, an adaptive L1 DCache
// and an adaptive unified L2 cache. Both caches are eight-way and split by
// MRU position into a fast A and a slow B partition; the four
// configurations D0..D3 (A = 1, 2, 4, 8 ways) trade capacity in A for clock
// rate, and the two caches always switch together. Every L1 reference and
// every L2 demand reference is counted per thread and MRU position
// (acct_counters). After every INTERVAL_LEN committed instructions
// (interval_counter) the HAMAT controller rebuilds from those counts what
// each configuration would have cost each thread, picks the configuration
// with the best harmonic-mean access time, and drives `cfg`, which sets the
// cache latencies at once and asks the clock generator for the matching
// frequency (1.59, 1.00, 0.76, 0.44 GHz for D0..D3).
//
// Interface (all in the load/store clock `clk`, which the clock generator
// produces from `cfg`; the domain keeps running while the clock changes):
//   core_req_*   loads/stores from the core into the load/store queue
//                (valid/ready; ready low = queue full, the core stalls)
//   core_resp_*  one-cycle response per request, in order, with the data
//                word for loads, the thread and whether the L1 hit
//   retire_cnt   instructions committed this cycle (0..24), taken as already
//                synchronised from the core clock
//   policy_amat  0: HAMAT decisions; 1: the older AMAT policy (lowest total
//                access time over all threads), for comparison
//   mem_*        line-wide port to main memory (one request at a time,
//                exactly one mem_resp_valid pulse per request, reads and
//                writes alike)
//   cfg, cfg_update  current configuration and a pulse when a decision
//                is made
// The clock generator and the clock-domain synchronisers sit outside this
// module.
//
// The domain split, the partitioned caches, the four configurations with
// their clocks and latencies, the per-thread accounting, the 15,000-
// instruction interval and both control policies follow the published
// design; line size, address width, write policy, blocking caches and the
// simple in-order queue are this design's own choices.
module ls_domain_top
  import cache_pkg::*;
#(
  parameter int unsigned L1_SETS      = 512,    // 32 KB per way, 64 B lines
  parameter int unsigned L2_SETS      = 4096,   // 256 KB per way
  parameter int unsigned LINE_BYTES   = 64,
  parameter int unsigned LSQ_DEPTH    = 32,
  parameter int unsigned INTERVAL_LEN = INTERVAL,
  parameter int unsigned CNT_W        = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    core_req_valid,
  output logic                    core_req_ready,
  input  mem_req_t                core_req,
  output logic                    core_resp_valid,
  output logic [63:0]             core_resp_rdata,
  output logic [TID_W-1:0]        core_resp_tid,
  output logic                    core_resp_hit,
  input  logic [4:0]              retire_cnt,
  input  logic                    policy_amat,
  output logic                    mem_req_valid,
  input  logic                    mem_req_ready,
  output logic                    mem_we,
  output logic [PADDR_W-1:0]      mem_addr,
  output logic [LINE_BYTES*8-1:0] mem_wdata,
  input  logic                    mem_resp_valid,
  input  logic [LINE_BYTES*8-1:0] mem_rdata,
  output cfg_t                    cfg,
  output logic                    cfg_update
);

  localparam int unsigned LINE_W = LINE_BYTES * 8;

  // load/store queue -> L1
  logic     q_valid, q_ready;
  mem_req_t q_req;
  logic [$clog2(LSQ_DEPTH+1)-1:0] q_count;

  load_store_queue #(.DEPTH(LSQ_DEPTH)) u_lsq (
    .clk, .rst_n,
    .in_valid(core_req_valid), .in_ready(core_req_ready), .in_req(core_req),
    .out_valid(q_valid), .out_ready(q_ready), .out_req(q_req), .count(q_count)
  );

  // thread of the request the L1 is serving (the L1 is blocking)
  logic [TID_W-1:0] cur_tid_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cur_tid_q <= '0;
    else if (q_valid && q_ready) cur_tid_q <= q_req.tid;
  end
  assign core_resp_tid = cur_tid_q;

  // L1 DCache
  logic l1a_valid, l1a_hit; logic [TID_W-1:0] l1a_tid; pos_t l1a_pos;
  logic l1d_valid, l1d_ready, l1d_we, l1d_resp_valid;
  logic [PADDR_W-1:0] l1d_addr;
  logic [LINE_W-1:0]  l1d_wdata, l1d_rdata;

  l1_dcache #(.SETS(L1_SETS), .LINE_BYTES(LINE_BYTES), .ADDR_W(PADDR_W)) u_l1 (
    .clk, .rst_n, .cfg,
    .req_valid(q_valid), .req_ready(q_ready), .req_we(q_req.we),
    .req_addr(q_req.addr), .req_wdata(q_req.wdata), .req_be(q_req.be),
    .req_tid(q_req.tid),
    .resp_valid(core_resp_valid), .resp_rdata(core_resp_rdata), .resp_hit(core_resp_hit),
    .acct_valid(l1a_valid), .acct_tid(l1a_tid), .acct_hit(l1a_hit), .acct_pos(l1a_pos),
    .dn_req_valid(l1d_valid), .dn_req_ready(l1d_ready), .dn_we(l1d_we),
    .dn_addr(l1d_addr), .dn_wdata(l1d_wdata),
    .dn_resp_valid(l1d_resp_valid), .dn_rdata(l1d_rdata)
  );

  // L2 cache: L1 refills are demand references and are counted, L1
  // write-backs are not
  logic l2a_valid, l2a_hit; logic [TID_W-1:0] l2a_tid; pos_t l2a_pos;
  logic l2_resp_hit;

  adaptive_cache #(
    .SETS(L2_SETS), .LINE_BYTES(LINE_BYTES), .ADDR_W(PADDR_W),
    .LAT_A(L2_LAT_A), .LAT_B(L2_LAT_B)
  ) u_l2 (
    .clk, .rst_n, .cfg,
    .up_req_valid(l1d_valid), .up_req_ready(l1d_ready), .up_we(l1d_we),
    .up_addr(l1d_addr), .up_wdata(l1d_wdata), .up_wmask({LINE_BYTES{1'b1}}),
    .up_tid(cur_tid_q), .up_acct(!l1d_we),
    .up_resp_valid(l1d_resp_valid), .up_rdata(l1d_rdata), .up_resp_hit(l2_resp_hit),
    .acct_valid(l2a_valid), .acct_tid(l2a_tid), .acct_hit(l2a_hit), .acct_pos(l2a_pos),
    .dn_req_valid(mem_req_valid), .dn_req_ready(mem_req_ready), .dn_we(mem_we),
    .dn_addr(mem_addr), .dn_wdata(mem_wdata),
    .dn_resp_valid(mem_resp_valid), .dn_rdata(mem_rdata)
  );

  // accounting
  logic accept, interval_end, ctrl_busy;
  logic [CNT_W-1:0] l1_hits [NTHREADS][WAYS];
  logic [CNT_W-1:0] l1_miss [NTHREADS];
  logic [CNT_W-1:0] l2_hits [NTHREADS][WAYS];
  logic [CNT_W-1:0] l2_miss [NTHREADS];
  logic [63:0]      aar [NUM_CFG];

  acct_counters #(.NT(NTHREADS), .CNT_W(CNT_W)) u_acct_l1 (
    .clk, .rst_n, .ev_valid(l1a_valid), .ev_tid(l1a_tid), .ev_hit(l1a_hit),
    .ev_pos(l1a_pos), .clear(accept), .hits(l1_hits), .misses(l1_miss)
  );

  acct_counters #(.NT(NTHREADS), .CNT_W(CNT_W)) u_acct_l2 (
    .clk, .rst_n, .ev_valid(l2a_valid), .ev_tid(l2a_tid), .ev_hit(l2a_hit),
    .ev_pos(l2a_pos), .clear(accept), .hits(l2_hits), .misses(l2_miss)
  );

  interval_counter #(.INTERVAL(INTERVAL_LEN), .RET_W(5)) u_interval (
    .clk, .rst_n, .retire_cnt, .interval_end
  );

  hamat_ctrl #(.NT(NTHREADS), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .interval_end, .policy_amat, .accept,
    .l1_hits, .l1_misses(l1_miss), .l2_hits, .l2_misses(l2_miss),
    .cfg, .cfg_update, .busy(ctrl_busy), .aar
  );

endmodule
