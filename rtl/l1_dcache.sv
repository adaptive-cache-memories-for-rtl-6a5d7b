// Adaptive L1 data cache.
//
// A word-wide load/store port in front of an adaptive_cache core. A request
// carries a byte address, a 64-bit word and eight byte enables; the wrapper
// places the word in its lane of the cache line (replicated data plus a
// byte mask shifted to the word's offset) and picks the addressed word out
// of the returned line. Timing, accounting and the A/B partitioning are
// those of adaptive_cache: an A hit answers in 2 cycles, a B hit in 7, 5 or
// 2 cycles (D0, D1, D2), and the miss path goes to the L2 over the line-wide
// downstream port. The default size is 512 sets of 64-byte lines per way,
// i.e. eight 32 KB ways (256 KB in total, a 32 KB direct-mapped A partition
// in D0). The word width and line size are choices of this RTL; the way
// size, associativity and latencies follow the published configuration.
module l1_dcache
  import cache_pkg::*;
#(
  parameter int unsigned SETS       = 512,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned ADDR_W     = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  cfg_t                    cfg,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic                    req_we,
  input  logic [ADDR_W-1:0]       req_addr,
  input  logic [63:0]             req_wdata,
  input  logic [7:0]              req_be,
  input  logic [TID_W-1:0]        req_tid,
  output logic                    resp_valid,
  output logic [63:0]             resp_rdata,
  output logic                    resp_hit,
  output logic                    acct_valid,
  output logic [TID_W-1:0]        acct_tid,
  output logic                    acct_hit,
  output pos_t                    acct_pos,
  output logic                    dn_req_valid,
  input  logic                    dn_req_ready,
  output logic                    dn_we,
  output logic [ADDR_W-1:0]       dn_addr,
  output logic [LINE_BYTES*8-1:0] dn_wdata,
  input  logic                    dn_resp_valid,
  input  logic [LINE_BYTES*8-1:0] dn_rdata
);

  localparam int unsigned WORDS = LINE_BYTES / 8;
  localparam int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [LINE_BYTES*8-1:0] line_wdata, line_rdata;
  logic [LINE_BYTES-1:0]   line_mask;
  logic [WSEL_W-1:0]       wsel, wsel_q;

  assign wsel = WSEL_W'(req_addr[3 +: WSEL_W]);

  always_comb begin
    line_wdata = {WORDS{req_wdata}};
    line_mask  = '0;
    line_mask[wsel*8 +: 8] = req_be;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      wsel_q <= '0;
    else if (req_valid && req_ready) wsel_q <= wsel;
  end

  assign resp_rdata = line_rdata[wsel_q*64 +: 64];

  adaptive_cache #(
    .SETS(SETS), .LINE_BYTES(LINE_BYTES), .ADDR_W(ADDR_W),
    .LAT_A(L1_LAT_A), .LAT_B(L1_LAT_B)
  ) u_core (
    .clk, .rst_n, .cfg,
    .up_req_valid(req_valid), .up_req_ready(req_ready), .up_we(req_we),
    .up_addr(req_addr), .up_wdata(line_wdata), .up_wmask(line_mask),
    .up_tid(req_tid), .up_acct(1'b1),
    .up_resp_valid(resp_valid), .up_rdata(line_rdata), .up_resp_hit(resp_hit),
    .acct_valid, .acct_tid, .acct_hit, .acct_pos,
    .dn_req_valid, .dn_req_ready, .dn_we, .dn_addr, .dn_wdata,
    .dn_resp_valid, .dn_rdata
  );

endmodule
