// Self-checking testbench of adaptive_cache.
//
// A small cache (4 sets, 8 ways, 8-byte lines) sits in front of a
// behavioural memory. Random reads and partial writes to 12 lines per set
// (so that lines are evicted and written back) run under all four
// configurations. The testbench keeps its own LRU stack per set and its own
// byte image of memory, and checks for every request: the returned data,
// hit or miss, the MRU position reported for accounting, and, for hits,
// that the response comes exactly at the A or B latency of the
// configuration (2/7, 2/5, 2/2, 2/- cycles). It also checks that dirty
// victims reach memory.
module tb_adaptive_cache;
  import cache_pkg::*;

  localparam int unsigned SETS = 4, LB = 8, AW = 16, LW = LB * 8;
  localparam int unsigned OFF_W = 3, SET_W = 2, NTAGS = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic up_req_valid, up_req_ready, up_we, up_acct, up_resp_valid, up_resp_hit;
  logic [AW-1:0] up_addr;
  logic [LW-1:0] up_wdata, up_rdata;
  logic [LB-1:0] up_wmask;
  logic [TID_W-1:0] up_tid;
  logic acct_valid, acct_hit; logic [TID_W-1:0] acct_tid; pos_t acct_pos;
  logic dn_req_valid, dn_req_ready, dn_we, dn_resp_valid;
  logic [AW-1:0] dn_addr; logic [LW-1:0] dn_wdata, dn_rdata;
  int n_reads, n_writes;

  adaptive_cache #(.SETS(SETS), .LINE_BYTES(LB), .ADDR_W(AW),
                   .LAT_A('{2, 2, 2, 2}), .LAT_B('{7, 5, 2, 2})) dut (.*);

  tb_line_mem #(.LINE_W(LW), .ADDR_W(AW), .DELAY(4)) mem (
    .clk, .req_valid(dn_req_valid), .req_ready(dn_req_ready), .we(dn_we),
    .addr(dn_addr), .wdata(dn_wdata), .resp_valid(dn_resp_valid),
    .rdata(dn_rdata), .n_reads, .n_writes);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // reference model
  logic [7:0] img [logic [AW-1:0]];
  int stk [SETS][$];                       // tags, MRU first
  int a_hits = 0, b_hits = 0, misses = 0;

  function automatic logic [7:0] ref_byte(input logic [AW-1:0] a);
    logic [AW-1:0] la;
    logic [31:0] w;
    if (img.exists(a)) return img[a];
    la = {a[AW-1:OFF_W], {OFF_W{1'b0}}};
    w  = 32'(la) ^ 32'(a[OFF_W-1:2]) ^ 32'h5a3c_0000;
    return w[a[1:0]*8 +: 8];
  endfunction

  task automatic access(input bit we, input int tag, input int set, input cfg_t c);
    logic [AW-1:0] a;
    logic [LW-1:0] wd, exp_line;
    logic [LB-1:0] m;
    int pos, t0, lat, exp_lat;
    a  = AW'((tag << (OFF_W + SET_W)) | (set << OFF_W));
    wd = {$urandom, $urandom};
    m  = we ? LB'($urandom) : '0;
    // model: position of tag in this set's LRU stack
    pos = -1;
    foreach (stk[set][i]) if (stk[set][i] == tag) pos = i;
    // drive
    @(negedge clk);
    cfg = c; up_req_valid = 1; up_we = we; up_addr = a; up_wdata = wd;
    up_wmask = m; up_tid = TID_W'(tag % 4); up_acct = 1;
    do @(posedge clk); while (!up_req_ready);
    t0 = cycle;
    @(negedge clk) up_req_valid = 0;
    // accounting event in the lookup cycle
    @(posedge clk);
    check(acct_valid && acct_tid == TID_W'(tag % 4), "accounting event");
    check(acct_hit == (pos >= 0), "accounting hit flag");
    if (pos >= 0) check(int'(acct_pos) == pos, "MRU position");
    while (!up_resp_valid) @(posedge clk);
    lat = cycle - t0;
    // update the model
    for (int b = 0; b < LB; b++) begin
      if (m[b]) img[a + AW'(b)] = wd[b*8 +: 8];
      exp_line[b*8 +: 8] = ref_byte(a + AW'(b));
    end
    check(up_rdata == exp_line, "read data");
    check(up_resp_hit == (pos >= 0), "hit/miss");
    if (pos >= 0) begin
      exp_lat = (pos < int'(A_WAYS[c])) ? 2 : ((c == 0) ? 7 : (c == 1) ? 5 : 2);
      check(lat == exp_lat, $sformatf("hit latency %0d exp %0d", lat, exp_lat));
      if (pos < int'(A_WAYS[c])) a_hits++; else b_hits++;
      stk[set].delete(pos);
    end else begin
      exp_lat = (c == 3) ? 2 : ((c == 0) ? 7 : (c == 1) ? 5 : 2);
      check(lat > exp_lat + 4, "miss takes the next level's latency");
      misses++;
      if (stk[set].size() == WAYS) stk[set].delete(WAYS - 1);
    end
    stk[set].push_front(tag);
  endtask

  initial begin
    int wb_before;
    cfg = 0; up_req_valid = 0; up_we = 0; up_addr = 0; up_wdata = 0;
    up_wmask = 0; up_tid = 0; up_acct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++)
      access($urandom_range(0, 3) == 0, $urandom_range(0, NTAGS - 1),
             $urandom_range(0, SETS - 1), cfg_t'((i / 250) % 4));
    // every configuration saw A hits, B hits and misses
    check(a_hits > 100 && b_hits > 100 && misses > 100, "all outcomes seen");
    check(n_writes > 10, "dirty lines written back");
    $display("a_hits=%0d b_hits=%0d misses=%0d mem_reads=%0d mem_writes=%0d",
             a_hits, b_hits, misses, n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
