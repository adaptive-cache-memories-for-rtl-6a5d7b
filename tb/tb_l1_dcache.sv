// Self-checking testbench of l1_dcache.
//
// A small L1 (4 sets, 16-byte lines, two words per line) in front of a
// behavioural memory. Random 64-bit loads and byte-masked stores to a
// region of 96 lines (more than the cache holds) are checked against a byte
// image of memory kept by the testbench. An access repeated right after
// another to the same line must hit at MRU position 0, i.e. in the A
// partition, and answer in exactly 2 cycles in every configuration.
module tb_l1_dcache;
  import cache_pkg::*;

  localparam int unsigned SETS = 4, LB = 16, AW = 20, LW = LB * 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic req_valid, req_ready, req_we, resp_valid, resp_hit;
  logic [AW-1:0] req_addr;
  logic [63:0] req_wdata, resp_rdata;
  logic [7:0] req_be;
  logic [TID_W-1:0] req_tid;
  logic acct_valid, acct_hit; logic [TID_W-1:0] acct_tid; pos_t acct_pos;
  logic dn_req_valid, dn_req_ready, dn_we, dn_resp_valid;
  logic [AW-1:0] dn_addr; logic [LW-1:0] dn_wdata, dn_rdata;
  int n_reads, n_writes;

  l1_dcache #(.SETS(SETS), .LINE_BYTES(LB), .ADDR_W(AW)) dut (.*);

  tb_line_mem #(.LINE_W(LW), .ADDR_W(AW), .DELAY(5)) mem (
    .clk, .req_valid(dn_req_valid), .req_ready(dn_req_ready), .we(dn_we),
    .addr(dn_addr), .wdata(dn_wdata), .resp_valid(dn_resp_valid),
    .rdata(dn_rdata), .n_reads, .n_writes);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  logic [7:0] img [logic [AW-1:0]];
  function automatic logic [7:0] ref_byte(input logic [AW-1:0] a);
    logic [31:0] w;
    if (img.exists(a)) return img[a];
    w = 32'({a[AW-1:4], 4'b0}) ^ 32'(a[3:2]) ^ 32'h5a3c_0000;
    return w[a[1:0]*8 +: 8];
  endfunction

  task automatic access(input bit we, input logic [AW-1:0] a, input cfg_t c,
                        input bit expect_a_hit);
    logic [63:0] wd, exp;
    logic [7:0] be;
    int t0;
    wd = {$urandom, $urandom};
    be = we ? 8'($urandom) : 8'h00;
    @(negedge clk);
    cfg = c; req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
    req_be = be; req_tid = TID_W'($urandom);
    do @(posedge clk); while (!req_ready);
    t0 = cycle;
    @(negedge clk) req_valid = 0;
    @(posedge clk);
    while (!resp_valid) @(posedge clk);
    for (int b = 0; b < 8; b++) begin
      if (be[b]) img[a + AW'(b)] = wd[b*8 +: 8];
      exp[b*8 +: 8] = ref_byte(a + AW'(b));
    end
    check(resp_rdata == exp, "load/store data word");
    if (expect_a_hit) begin
      check(resp_hit, "repeat access hits");
      check(cycle - t0 == 2, $sformatf("A-hit latency %0d", cycle - t0));
    end
  endtask

  initial begin
    logic [AW-1:0] a;
    cfg = 0; req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_be = 0; req_tid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      a = AW'($urandom_range(0, 95) * 16 + $urandom_range(0, 1) * 8);
      access($urandom_range(0, 2) == 0, a, cfg_t'(i % 4), 1'b0);
      access($urandom_range(0, 1) == 0, a ^ AW'(8), cfg_t'(i % 4), 1'b1);
    end
    check(n_writes > 0, "write-backs happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
