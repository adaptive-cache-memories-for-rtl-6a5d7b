// Self-checking testbench of load_store_queue.
//
// Pushes random requests with random valid and a randomly stalling
// consumer, and checks that they come out complete and in order, that the
// queue reports full at exactly 32 entries (in_ready low), and that the
// count matches the number of entries held.
module tb_load_store_queue;
  import cache_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  mem_req_t in_req, out_req;
  logic [5:0] count;

  load_store_queue #(.DEPTH(32)) dut (.*);

  int checks = 0, failures = 0, fulls = 0;
  mem_req_t q [$];

  function automatic mem_req_t rnd();
    mem_req_t r;
    r.we = 1'($urandom); r.addr = {8'($urandom), $urandom}; r.wdata = {$urandom, $urandom};
    r.be = 8'($urandom); r.tid = TID_W'($urandom);
    return r;
  endfunction

  initial begin
    in_valid = 0; out_ready = 0; in_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int phase = (i / 500) % 2;      // alternately filling and draining
      @(negedge clk);
      checks++;
      if (int'(count) != q.size() || in_ready != (q.size() < 32) || out_valid != (q.size() > 0)) begin
        failures++; $display("FAIL count %0d model %0d ready %0b", count, q.size(), in_ready);
      end
      if (q.size() == 32) fulls++;
      if (out_valid) begin
        checks++;
        if (out_req != q[0]) begin failures++; $display("FAIL order at %0d", i); end
      end
      in_valid  = $urandom_range(0, 99) < (phase ? 40 : 80);
      out_ready = $urandom_range(0, 99) < (phase ? 80 : 30);
      in_req    = rnd();
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_req);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL queue never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
