// Load/store queue of the load/store domain.
//
// Holds up to DEPTH (32) loads and stores of all threads in arrival order
// and issues them, oldest first, to the L1 DCache. It is a circular buffer
// with valid/ready handshakes on both sides: in_ready is low when the queue
// is full (the core must stall), and out_valid is high while an entry is
// waiting. An entry pushed into an empty queue can be issued in the next
// cycle. A push and a pop may happen in the same cycle. Because the cache
// behind it serves one request at a time in order, issuing in order keeps
// every load behind the older stores to the same address, so no address
// comparison is needed. The depth is the published one; the in-order
// policy and the handshake are choices of this RTL.
module load_store_queue
  import cache_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  mem_req_t in_req,
  output logic     out_valid,
  input  logic     out_ready,
  output mem_req_t out_req,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = $clog2(DEPTH);

  mem_req_t       buf_q [DEPTH];
  logic [PW-1:0]  head_q, tail_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (cnt_q != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (cnt_q != '0);
  assign out_req   = buf_q[head_q];
  assign count     = cnt_q;

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (push) tail_q <= nxt(tail_q);
      if (pop)  head_q <= nxt(head_q);
      cnt_q <= cnt_q + $bits(cnt_q)'(push) - $bits(cnt_q)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) buf_q[tail_q] <= in_req;
  end

endmodule
