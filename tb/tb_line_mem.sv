// Behavioural model of the next memory level for the cache testbenches.
//
// Accepts one line-wide request at a time (req_ready low while busy) and
// answers every request, read or write, with one resp_valid pulse DELAY
// clock cycles after it was accepted. Lines never written read as
// init_line(addr): each 32-bit word holds the line address xor the word
// index xor a constant, so a testbench can predict them.
module tb_line_mem #(
  parameter int unsigned LINE_W = 64,
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DELAY  = 3
) (
  input  logic              clk,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [LINE_W-1:0] wdata,
  output logic              resp_valid,
  output logic [LINE_W-1:0] rdata,
  output int                n_reads,
  output int                n_writes
);

  logic [LINE_W-1:0] mem [logic [ADDR_W-1:0]];
  int unsigned cnt;
  logic busy;

  function automatic logic [LINE_W-1:0] init_line(input logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] r;
    for (int w = 0; w < LINE_W / 32; w++)
      r[w*32 +: 32] = 32'(a) ^ 32'(w) ^ 32'h5a3c_0000;
    return r;
  endfunction

  initial begin
    busy = 1'b0; cnt = 0; resp_valid = 1'b0; rdata = '0;
    n_reads = 0; n_writes = 0;
  end

  assign req_ready = !busy;

  always @(posedge clk) begin
    resp_valid <= 1'b0;
    if (busy) begin
      if (cnt <= 1) begin
        busy       <= 1'b0;
        resp_valid <= 1'b1;
      end
      cnt <= cnt - 1;
    end else if (req_valid) begin
      busy <= 1'b1;
      cnt  <= DELAY;
      if (we) begin
        mem[addr] = wdata;
        n_writes <= n_writes + 1;
      end else begin
        rdata   <= mem.exists(addr) ? mem[addr] : init_line(addr);
        n_reads <= n_reads + 1;
      end
    end
  end

endmodule
