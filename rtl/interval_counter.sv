// Reconfiguration interval counter.
//
// Adds up the instructions committed each cycle and pulses interval_end for
// one cycle when the running total reaches INTERVAL (15,000 committed
// instructions by default, the published interval). The total then drops by
// INTERVAL, so instructions committed past the boundary count toward the
// next interval. The commit count is taken as already synchronised into the
// load/store clock domain; its width (up to 24 per cycle, the commit width)
// is a choice of this RTL.
module interval_counter #(
  parameter int unsigned INTERVAL = cache_pkg::INTERVAL,
  parameter int unsigned RET_W    = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RET_W-1:0] retire_cnt,
  output logic             interval_end
);

  localparam int unsigned CW = $clog2(INTERVAL + (1 << RET_W)) + 1;
  logic [CW-1:0] total_q, sum;

  assign sum = total_q + CW'(retire_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      total_q      <= '0;
      interval_end <= 1'b0;
    end else if (sum >= CW'(INTERVAL)) begin
      total_q      <= sum - CW'(INTERVAL);
      interval_end <= 1'b1;
    end else begin
      total_q      <= sum;
      interval_end <= 1'b0;
    end
  end

endmodule
