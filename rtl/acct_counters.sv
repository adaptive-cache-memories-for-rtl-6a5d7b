// Accounting counters of one cache level.
//
// For every thread, one counter per MRU position counts the hits at that
// position and one counter counts the misses. Because each configuration's
// A partition is a prefix of the MRU stack, these counts give the A hits, B
// hits and misses that every configuration would have seen over the
// interval, whatever configuration actually ran. One event (valid, thread,
// hit, position) may arrive per cycle; it is counted on the next clock
// edge. The counters saturate at all ones. `clear` starts a new interval:
// the counts visible in the cycle `clear` is high are the finished
// interval's (the controller captures them then) and the counters restart
// from zero, or from one if an event arrives in that same cycle.
// Per-thread replication follows the published SMT extension of the
// accounting cache; the counter width is a choice of this RTL.
module acct_counters
  import cache_pkg::*;
#(
  parameter int unsigned NT    = NTHREADS,
  parameter int unsigned CNT_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ev_valid,
  input  logic [TID_W-1:0]      ev_tid,
  input  logic                  ev_hit,
  input  pos_t                  ev_pos,
  input  logic                  clear,
  output logic [CNT_W-1:0]      hits   [NT][WAYS],
  output logic [CNT_W-1:0]      misses [NT]
);

  function automatic logic [CNT_W-1:0] bump(input logic [CNT_W-1:0] v);
    return (&v) ? v : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NT; t++) begin
        misses[t] <= '0;
        for (int p = 0; p < WAYS; p++) hits[t][p] <= '0;
      end
    end else begin
      for (int t = 0; t < NT; t++) begin
        logic sel;
        sel = ev_valid && (int'(ev_tid) == t);
        misses[t] <= clear ? CNT_W'(sel && !ev_hit)
                           : ((sel && !ev_hit) ? bump(misses[t]) : misses[t]);
        for (int p = 0; p < WAYS; p++) begin
          logic inc;
          inc = sel && ev_hit && (int'(ev_pos) == p);
          hits[t][p] <= clear ? CNT_W'(inc) : (inc ? bump(hits[t][p]) : hits[t][p]);
        end
      end
    end
  end

endmodule
