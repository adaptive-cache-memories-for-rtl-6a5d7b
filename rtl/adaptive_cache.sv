// Adaptive (accounting) cache core, used for the L2 cache and inside the L1
// DCache.
//
// An eight-way set-associative, write-back, write-allocate cache that keeps
// a full most-recently-used (MRU) stack per set. The ways holding MRU
// positions 0..A_WAYS-1 form the fast A partition and the rest the slow B
// partition, so a configuration change (D0..D3) only moves the A/B boundary:
// the contents stay and all eight ways always hold data. A hit in B moves
// the line to MRU position 0, i.e. into A, and the least recently used line
// of A drops to B. Because every configuration is a prefix of the MRU stack,
// the MRU position of each hit (reported on the acct_* outputs) tells the
// accounting counters whether the access would have hit A or B in every
// configuration.
//
// Timing (load/store cycles, counted from the cycle a request is accepted):
//   A hit : up_resp_valid in cycle LAT_A[cfg]
//   B hit : up_resp_valid in cycle LAT_B[cfg]
//   miss  : the miss is known at the miss-detect latency (LAT_B, or LAT_A
//           in D3), then a dirty victim is written back and the line is
//           read from the next level; the response follows the refill.
// The cache is blocking: one request at a time (up_req_ready low while
// busy). Every request, read or write, on either port gets exactly one
// response; up_resp_valid and dn_resp_valid are one-cycle pulses with no
// back-pressure. The configuration is sampled when a request is accepted.
// After reset the cache sweeps its sets (SETS cycles) to clear the valid
// bits and set the MRU stacks, and accepts no request until then.
//
// From the published design: eight ways, the MRU-based A/B split, the four
// configurations and their latencies. Choices of this RTL: logical rather
// than physical partitions (the ways are not swapped, the MRU stack
// decides), line size, write policy, the blocking handshake and the reset
// sweep.
module adaptive_cache
  import cache_pkg::*;
#(
  parameter int unsigned SETS       = 512,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned ADDR_W     = 40,
  parameter int unsigned LAT_A [NUM_CFG] = '{2, 2, 2, 2},
  parameter int unsigned LAT_B [NUM_CFG] = '{7, 5, 2, 2}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  cfg_t                    cfg,
  // upstream (requester) port
  input  logic                    up_req_valid,
  output logic                    up_req_ready,
  input  logic                    up_we,
  input  logic [ADDR_W-1:0]       up_addr,
  input  logic [LINE_BYTES*8-1:0] up_wdata,
  input  logic [LINE_BYTES-1:0]   up_wmask,
  input  logic [TID_W-1:0]        up_tid,
  input  logic                    up_acct,     // count this access
  output logic                    up_resp_valid,
  output logic [LINE_BYTES*8-1:0] up_rdata,
  output logic                    up_resp_hit,
  // accounting event, one per accepted request with up_acct set
  output logic                    acct_valid,
  output logic [TID_W-1:0]        acct_tid,
  output logic                    acct_hit,
  output pos_t                    acct_pos,
  // downstream (next level) port
  output logic                    dn_req_valid,
  input  logic                    dn_req_ready,
  output logic                    dn_we,
  output logic [ADDR_W-1:0]       dn_addr,
  output logic [LINE_BYTES*8-1:0] dn_wdata,
  input  logic                    dn_resp_valid,
  input  logic [LINE_BYTES*8-1:0] dn_rdata
);

  localparam int unsigned LINE_W = LINE_BYTES * 8;
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES);
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W  = ADDR_W - OFF_W - SET_W;

  typedef logic [TAG_W-1:0]          tag_t;
  typedef logic [SET_W-1:0]          set_t;
  typedef logic [LINE_W-1:0]         line_t;
  typedef logic [WAYS-1:0][POS_W-1:0] stack_t;   // stack[p] = way at MRU position p

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_WAIT, S_WB, S_WB_WAIT, S_FILL, S_FILL_WAIT
  } state_t;
  // S_RESP is folded into a registered response pulse

  // storage
  tag_t   tag_q   [SETS][WAYS];
  line_t  data_q  [SETS][WAYS];
  logic [WAYS-1:0] valid_q [SETS];
  logic [WAYS-1:0] dirty_q [SETS];
  stack_t stack_q [SETS];

  // request registers
  state_t state_q;
  set_t   init_idx_q;
  cfg_t   cfg_q;
  logic   we_q, acct_q;
  tag_t   tag_req_q;
  set_t   set_req_q;
  line_t  wdata_q;
  logic [LINE_BYTES-1:0] wmask_q;
  logic [TID_W-1:0] tid_q;
  logic [7:0] elapsed_q, target_q;
  logic [POS_W-1:0] victim_q;
  logic   hit_q;
  logic   resp_q;
  line_t  rdata_q;

  // lookup (combinational, from the registered set index)
  logic   hit;
  pos_t   hit_pos;
  logic [POS_W-1:0] hit_way;
  stack_t cur_stack;

  always_comb begin
    cur_stack = stack_q[set_req_q];
    hit     = 1'b0;
    hit_pos = '0;
    hit_way = '0;
    for (int p = 0; p < WAYS; p++) begin
      if (!hit && valid_q[set_req_q][cur_stack[p]] &&
          tag_q[set_req_q][cur_stack[p]] == tag_req_q) begin
        hit     = 1'b1;
        hit_pos = pos_t'(p);
        hit_way = cur_stack[p];
      end
    end
  end

  // Move the entry at MRU position p to the front.
  function automatic stack_t promote(input stack_t s, input pos_t p);
    stack_t r;
    r[0] = s[p];
    for (int i = 1; i < WAYS; i++)
      r[i] = (i <= int'(p)) ? s[i-1] : s[i];
    return r;
  endfunction

  function automatic line_t merge(input line_t old, input line_t nw,
                                  input logic [LINE_BYTES-1:0] m);
    line_t r = old;
    for (int b = 0; b < LINE_BYTES; b++)
      if (m[b]) r[b*8 +: 8] = nw[b*8 +: 8];
    return r;
  endfunction

  logic [7:0] lat_hit, lat_miss;
  always_comb begin
    lat_hit  = (int'(hit_pos) < int'(A_WAYS[cfg_q])) ? 8'(LAT_A[cfg_q]) : 8'(LAT_B[cfg_q]);
    lat_miss = (A_WAYS[cfg_q] == WAYS) ? 8'(LAT_A[cfg_q]) : 8'(LAT_B[cfg_q]);
  end

  wire up_fire = up_req_valid && up_req_ready;
  assign up_req_ready = (state_q == S_IDLE) && !resp_q;

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_INIT;
      init_idx_q <= '0;
      resp_q     <= 1'b0;
      elapsed_q  <= '0;
      target_q   <= '0;
      hit_q      <= 1'b0;
      victim_q   <= '0;
      cfg_q      <= '0;
      we_q       <= 1'b0;
      acct_q     <= 1'b0;
      tag_req_q  <= '0;
      set_req_q  <= '0;
      wdata_q    <= '0;
      wmask_q    <= '0;
      tid_q      <= '0;
    end else begin
      resp_q <= 1'b0;
      unique case (state_q)
        S_INIT: begin
          init_idx_q <= init_idx_q + 1'b1;
          if (init_idx_q == set_t'(SETS - 1)) state_q <= S_IDLE;
        end
        S_IDLE: if (up_fire) begin
          cfg_q     <= cfg;
          we_q      <= up_we;
          acct_q    <= up_acct;
          tag_req_q <= up_addr[ADDR_W-1 -: TAG_W];
          set_req_q <= (SETS > 1) ? set_t'(up_addr[OFF_W +: SET_W]) : '0;
          wdata_q   <= up_wdata;
          wmask_q   <= up_wmask;
          tid_q     <= up_tid;
          elapsed_q <= 8'd1;
          state_q   <= S_LOOKUP;
        end
        S_LOOKUP: begin
          hit_q     <= hit;
          victim_q  <= cur_stack[WAYS-1];
          target_q  <= hit ? lat_hit : lat_miss;
          elapsed_q <= 8'd2;
          if (hit && lat_hit <= 8'd2) begin
            resp_q  <= 1'b1;
            state_q <= S_IDLE;
          end else if (!hit && lat_miss <= 8'd2) begin
            state_q <= S_WB;
          end else begin
            state_q <= S_WAIT;
          end
        end
        S_WAIT: begin
          elapsed_q <= elapsed_q + 1'b1;
          if (elapsed_q + 8'd1 >= target_q) begin
            if (hit_q) begin
              resp_q  <= 1'b1;
              state_q <= S_IDLE;
            end else begin
              state_q <= S_WB;
            end
          end
        end
        S_WB: begin
          // write back a dirty victim, otherwise go straight to the refill
          if (!(valid_q[set_req_q][victim_q] && dirty_q[set_req_q][victim_q]))
            state_q <= S_FILL;
          else if (dn_req_ready)
            state_q <= S_WB_WAIT;
        end
        S_WB_WAIT: if (dn_resp_valid) state_q <= S_FILL;
        S_FILL:      if (dn_req_ready) state_q <= S_FILL_WAIT;
        S_FILL_WAIT: if (dn_resp_valid) begin
          resp_q  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // storage updates (no reset: the S_INIT sweep initialises what is read)
  always_ff @(posedge clk) begin
    if (state_q == S_INIT) begin
      valid_q[init_idx_q] <= '0;
      dirty_q[init_idx_q] <= '0;
      for (int w = 0; w < WAYS; w++)
        stack_q[init_idx_q][w] <= POS_W'(w);
    end
    if (state_q == S_LOOKUP && hit) begin
      stack_q[set_req_q] <= promote(cur_stack, hit_pos);
      rdata_q <= merge(data_q[set_req_q][hit_way], wdata_q, we_q ? wmask_q : '0);
      if (we_q) begin
        data_q[set_req_q][hit_way]  <= merge(data_q[set_req_q][hit_way], wdata_q, wmask_q);
        dirty_q[set_req_q][hit_way] <= 1'b1;
      end
    end
    if (state_q == S_FILL_WAIT && dn_resp_valid) begin
      data_q[set_req_q][victim_q]  <= merge(dn_rdata, wdata_q, we_q ? wmask_q : '0);
      rdata_q                      <= merge(dn_rdata, wdata_q, we_q ? wmask_q : '0);
      tag_q[set_req_q][victim_q]   <= tag_req_q;
      valid_q[set_req_q][victim_q] <= 1'b1;
      dirty_q[set_req_q][victim_q] <= we_q;
      stack_q[set_req_q]           <= promote(stack_q[set_req_q], pos_t'(WAYS - 1));
    end
  end

  // downstream requests
  always_comb begin
    dn_req_valid = 1'b0;
    dn_we        = 1'b0;
    dn_addr      = '0;
    dn_wdata     = data_q[set_req_q][victim_q];
    if (state_q == S_WB && valid_q[set_req_q][victim_q] && dirty_q[set_req_q][victim_q]) begin
      dn_req_valid = 1'b1;
      dn_we        = 1'b1;
      dn_addr      = {tag_q[set_req_q][victim_q], set_req_q, {OFF_W{1'b0}}};
    end else if (state_q == S_FILL) begin
      dn_req_valid = 1'b1;
      dn_addr      = {tag_req_q, set_req_q, {OFF_W{1'b0}}};
    end
  end

  assign up_resp_valid = resp_q;
  assign up_rdata      = rdata_q;
  assign up_resp_hit   = hit_q;

  assign acct_valid = (state_q == S_LOOKUP) && acct_q;
  assign acct_tid   = tid_q;
  assign acct_hit   = hit;
  assign acct_pos   = hit_pos;

`ifndef SYNTHESIS
  a_dn_stable: assert property (@(posedge clk) disable iff (!rst_n)
    dn_req_valid && !dn_req_ready |=> dn_req_valid && $stable(dn_addr) && $stable(dn_we));
  a_no_req_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    up_resp_valid |-> !up_req_ready);
`endif

endmodule
