// HAMAT configuration controller, with the older AMAT policy as an option.
//
// At the end of every interval it picks the cache configuration (D0..D3)
// for the next interval: the one that would have given the highest average
// access rate over the interval just finished,
//   AAR[c] ~ sum over threads j of n_j / AMAT_j[c],  AMAT_j[c] = T_j[c] / n_j
// i.e. the lowest harmonic mean of the per-thread mean access times
// (HAMAT). n_j is thread j's number of L1 references and T_j[c] its total
// access time under configuration c, rebuilt from the accounting counts.
// The common factor 1/N is dropped. With one active thread the choice is the
// configuration with the lowest mean access time; with more threads it
// favours the threads that use the cache efficiently.
//
// With policy_amat = 1 it applies the original, single-thread policy
// instead: the configuration with the lowest total access time
// sum_j T_j[c] (lowest arithmetic mean access time over all references).
// That needs no reciprocals, so the dividers are skipped and the decision
// comes COST_W + 3 cycles (35 cycles) after interval_end.
//
// How it works: on interval_end (sampled only while idle, `accept` then
// pulses and the caller restarts its counters) one amat_unit per thread
// computes T_j[c] for all four configurations in COST_W cycles. Then, for
// one configuration after another, one divider per thread forms
// n_j^2 * 2^FRAC / T_j[c] (FRAC fraction bits) and the quotients are summed
// into aar[c]. Threads without references in the interval add nothing; if
// no thread made a reference, the configuration is kept. Ties go to the
// smaller configuration. cfg changes, and cfg_update pulses, about
// COST_W + 4 * (DIV_W + 2) cycles after interval_end (about 300 cycles).
//
// From the published design: the HAMAT criterion, the AMAT criterion it is
// compared with, the per-thread arithmetic circuits and their 32-cycle
// partial-product schedule. Choices of this
// RTL: doing the reciprocals with hardware dividers (the original leaves
// them to software on the core), the fixed-point scaling, the tie rule and
// ignoring an interval end that arrives while a decision is in progress.
// policy_amat is sampled with interval_end; aar is only updated by HAMAT
// decisions.
module hamat_ctrl
  import cache_pkg::*;
#(
  parameter int unsigned NT    = NTHREADS,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned FRAC  = 24,
  parameter int unsigned DIV_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             interval_end,
  input  logic             policy_amat,
  output logic             accept,
  input  logic [CNT_W-1:0] l1_hits   [NT][WAYS],
  input  logic [CNT_W-1:0] l1_misses [NT],
  input  logic [CNT_W-1:0] l2_hits   [NT][WAYS],
  input  logic [CNT_W-1:0] l2_misses [NT],
  output cfg_t             cfg,
  output logic             cfg_update,
  output logic             busy,
  output logic [DIV_W-1:0] aar [NUM_CFG]
);

  localparam int unsigned ACC_W = CNT_W + COST_W + $clog2(NTERMS);
  localparam int unsigned N_W   = CNT_W + $clog2(WAYS + 1);

  typedef enum logic [2:0] {C_IDLE, C_AMAT, C_DIV_START, C_DIV_WAIT, C_PICK} cstate_t;

  cstate_t state_q;
  logic [1:0] c_q;
  logic [N_W-1:0] n_q [NT];
  logic [CNT_W-1:0] counts [NT][NTERMS];
  logic [ACC_W-1:0] total [NT][NUM_CFG];
  logic [NT-1:0] amat_done, div_done;
  logic [DIV_W-1:0] quot [NT];
  logic [DIV_W-1:0] dividend [NT];
  logic [DIV_W-1:0] qsum;
  logic div_start;
  logic any_refs;
  logic pol_q;
  logic [ACC_W+1:0] tsum [NUM_CFG];

  assign accept    = (state_q == C_IDLE) && interval_end;
  assign busy      = (state_q != C_IDLE);
  assign div_start = (state_q == C_DIV_START);

  always_comb begin
    for (int j = 0; j < NT; j++) begin
      for (int p = 0; p < WAYS; p++) begin
        counts[j][p]          = l1_hits[j][p];
        counts[j][WAYS+1+p]   = l2_hits[j][p];
      end
      counts[j][WAYS]         = l1_misses[j];
      counts[j][NTERMS-1]     = l2_misses[j];
    end
  end

  for (genvar j = 0; j < NT; j++) begin : g_thread
    logic [ACC_W-1:0] tot [NUM_CFG];
    logic a_busy, d_busy;
    logic [2*N_W-1:0] nsq;

    amat_unit #(.CNT_W(CNT_W)) u_amat (
      .clk, .rst_n, .start(accept), .counts(counts[j]),
      .busy(a_busy), .done(amat_done[j]), .total(tot)
    );
    always_comb for (int c = 0; c < NUM_CFG; c++) total[j][c] = tot[c];

    assign nsq         = n_q[j] * n_q[j];
    assign dividend[j] = DIV_W'(nsq) << FRAC;

    seq_divider #(.W(DIV_W)) u_div (
      .clk, .rst_n, .start(div_start), .dividend(dividend[j]),
      .divisor(DIV_W'(total[j][c_q])), .busy(d_busy), .done(div_done[j]),
      .quotient(quot[j])
    );
  end

  always_comb begin
    qsum     = '0;
    any_refs = 1'b0;
    for (int j = 0; j < NT; j++) begin
      if (n_q[j] != '0) begin
        qsum     = qsum + quot[j];
        any_refs = 1'b1;
      end
    end
  end

  always_comb begin
    for (int c = 0; c < NUM_CFG; c++) begin
      tsum[c] = '0;
      for (int j = 0; j < NT; j++) tsum[c] = tsum[c] + (ACC_W+2)'(total[j][c]);
    end
  end

  cfg_t best, best_amat;
  always_comb begin
    best = '0;
    for (int c = 1; c < NUM_CFG; c++)
      if (aar[c] > aar[best]) best = cfg_t'(c);
    best_amat = '0;
    for (int c = 1; c < NUM_CFG; c++)
      if (tsum[c] < tsum[best_amat]) best_amat = cfg_t'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= C_IDLE;
      c_q        <= '0;
      cfg        <= '0;
      cfg_update <= 1'b0;
      pol_q      <= 1'b0;
      for (int j = 0; j < NT; j++) n_q[j] <= '0;
      for (int c = 0; c < NUM_CFG; c++) aar[c] <= '0;
    end else begin
      cfg_update <= 1'b0;
      unique case (state_q)
        C_IDLE: if (interval_end) begin
          for (int j = 0; j < NT; j++) begin
            logic [N_W-1:0] n;
            n = N_W'(l1_misses[j]);
            for (int p = 0; p < WAYS; p++) n = n + N_W'(l1_hits[j][p]);
            n_q[j] <= n;
          end
          pol_q   <= policy_amat;
          state_q <= C_AMAT;
        end
        C_AMAT: if (&amat_done) begin
          c_q     <= '0;
          state_q <= pol_q ? C_PICK : C_DIV_START;
        end
        C_DIV_START: state_q <= C_DIV_WAIT;
        C_DIV_WAIT: if (&div_done) begin
          aar[c_q] <= qsum;
          if (c_q == 2'(NUM_CFG - 1)) state_q <= C_PICK;
          else begin
            c_q     <= c_q + 1'b1;
            state_q <= C_DIV_START;
          end
        end
        C_PICK: begin
          if (any_refs) begin
            cfg        <= pol_q ? best_amat : best;
            cfg_update <= 1'b1;
          end
          state_q <= C_IDLE;
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

endmodule
