// Per-thread total access time, for every configuration at once.
//
// For each configuration c the unit computes
//   total[c] = sum over terms t of count[t] * cost(c, t)
// where the 18 terms are the thread's L1 hits per MRU position, L1 misses,
// L2 hits per MRU position and L2 misses, and cost(c, t) is the time in
// picoseconds one such reference costs under configuration c (see
// cache_pkg). Dividing total[c] by the thread's reference count would give
// its arithmetic-mean access time; the division is left to the controller.
//
// The multiplications are done with a binary adder tree and one partial
// product per cycle, as in the published circuit: the cost constants are
// scanned from their most significant bit down, and each cycle every
// accumulator doubles and adds the sum of the counts whose cost has a one
// in the current bit. A decision therefore takes COST_W (= 32) cycles:
// `start` captures the counts, and `done` pulses COST_W + 1 cycles later,
// with `total` valid from then until the next start.
module amat_unit
  import cache_pkg::*;
#(
  parameter int unsigned CNT_W = 16,
  parameter int unsigned ACC_W = CNT_W + COST_W + $clog2(NTERMS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] counts [NTERMS],
  output logic             busy,
  output logic             done,
  output logic [ACC_W-1:0] total  [NUM_CFG]
);

  localparam int unsigned BIT_W = $clog2(COST_W);
  localparam int unsigned SUM_W = CNT_W + $clog2(NTERMS);

  logic [CNT_W-1:0] cnt_q [NTERMS];
  logic [BIT_W-1:0] bit_q;
  logic [SUM_W-1:0] pp [NUM_CFG];

  // adder tree: one partial product per configuration and cycle
  always_comb begin
    for (int c = 0; c < NUM_CFG; c++) begin
      logic [COST_W-1:0] k;
      pp[c] = '0;
      for (int t = 0; t < NTERMS; t++) begin
        k = COST_W'(cost(c, t));
        if (k[bit_q]) pp[c] = pp[c] + SUM_W'(cnt_q[t]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      bit_q <= '0;
      for (int t = 0; t < NTERMS; t++) cnt_q[t] <= '0;
      for (int c = 0; c < NUM_CFG; c++) total[c] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        bit_q <= BIT_W'(COST_W - 1);
        cnt_q <= counts;
        for (int c = 0; c < NUM_CFG; c++) total[c] <= '0;
      end else if (busy) begin
        for (int c = 0; c < NUM_CFG; c++)
          total[c] <= {total[c][ACC_W-2:0], 1'b0} + ACC_W'(pp[c]);
        bit_q <= bit_q - 1'b1;
        if (bit_q == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
