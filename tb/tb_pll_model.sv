// Behavioural model of the load/store domain clock generator (a PLL).
//
// Produces the domain clock at the frequency of the configuration on `cfg`
// (1.59, 1.00, 0.76, 0.44 GHz for D0..D3; the period is rounded to whole
// picoseconds). When `cfg` changes, the old frequency is kept for a lock
// time in LOCK_MIN_NS..LOCK_MAX_NS, then the new one takes over; `locked`
// is low meanwhile. The lock time is the mean of four uniform draws over
// that range, a bell-shaped spread around its middle (10-20 us with a
// 15 us mean by default). The domain keeps running on the old clock during
// the change. A testbench passes smaller bounds to keep simulations short.
`timescale 1ns / 1ps
module tb_pll_model #(
  parameter int unsigned LOCK_MIN_NS = 10000,
  parameter int unsigned LOCK_MAX_NS = 20000
) (
  input  logic [1:0] cfg,
  output logic       clk,
  output logic       locked,
  output int         n_changes
);

  realtime half_ns;
  logic [1:0] cur;

  function automatic realtime half_of(input logic [1:0] c);
    case (c)
      2'd0: return 0.3145;     // 629 ps period
      2'd1: return 0.5;
      2'd2: return 0.658;      // 1316 ps
      default: return 1.1365;  // 2273 ps
    endcase
  endfunction

  initial begin
    clk = 0; locked = 1; n_changes = 0; cur = 0;
    half_ns = half_of(2'd0);
    forever #(half_ns) clk = ~clk;
  end

  always @(cfg) begin
    if (cfg != cur) begin
      locked = 0;
      #((($urandom_range(LOCK_MIN_NS, LOCK_MAX_NS) + $urandom_range(LOCK_MIN_NS, LOCK_MAX_NS) +
          $urandom_range(LOCK_MIN_NS, LOCK_MAX_NS) + $urandom_range(LOCK_MIN_NS, LOCK_MAX_NS)) / 4) * 1.0);
      cur = cfg;
      half_ns = half_of(cfg);
      locked = 1;
      n_changes++;
    end
  end

endmodule
