// Unsigned restoring divider, one quotient bit per cycle.
//
// `start` captures dividend and divisor; `done` pulses W + 1 cycles later
// with quotient = dividend / divisor, whatever the operands (a zero
// divisor gives an all-ones quotient), so parallel dividers finish
// together. Used by the configuration controller for the reciprocal of each
// thread's mean access time.
module seq_divider #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);

  localparam int unsigned CW = $clog2(W) + 1;

  logic [W-1:0] rem_q, dsr_q;
  logic [CW-1:0] cnt_q;
  logic [W:0]   trial;

  assign trial = {rem_q, quotient[W-1]} - {1'b0, dsr_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      rem_q    <= '0;
      dsr_q    <= '0;
      cnt_q    <= '0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        rem_q    <= '0;
        dsr_q    <= divisor;
        quotient <= dividend;          // shifted out MSB first, quotient shifts in
        cnt_q    <= CW'(W);
      end else if (busy) begin
        if (!trial[W]) begin
          rem_q    <= trial[W-1:0];
          quotient <= {quotient[W-2:0], 1'b1};
        end else begin
          rem_q    <= {rem_q[W-2:0], quotient[W-1]};
          quotient <= {quotient[W-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
