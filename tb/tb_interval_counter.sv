// Self-checking testbench of interval_counter.
//
// Feeds random commit counts (0..24 per cycle) and checks that
// interval_end pulses exactly in the cycle after the running total crosses
// each multiple of INTERVAL (15,000), with the overshoot carried into the
// next interval.
module tb_interval_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] retire_cnt;
  logic interval_end;

  interval_counter dut (.*);

  int checks = 0, failures = 0, ends = 0;
  longint total = 0;
  bit expect_end = 0;

  initial begin
    retire_cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      checks++;
      if (interval_end != expect_end) begin
        failures++; $display("FAIL interval_end=%0b exp %0b at step %0d", interval_end, expect_end, i);
      end
      if (interval_end) ends++;
      retire_cnt = 5'($urandom_range(0, 24));
      expect_end = ((total + retire_cnt) / 15000) != (total / 15000);
      total += retire_cnt;
    end
    checks++;
    if (ends != int'(total / 15000) && ends != int'(total / 15000) - 1) failures++;
    $display("intervals=%0d instructions=%0d", ends, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
