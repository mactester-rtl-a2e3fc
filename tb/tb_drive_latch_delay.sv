// tb_drive_latch_delay: measures the clocks from each drive pulse to its
// latch pulse for settings inside and outside the 4..200 clock range
// (20 ns .. 1 us at 5 ns) and checks the count equals the clamped setting,
// that exactly one latch follows each drive, and that busy covers the wait.
module tb_drive_latch_delay;
  timeunit 1ns; timeprecision 1ps;
  import tester_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  delay_t delay;
  logic drive, latch, busy;
  int checks = 0, failures = 0;

  drive_latch_delay dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int unsigned setting);
    int unsigned exp, n, latches;
    exp = setting < DELAY_MIN ? DELAY_MIN : (setting > DELAY_MAX ? DELAY_MAX : setting);
    @(negedge clk);
    delay = delay_t'(setting);
    drive = 1'b1;
    @(negedge clk);
    drive = 1'b0;
    n = 1; latches = 0;
    while (!latch && n < 400) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while waiting"); end
      @(negedge clk); n++;
    end
    checks++;
    if (n != exp) begin
      failures++;
      $display("FAIL setting %0d: latch after %0d clocks, expected %0d", setting, n, exp);
    end
    // no second latch
    repeat (10) begin
      @(negedge clk);
      if (latch) latches++;
    end
    checks++;
    if (latches != 0 || busy) begin failures++; $display("FAIL extra latch or busy stuck"); end
  endtask

  initial begin
    delay = '0; drive = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    measure(0); measure(3); measure(4); measure(5); measure(17);
    measure(199); measure(200); measure(201); measure(255);
    for (int i = 0; i < 50; i++) measure($urandom % 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
