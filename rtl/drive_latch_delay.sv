// drive_latch_delay: programmable interval from the drive clock to the latch
// clock.
//
// A one-cycle `drive` pulse starts the interval; `latch` pulses exactly D
// clocks later, where D is the programmed `delay` clamped to
// [DELAY_MIN, DELAY_MAX]. The level 2 registers load at the end of the drive
// cycle and level 3 at the end of the latch cycle, so the device sees stable
// inputs for D clock periods before its outputs are sampled: with a 5 ns
// clock, 20 ns to 1 us in 5 ns steps, the range of the published tester.
// The original tapped a chain of logic levels with a multiplexer; this
// design counts clocks instead, which gives the same steps in synchronous
// logic. `busy` is high from the drive pulse through the latch pulse. A
// drive pulse while busy restarts the interval.
module drive_latch_delay
  import tester_pkg::*;
#(
  parameter int unsigned DMIN = tester_pkg::DELAY_MIN,
  parameter int unsigned DMAX = tester_pkg::DELAY_MAX
) (
  input  logic   clk,
  input  logic   rst_n,
  input  delay_t delay,
  input  logic   drive,
  output logic   latch,
  output logic   busy
);

  delay_t eff, cnt;

  always_comb begin
    if (delay < delay_t'(DMIN))      eff = delay_t'(DMIN);
    else if (delay > delay_t'(DMAX)) eff = delay_t'(DMAX);
    else                             eff = delay;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      busy  <= 1'b0;
      latch <= 1'b0;
    end else begin
      latch <= 1'b0;
      if (drive) begin
        busy <= 1'b1;
        cnt  <= eff - delay_t'(1);
      end else if (busy && !latch) begin
        if (cnt == delay_t'(1)) latch <= 1'b1;
        cnt <= cnt - delay_t'(1);
      end else if (latch) begin
        busy <= 1'b0;
      end
    end
  end

endmodule
