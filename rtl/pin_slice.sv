// pin_slice: the three register levels of a group of test pins.
//
// The tester's datapath is split over several identical chips; this module
// is one of them. For each of its W pins it holds:
//   level 1  value and direction, written bit by bit (per-bit write enables)
//            by the host or by the offline sequencer while the previous
//            vector is still on the pins;
//   level 2  value and direction that actually drive the pin; all of level 1
//            is copied here in one clock when `xfer` (the drive clock) is high,
//            so every pin changes in unison;
//   level 3  the pin as seen on the board, captured when `latch` (the latch
//            clock) is high.
// A direction bit of 1 means the tester drives the pin (a device input); 0
// leaves the pin to the device. pin_o/pin_oe go to a tri-state pad, pin_i
// comes back from it. Everything resets to 0, so after reset no pin is driven.
// The three levels and the unison transfer follow the published tester; the
// write-enable style and the reset are this design's choices.
module pin_slice #(
  parameter int unsigned W = 22
) (
  input  logic         clk,
  input  logic         rst_n,
  // level 1 writes
  input  logic [W-1:0] d_we,     // value write enable per pin
  input  logic [W-1:0] d_wd,
  input  logic [W-1:0] r_we,     // direction write enable per pin
  input  logic [W-1:0] r_wd,
  // drive and latch clocks (one-cycle enables)
  input  logic         xfer,
  input  logic         latch,
  // register read-back
  output logic [W-1:0] l1_d,
  output logic [W-1:0] l1_r,
  output logic [W-1:0] l3,
  // pads
  output logic [W-1:0] pin_o,
  output logic [W-1:0] pin_oe,
  input  logic [W-1:0] pin_i
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_d   <= '0;
      l1_r   <= '0;
      pin_o  <= '0;
      pin_oe <= '0;
      l3     <= '0;
    end else begin
      l1_d <= (l1_d & ~d_we) | (d_wd & d_we);
      l1_r <= (l1_r & ~r_we) | (r_wd & r_we);
      if (xfer) begin
        pin_o  <= l1_d;
        pin_oe <= l1_r;
      end
      if (latch) l3 <= pin_i;
    end
  end

endmodule
