// tb_pipe_mult: behavioural model of a device under test, a one-stage
// pipelined 8 x 8 multiplier with a two-phase non-overlapping clock.
// The falling edge of phi1 moves the product of the input register to the
// result register; the falling edge of phi2 loads the input register from
// the input pins. A full phi1/phi2 cycle therefore presents, on the result
// pins, the product of the operands given one cycle earlier. `overlap`
// counts clock edges seen while both phases were high (a test error).
module tb_pipe_mult (
  input  logic       phi1,
  input  logic       phi2,
  input  logic [7:0] x,
  input  logic [7:0] y,
  output logic [7:0] r,
  output int         overlap
);
  timeunit 1ns; timeprecision 1ps;
  logic [7:0] xi = '0, yi = '0;
  initial begin r = '0; overlap = 0; end
  always @(negedge phi1) r <= 8'(xi * yi);
  always @(negedge phi2) begin xi <= x; yi <= y; end
  always @(posedge phi1 or posedge phi2) if (phi1 && phi2) overlap++;
endmodule
