// tb_bus_reg: behavioural model of a device under test with a tri-state
// 8-bit data bus. A rising edge on `wr` stores the bus; while `rd_n` is low
// the device drives the stored value onto the bus (bus_oe high).
module tb_bus_reg (
  input  logic       rd_n,
  input  logic       wr,
  input  logic [7:0] bus_in,
  output logic [7:0] bus_out,
  output logic       bus_oe
);
  timeunit 1ns; timeprecision 1ps;
  logic [7:0] q = '0;
  always @(posedge wr) q <= bus_in;
  assign bus_out = q;
  assign bus_oe  = !rd_n;
endmodule
