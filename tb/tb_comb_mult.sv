// tb_comb_mult: behavioural model of a device under test, an 8 x 8
// combinational multiplier that returns the low 8 bits of the product after
// a propagation delay of PD_NS (transport delay). Used to test the tester.
module tb_comb_mult #(
  parameter int PD_NS = 37
) (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] p
);
  timeunit 1ns; timeprecision 1ps;
  initial p = '0;
  always @(a or b) p <= #(PD_NS * 1ns) 8'(a * b);
endmodule
