// tb_dyn_mult: behavioural model of a dynamic device under test, the
// one-stage pipelined multiplier of tb_pipe_mult whose input register is
// dynamic: it keeps its value only for HOLD_NS after it was loaded (the
// falling edge of phi2). If the next phi1 falling edge comes later than
// that, the stored operands have leaked away and the result register gets
// a wrong value (the true product inverted), and `lost` is counted.
module tb_dyn_mult #(
  parameter int HOLD_NS = 10000
) (
  input  logic       phi1,
  input  logic       phi2,
  input  logic [7:0] x,
  input  logic [7:0] y,
  output logic [7:0] r,
  output int         lost
);
  timeunit 1ns; timeprecision 1ps;
  logic [7:0] xi = '0, yi = '0;
  realtime loaded = 0;
  initial begin r = '0; lost = 0; end
  always @(negedge phi1) begin
    if ($realtime - loaded > HOLD_NS) begin
      r <= ~8'(xi * yi);
      lost++;
    end else begin
      r <= 8'(xi * yi);
    end
  end
  always @(negedge phi2) begin xi <= x; yi <= y; loaded = $realtime; end
endmodule
