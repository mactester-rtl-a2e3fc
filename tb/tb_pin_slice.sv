// tb_pin_slice: random test of one pin slice against a reference model.
// Random per-bit writes of level 1, random drive and latch enables and
// random pin inputs; after every clock the level 1, level 2 (pin_o/pin_oe)
// and level 3 registers are compared with a model kept in the testbench.
// Also checks that a level 1 write does not reach the pins until a drive.
module tb_pin_slice;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned W = 22;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d_we, d_wd, r_we, r_wd, pin_i, l1_d, l1_r, l3, pin_o, pin_oe;
  logic xfer, latch;
  logic [W-1:0] m_l1d, m_l1r, m_o, m_oe, m_l3;
  int checks = 0, failures = 0, held = 0;

  pin_slice #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    {d_we, d_wd, r_we, r_wd, pin_i, xfer, latch} = '0;
    {m_l1d, m_l1r, m_o, m_oe, m_l3} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      d_we  = W'($urandom);  d_wd = W'($urandom);
      r_we  = W'($urandom);  r_wd = W'($urandom);
      pin_i = W'($urandom);
      xfer  = ($urandom % 4) == 0;
      latch = ($urandom % 4) == 0;
      @(posedge clk);
      // model, using the values before the edge
      if (xfer) begin m_o = m_l1d; m_oe = m_l1r; end
      else if ((d_we & (d_wd ^ m_l1d)) != '0) held++;
      if (latch) m_l3 = pin_i;
      m_l1d = (m_l1d & ~d_we) | (d_wd & d_we);
      m_l1r = (m_l1r & ~r_we) | (r_wd & r_we);
      #1;
      check("l1_d", l1_d, m_l1d);
      check("l1_r", l1_r, m_l1r);
      check("pin_o", pin_o, m_o);
      check("pin_oe", pin_oe, m_oe);
      check("l3", l3, m_l3);
    end
    checks++;
    if (held == 0) begin failures++; $display("FAIL no write was held back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
