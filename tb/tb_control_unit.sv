// tb_control_unit: the control chip driven from its host bus, with a
// behavioural vector RAM and datapath in the testbench.
// Checks: an online step gives one drive clock and, exactly DELAY clocks
// later, one latch clock; host writes of the pin words reach the datapath
// port with the right word and lane; during an offline run the datapath port
// belongs to the sequencer (a host write to level 1 is dropped); an offline
// run of 4 vectors loads each vector's value and direction words, drives
// them in order and stores each response into the RAM; done and status.
module tb_control_unit;
  timeunit 1ns; timeprecision 1ps;
  import tester_pkg::*;
  localparam int unsigned ACC = ACCESS_CLKS;
  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [HOST_W-1:0] host_wdata = '0, host_rdata;
  logic mem_req, mem_ack, dp_we, xfer, latch, running, done;
  mem_req_t mem_rq;
  mem_word_t mem_rdata, dp_wdata, dp_rdata;
  rec_word_t dp_word, dp_rd_word;
  logic [1:0] dp_lanes;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #2.5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // behavioural RAM: ack in clock ACC-1 after the request
  mem_word_t ram [1024];
  int rcnt = -1;
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (rcnt < 0) begin
      if (mem_req && !mem_ack) rcnt <= ACC - 3;
    end else if (rcnt == 0) begin
      mem_ack <= 1'b1;
      if (mem_rq.we) ram[mem_rq.addr[9:0]] <= mem_rq.wdata;
      mem_rdata <= ram[mem_rq.addr[9:0]];
      rcnt <= -1;
    end else rcnt <= rcnt - 1;
  end

  // behavioural datapath: L1 words, L2 on drive, L3 = ~L2 value on latch
  mem_word_t l1 [2*FIELD_WORDS], l2 [2*FIELD_WORDS], l3 [FIELD_WORDS];
  int xfers = 0, latches = 0;
  int unsigned xfer_t, latch_t;
  mem_word_t driven[$];
  always @(posedge clk) begin
    if (dp_we)
      for (int h = 0; h < 2; h++)
        if (dp_lanes[h]) l1[dp_word][h*HOST_W +: HOST_W] <= dp_wdata[h*HOST_W +: HOST_W];
    if (xfer) begin
      for (int i = 0; i < 2*FIELD_WORDS; i++) l2[i] <= l1[i];
      driven.push_back(l1[0]);
      xfers++; xfer_t = cyc;
    end
    if (latch) begin
      for (int i = 0; i < FIELD_WORDS; i++) l3[i] <= ~l2[i];
      latches++; latch_t = cyc;
    end
  end
  always_comb begin
    dp_rdata = '0;
    if (dp_rd_word >= REC_RESP) dp_rdata = l3[dp_rd_word - REC_RESP];
    else if (dp_rd_word < rec_word_t'(2*FIELD_WORDS)) dp_rdata = l1[dp_rd_word];
  end

  task automatic hw(host_reg_e a, logic [HOST_W-1:0] d, int off = 0);
    @(negedge clk);
    host_we = 1'b1; host_addr = HOST_AW'(a) + HOST_AW'(off); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask
  task automatic hr(host_reg_e a, output logic [HOST_W-1:0] d, input int off = 0);
    host_addr = HOST_AW'(a) + HOST_AW'(off);
    #0.5;
    d = host_rdata;
  endtask

  mem_word_t vd [4][2*FIELD_WORDS];
  logic [HOST_W-1:0] s;

  initial begin
    foreach (l1[i]) begin l1[i] = '0; l2[i] = '0; end
    foreach (l3[i]) l3[i] = '0;
    mem_rdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // host pin writes
    hw(REG_L1_DATA, 32'h1111_2222, 3);    // word 1, upper lane
    check(l1[1][63:32] == 32'h1111_2222, "L1 data word 1 upper lane");
    hw(REG_L1_DIR, 32'hA5A5_5A5A, 0);     // word 2, lower lane
    check(l1[2][31:0] == 32'hA5A5_5A5A, "L1 direction word 0 lower lane");
    hr(REG_L1_DIR, s, 0);
    check(s == 32'hA5A5_5A5A, "L1 readback");

    // online steps at several delays
    for (int n = 0; n < 3; n++) begin
      int unsigned d;
      d = (n == 0) ? 4 : (n == 1) ? 13 : 200;
      hw(REG_DELAY, d);
      xfers = 0; latches = 0;
      hw(REG_CTRL, 1 << CMD_NEXT);
      do begin @(negedge clk); hr(REG_CTRL, s); end while (s[ST_STEP_BUSY]);
      check(xfers == 1 && latches == 1, "one drive and one latch per step");
      check(latch_t - xfer_t == d, $sformatf("latch %0d clocks after drive, expected %0d", latch_t - xfer_t, d));
      check(l2[1] == l1[1], "level 2 loaded");
    end
    hr(REG_L3_RESP, s, 3);
    check(s == ~l2[1][63:32], "L3 read through the host bus");

    // offline: 4 vectors at 10..13
    for (int v = 0; v < 4; v++)
      for (int k = 0; k < 2*FIELD_WORDS; k++) begin
        vd[v][k] = {$urandom, $urandom};
        hw(REG_MEM_ADDR, rec_addr(vec_idx_t'(10 + v), rec_word_t'(k)));
        hw(REG_MEM_LO, vd[v][k][31:0]);
        hw(REG_MEM_HI, vd[v][k][63:32]);
        do begin @(negedge clk); hr(REG_CTRL, s); end while (s[ST_MEM_BUSY]);
        check(ram[rec_addr(vec_idx_t'(10 + v), rec_word_t'(k))] == vd[v][k], "RAM write through host");
      end
    hw(REG_DELAY, 6);
    hw(REG_START, 10); hw(REG_END, 13);
    driven.delete(); xfers = 0;
    hw(REG_CTRL, 1 << CMD_START);
    check(running, "running");
    repeat (10) @(negedge clk);
    hw(REG_L1_DATA, 32'hDEAD_BEEF, 0);    // must be dropped while running
    while (!done) @(negedge clk);
    check(xfers == 4, "four vectors driven");
    foreach (driven[i]) check(driven[i] == vd[i][0], $sformatf("vector %0d driven", i));
    for (int v = 0; v < 4; v++)
      for (int k = 0; k < FIELD_WORDS; k++)
        check(ram[rec_addr(vec_idx_t'(10 + v), rec_word_t'(REC_RESP + k))] == ~vd[v][k],
              $sformatf("response of vector %0d word %0d", v, k));
    check(l1[0] == vd[3][0], "host write dropped during the run");
    hr(REG_CTRL, s);
    check(s[ST_DONE] && !s[ST_RUNNING], "status done");
    hw(REG_CTRL, 1 << CMD_CLEAR_DONE);
    check(!done, "done cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
