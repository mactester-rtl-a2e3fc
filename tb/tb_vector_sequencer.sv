// tb_vector_sequencer: the sequencer against a behavioural RAM, datapath and
// delay kept in the testbench.
//  - host RAM writes fill NV vectors; an offline run start..end must drive
//    each vector in order and write back, into its response words, the
//    response the testbench's pins give (value XOR direction, rotated);
//  - the period between drive pulses must be 6 RAM cycles + 2 clocks;
//  - done must rise at the end, loop mode must replay the sequence until a
//    stop, an online step must give exactly one drive and one latch.
module tb_vector_sequencer;
  timeunit 1ns; timeprecision 1ps;
  import tester_pkg::*;
  localparam int unsigned ACC = 6;    // RAM cycle in clocks
  localparam int unsigned DLY = 9;    // drive to latch in clocks
  localparam int unsigned NV  = 12;   // vectors used
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_next, cmd_start, cmd_stop, cmd_clear_done, loop_mode;
  vec_idx_t start_vec, end_vec, cur_vec;
  logic hmem_req, hmem_ack, mem_req, mem_ack, drive, latch;
  mem_req_t hmem_rq, mem_rq;
  mem_word_t mem_rdata, dp_wdata, dp_rdata;
  logic dp_we, dp_rd_active, step_busy, running, done;
  rec_word_t dp_word, dp_rd_word;
  logic [31:0] steps;
  int checks = 0, failures = 0;

  vector_sequencer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- behavioural RAM: ack in clock ACC-1 after the request ----
  mem_word_t ram [MEM_DEPTH];
  int rcnt = -1;
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (rcnt < 0) begin
      if (mem_req && !mem_ack) rcnt <= ACC - 3;
    end else if (rcnt == 0) begin
      mem_ack <= 1'b1;
      if (mem_rq.we) ram[mem_rq.addr] <= mem_rq.wdata;
      mem_rdata <= ram[mem_rq.addr];
      rcnt <= -1;
    end else rcnt <= rcnt - 1;
  end

  // ---- behavioural datapath and delay ----
  mem_word_t l1 [2*FIELD_WORDS];
  mem_word_t l2 [2*FIELD_WORDS];
  mem_word_t l3 [FIELD_WORDS];
  int dcnt = -1;
  int drives = 0, latches = 0;
  int unsigned drive_t[$];
  int unsigned cyc = 0;
  mem_word_t driven[$];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    latch <= 1'b0;
    if (dp_we) l1[dp_word] <= dp_wdata;
    if (drive) begin
      for (int i = 0; i < 2*FIELD_WORDS; i++) l2[i] <= l1[i];
      driven.push_back(l1[0]);
      drive_t.push_back(cyc);
      drives++;
      dcnt <= DLY - 1;
    end else if (dcnt > 0) begin
      if (dcnt == 1) latch <= 1'b1;
      dcnt <= dcnt - 1;
    end
    if (latch) begin
      latches++;
      for (int i = 0; i < FIELD_WORDS; i++)
        l3[i] <= pins(l2[i], l2[FIELD_WORDS + i]);
    end
  end
  function automatic mem_word_t pins(mem_word_t v, mem_word_t d);
    return {v[0], v[MEM_W-1:1]} ^ d;
  endfunction
  always_comb begin
    dp_rdata = '0;
    if (dp_rd_word >= REC_RESP) dp_rdata = l3[dp_rd_word - REC_RESP];
    else if (dp_rd_word < rec_word_t'(2*FIELD_WORDS)) dp_rdata = l1[dp_rd_word];
  end

  // ---- host side helpers ----
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0;
  endtask
  task automatic host_write(mem_addr_t a, mem_word_t d);
    @(negedge clk);
    hmem_rq = '{we: 1'b1, addr: a, wdata: d};
    hmem_req = 1'b1;
    do @(negedge clk); while (!hmem_ack);
    @(posedge clk); #1 hmem_req = 1'b0;
  endtask
  task automatic host_read(mem_addr_t a, output mem_word_t d);
    @(negedge clk);
    hmem_rq = '{we: 1'b0, addr: a, wdata: '0};
    hmem_req = 1'b1;
    do @(negedge clk); while (!hmem_ack);
    @(posedge clk); d = mem_rdata; #1 hmem_req = 1'b0;
  endtask

  mem_word_t vd [NV][2*FIELD_WORDS];

  initial begin
    mem_word_t r;
    int unsigned d0;
    {cmd_next, cmd_start, cmd_stop, cmd_clear_done, loop_mode, hmem_req} = '0;
    start_vec = '0; end_vec = '0; hmem_rq = '0; mem_rdata = '0;
    foreach (l1[i]) l1[i] = '0;
    foreach (l2[i]) l2[i] = '0;
    foreach (l3[i]) l3[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // download NV vectors
    for (int v = 0; v < NV; v++)
      for (int w = 0; w < 2*FIELD_WORDS; w++) begin
        vd[v][w] = {$urandom, $urandom};
        host_write(rec_addr(vec_idx_t'(v), rec_word_t'(w)), vd[v][w]);
      end
    host_read(rec_addr(vec_idx_t'(3), rec_word_t'(1)), r);
    check(r == vd[3][1], "host read back");

    // ---- offline run of vectors 2..9 ----
    start_vec = 2; end_vec = 9;
    drives = 0; latches = 0; driven.delete(); drive_t.delete();
    pulse(cmd_start);
    check(running, "running after start");
    while (!done) @(negedge clk);
    check(!running, "not running when done");
    check(drives == 8 && latches == 8, $sformatf("8 drives/latches, got %0d/%0d", drives, latches));
    for (int i = 0; i < driven.size(); i++)
      check(driven[i] == vd[2 + i][0], $sformatf("vector %0d driven in order", 2 + i));
    for (int i = 1; i < drive_t.size(); i++)
      check(drive_t[i] - drive_t[i-1] == 6 * ACC + 2,
            $sformatf("vector period %0d, expected %0d", drive_t[i] - drive_t[i-1], 6 * ACC + 2));
    check(cur_vec == 9, "cur_vec is the last vector");
    for (int v = 2; v <= 9; v++)
      for (int w = 0; w < FIELD_WORDS; w++) begin
        host_read(rec_addr(vec_idx_t'(v), rec_word_t'(REC_RESP + w)), r);
        check(r == pins(vd[v][w], vd[v][FIELD_WORDS + w]), $sformatf("response of vector %0d word %0d", v, w));
      end
    host_read(rec_addr(vec_idx_t'(10), REC_RESP), r);
    pulse(cmd_clear_done);
    check(!done, "done cleared");

    // ---- one-vector run ----
    start_vec = 5; end_vec = 5; drives = 0;
    pulse(cmd_start);
    while (!done) @(negedge clk);
    check(drives == 1, "single vector run");

    // ---- loop mode: 0..3 repeated until stop ----
    start_vec = 0; end_vec = 3; loop_mode = 1'b1; drives = 0; driven.delete();
    pulse(cmd_clear_done);
    pulse(cmd_start);
    while (drives < 10) @(negedge clk);
    check(!done && running, "loop still running");
    pulse(cmd_stop);
    while (!done) @(negedge clk);
    check(drives >= 10 && drives <= 12, $sformatf("loop stopped after %0d vectors", drives));
    for (int i = 0; i < driven.size(); i++)
      check(driven[i] == vd[i % 4][0], $sformatf("loop order at %0d", i));
    loop_mode = 1'b0;

    // ---- online step ----
    drives = 0; latches = 0;
    @(negedge clk); cmd_next = 1'b1; @(negedge clk); cmd_next = 1'b0;
    check(step_busy, "step busy");
    d0 = steps;
    while (step_busy) @(negedge clk);
    check(drives == 1 && latches == 1, "online step: one drive, one latch");
    check(steps == d0 + 1, "step counter");
    repeat (20) @(negedge clk);
    check(drives == 1, "no stray drive");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
