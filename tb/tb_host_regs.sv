// tb_host_regs: the host register file seen from the host bus.
// Checks every setting register (write, output, read back), that each
// command bit gives a one-clock strobe, the RAM access protocol (pending
// request, address and data frozen until acknowledged, address advancing,
// read buffer), the mapping of the pin words onto datapath words and lanes,
// and the status bits.
module tb_host_regs;
  timeunit 1ns; timeprecision 1ps;
  import tester_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we;
  logic [HOST_AW-1:0] host_addr;
  logic [HOST_W-1:0] host_wdata, host_rdata;
  logic cmd_next, cmd_start, cmd_stop, cmd_clear_done, loop_mode;
  delay_t delay;
  vec_idx_t start_vec, end_vec, cur_vec;
  logic hmem_req, hmem_ack;
  mem_req_t hmem_rq;
  mem_word_t hmem_rdata, hdp_wdata, hdp_rdata;
  logic step_busy, running, done;
  logic [31:0] steps;
  logic hdp_we;
  rec_word_t hdp_word, hdp_rd_word;
  logic [1:0] hdp_lanes;
  int checks = 0, failures = 0;

  host_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // drive one write; it takes effect at the next rising edge
  task automatic wr(host_reg_e a, logic [HOST_W-1:0] d, int off = 0);
    @(negedge clk);
    host_we = 1'b1; host_addr = HOST_AW'(a) + HOST_AW'(off); host_wdata = d;
  endtask
  task automatic idle();
    @(negedge clk); host_we = 1'b0; #0.1;
  endtask
  // combinational read: set the address, let it settle, sample
  logic [HOST_W-1:0] r1, r2;
  task automatic rd(host_reg_e a, output logic [HOST_W-1:0] v, input int off = 0);
    host_addr = HOST_AW'(a) + HOST_AW'(off);
    #0.1;
    v = host_rdata;
  endtask

  initial begin
    {host_we, host_addr, host_wdata, hmem_ack, hmem_rdata, hdp_rdata} = '0;
    {step_busy, running, done, cur_vec, steps} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    idle();
    check(delay == delay_t'(DELAY_MIN), "delay resets to the minimum");

    // settings
    wr(REG_MODE, 1);       idle(); rd(REG_MODE, r1); check(loop_mode && r1 == 1, "mode");
    wr(REG_DELAY, 123);    idle(); rd(REG_DELAY, r1); check(delay == 123 && r1 == 123, "delay");
    wr(REG_START, 4000);   idle(); rd(REG_START, r1); check(start_vec == 4000 && r1 == 4000, "start");
    wr(REG_END, 5460);     idle(); rd(REG_END, r1); check(end_vec == 5460 && r1 == 5460, "end");

    // command strobes last one clock
    for (int b = 0; b < 5; b++) begin
      if (b == CMD_MEM_READ) continue;
      wr(REG_CTRL, 1 << b);
      #0.1;
      check({cmd_clear_done, cmd_stop, cmd_start, cmd_next} ==
            4'(1 << (b == CMD_CLEAR_DONE ? 3 : b)), $sformatf("strobe %0d", b));
      idle();
      check({cmd_clear_done, cmd_stop, cmd_start, cmd_next} == '0, "strobe ends");
    end

    // RAM write
    wr(REG_MEM_ADDR, 100);
    wr(REG_MEM_LO, 32'h89AB_CDEF);
    wr(REG_MEM_HI, 32'h0123_4567);
    idle();
    check(hmem_req && hmem_rq.we && hmem_rq.addr == 100 &&
          hmem_rq.wdata == 64'h0123_4567_89AB_CDEF, "RAM write request");
    rd(REG_CTRL, r1); check(r1 == (1 << ST_MEM_BUSY), "RAM busy status");
    wr(REG_MEM_ADDR, 7); wr(REG_MEM_LO, 0); idle();
    check(hmem_rq.addr == 100 && hmem_rq.wdata[31:0] == 32'h89AB_CDEF, "request frozen");
    @(negedge clk); hmem_ack = 1'b1; @(negedge clk); hmem_ack = 1'b0;
    rd(REG_MEM_ADDR, r1); check(!hmem_req && r1 == 101, "write done, address advanced");

    // RAM read
    wr(REG_CTRL, 1 << CMD_MEM_READ); idle();
    check(hmem_req && !hmem_rq.we && hmem_rq.addr == 101, "RAM read request");
    @(negedge clk); hmem_ack = 1'b1; hmem_rdata = 64'hFEED_FACE_CAFE_F00D;
    @(negedge clk); hmem_ack = 1'b0; hmem_rdata = '0;
    rd(REG_MEM_LO, r1); rd(REG_MEM_HI, r2); check(r1 == 32'hCAFE_F00D && r2 == 32'hFEED_FACE, "read buffer");
    rd(REG_MEM_ADDR, r1); check(r1 == 102, "address advanced after read");

    // pin words: host word 0x10 + 2*k + half  ->  record word k, lane half
    for (int off = 0; off < 2 * VEC_WORDS; off++) begin
      logic [HOST_W-1:0] v = $urandom;
      wr(REG_L1_DATA, v, off);
      #0.1;
      if (off < 2 * REC_RESP)
        check(hdp_we && hdp_word == rec_word_t'(off / 2) && hdp_lanes == 2'(1 << (off % 2)) &&
              hdp_wdata == {v, v}, $sformatf("pin write %0d", off));
      else
        check(!hdp_we, $sformatf("response word %0d is read only", off));
      idle();
      hdp_rdata = {$urandom, $urandom};
      rd(REG_L1_DATA, r1, off); check(r1 == hdp_rdata[(off % 2) * HOST_W +: HOST_W] &&
            hdp_rd_word == rec_word_t'(off / 2), $sformatf("pin read %0d", off));
    end

    // status and counters
    step_busy = 1; running = 1; done = 1; cur_vec = 77; steps = 1234;
    rd(REG_CTRL, r1); check(r1 == ((1 << ST_STEP_BUSY) | (1 << ST_RUNNING) | (1 << ST_DONE)), "status bits");
    rd(REG_CUR_VEC, r1); rd(REG_STEPS, r2); check(r1 == 77 && r2 == 1234, "vector and step counters");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
