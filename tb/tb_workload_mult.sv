// tb_workload_mult: two multiplier test programs, a static and a pipelined
// one, run on the whole tester at its default sizes.
//  - Combinational multiplier, online: all 256 x 256 operand pairs, one
//    online step each (65536 steps), result checked after every step.
//  - One-stage pipelined multiplier with a two-phase clock, offline: for a
//    multiplier value i, a dynamic block of 1290 vectors (pipeline fill,
//    256 products of 5 vectors each, flush) is generated, downloaded into the
//    vector RAM, played offline, uploaded and verified. Every I_STEP-th value
//    of i is run to keep the simulation short; the blocks differ only in
//    their data. The offline time of every block is checked against six RAM
//    cycles + 2 clocks per vector.
//  - One more dynamic block of 5460 vectors fills the vector RAM, the
//    largest block it holds.
// Board, devices and host layer are as in tb_mactester.
module tb_workload_mult;
  timeunit 1ns; timeprecision 1ps;
  import tester_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [HOST_W-1:0] host_wdata = '0, host_rdata;
  logic [PINS-1:0] pin_o, pin_oe, pin_i;
  logic running, done;
  int checks = 0, failures = 0;

  localparam int unsigned I_STEP = 4;    // multiplier values per dynamic block run

  mactester dut (.*);

  always #2.5 clk = ~clk;   // 200 MHz
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ---------------------------------------------------------------- board
  logic [PINS-1:0] dev_out, dev_oe;
  logic [7:0] cm_p, pm_r, bus_q;
  logic bus_oe;
  int pm_overlap;
  int contention = 0;

  always_comb begin
    dev_out = '0;
    dev_oe  = '0;
    dev_out[25:18] = cm_p;  dev_oe[25:18] = '1;
    dev_out[55:48] = pm_r;  dev_oe[55:48] = '1;
    dev_out[103:96] = bus_q; dev_oe[103:96] = {8{bus_oe}};
  end
  assign pin_i = (pin_oe & pin_o) | (~pin_oe & dev_oe & dev_out);
  always @(posedge clk) if ((pin_oe & dev_oe) != '0) contention++;

  tb_comb_mult u_cm (
    .a({pin_i[16], pin_i[14], pin_i[12], pin_i[10], pin_i[8], pin_i[6], pin_i[4], pin_i[2]}),
    .b({pin_i[17], pin_i[15], pin_i[13], pin_i[11], pin_i[9], pin_i[7], pin_i[5], pin_i[3]}),
    .p(cm_p));
  tb_pipe_mult u_pm (.phi1(pin_i[56]), .phi2(pin_i[57]), .x(pin_i[39:32]), .y(pin_i[47:40]),
                     .r(pm_r), .overlap(pm_overlap));
  tb_bus_reg u_bus (.rd_n(pin_i[104]), .wr(pin_i[105]), .bus_in(pin_i[103:96]),
                    .bus_out(bus_q), .bus_oe(bus_oe));

  // ----------------------------------------------------------- host bus
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
  task automatic wait_status_clear(int bitno);
    logic [HOST_W-1:0] s;
    do begin @(negedge clk); hr(REG_CTRL, s); end while (s[bitno]);
  endtask

  // ------------------------------------------------- test-program layer
  typedef int pinlist_t[];
  pinlist_t MPLIER = '{2, 4, 6, 8, 10, 12, 14, 16};   // first pin = bit 0
  pinlist_t MCAND  = '{3, 5, 7, 9, 11, 13, 15, 17};
  pinlist_t RESULT = '{18, 19, 20, 21, 22, 23, 24, 25};
  pinlist_t PX     = '{32, 33, 34, 35, 36, 37, 38, 39};
  pinlist_t PY     = '{40, 41, 42, 43, 44, 45, 46, 47};
  pinlist_t PR     = '{48, 49, 50, 51, 52, 53, 54, 55};
  pinlist_t PHI1   = '{56};
  pinlist_t PHI2   = '{57};
  pinlist_t BUS    = '{96, 97, 98, 99, 100, 101, 102, 103};
  pinlist_t RD_N   = '{104};
  pinlist_t WR     = '{105};
  pinlist_t LOOPP  = '{120, 121};

  logic [PINS-1:0] sh_val = '0, sh_dir = '0;        // accumulated settings
  logic [PINS-1:0] hw_val = '0, hw_dir = '0;        // what level 1 holds
  logic [PINS-1:0] resp = '0;                       // last response
  typedef enum {ONLINE, GENERATE, VERIFY} phase_e;
  phase_e phase = ONLINE;
  logic [2*PINS-1:0] vq[$];                         // generated vectors
  logic [PINS-1:0]   rq[$];                         // uploaded responses
  int online_steps = 0, offline_vectors = 0, dir_changes = 0, early_latch = 0;
  int loop_wraps = 0, done_seen = 0, mem_reads = 0;

  task automatic set_signal(pinlist_t p, int unsigned v);
    if (phase == VERIFY) return;      // only the generate phase sets pins
    foreach (p[k]) sh_val[p[k]] = v[k];
  endtask
  task automatic set_direction(pinlist_t p, logic drive);
    if (phase == VERIFY) return;
    foreach (p[k]) begin
      if (sh_dir[p[k]] != drive) dir_changes++;
      sh_dir[p[k]] = drive;
    end
  endtask
  function automatic int unsigned get_signal(pinlist_t p);
    int unsigned v = 0;
    foreach (p[k]) v[k] = resp[p[k]];
    return v;
  endfunction

  task automatic next();
    logic [HOST_W-1:0] s;
    case (phase)
      GENERATE: vq.push_back({sh_dir, sh_val});
      VERIFY:   resp = rq.pop_front();
      default: begin
        for (int w = 0; w < PINS / HOST_W; w++) begin
          if (sh_val[w*HOST_W +: HOST_W] != hw_val[w*HOST_W +: HOST_W])
            hw(REG_L1_DATA, sh_val[w*HOST_W +: HOST_W], w);
          if (sh_dir[w*HOST_W +: HOST_W] != hw_dir[w*HOST_W +: HOST_W])
            hw(REG_L1_DIR, sh_dir[w*HOST_W +: HOST_W], w);
        end
        hw_val = sh_val; hw_dir = sh_dir;
        hw(REG_CTRL, 1 << CMD_NEXT);
        wait_status_clear(ST_STEP_BUSY);
        for (int w = 0; w < PINS / HOST_W; w++) begin
          hr(REG_L3_RESP, s, w);
          resp[w*HOST_W +: HOST_W] = s;
        end
        online_steps++;
      end
    endcase
  endtask

  // RAM access through the host registers
  task automatic ram_write(mem_addr_t a, mem_word_t d);
    hw(REG_MEM_ADDR, HOST_W'(a));
    hw(REG_MEM_LO, d[31:0]);
    hw(REG_MEM_HI, d[63:32]);
    wait_status_clear(ST_MEM_BUSY);
  endtask
  task automatic ram_read(mem_addr_t a, output mem_word_t d);
    logic [HOST_W-1:0] lo, hi;
    hw(REG_MEM_ADDR, HOST_W'(a));
    hw(REG_CTRL, 1 << CMD_MEM_READ);
    wait_status_clear(ST_MEM_BUSY);
    hr(REG_MEM_LO, lo); hr(REG_MEM_HI, hi);
    d = {hi, lo};
    mem_reads++;
  endtask

  // Offline run of the generated vectors; the responses go to rq.
  task automatic run_offline(int unsigned delay_clks);
    longint unsigned t0, t1, expect_t;
    int unsigned n = vq.size();
    mem_word_t w;
    for (int v = 0; v < n; v++)
      for (int k = 0; k < 2 * FIELD_WORDS; k++)
        ram_write(rec_addr(vec_idx_t'(v), rec_word_t'(k)),
                  vq[v][k*MEM_W +: MEM_W]);
    hw(REG_START, 0);
    hw(REG_END, n - 1);
    hw(REG_MODE, 0);
    @(negedge clk);
    host_we = 1'b1; host_addr = HOST_AW'(REG_CTRL);
    host_wdata = (1 << CMD_START) | (1 << CMD_CLEAR_DONE);
    t0 = cyc;
    @(negedge clk); host_we = 1'b0;
    while (!done) @(negedge clk);
    t1 = cyc;
    done_seen++;
    offline_vectors += n;
    // preload of the first vector, then one period per vector, and the
    // last vector's delay and response write instead of the next load
    expect_t = 1 + 4 * ACCESS_CLKS + (n - 1) * (6 * ACCESS_CLKS + 2)
               + delay_clks + 2 * ACCESS_CLKS + 1;
    check(t1 - t0 == expect_t, $sformatf("offline run of %0d vectors took %0d clocks, expected %0d",
                                         n, t1 - t0, expect_t));
    rq.delete();
    for (int v = 0; v < n; v++) begin
      logic [PINS-1:0] r;
      for (int k = 0; k < FIELD_WORDS; k++) begin
        ram_read(rec_addr(vec_idx_t'(v), rec_word_t'(REC_RESP + k)), w);
        r[k*MEM_W +: MEM_W] = w;
      end
      rq.push_back(r);
    end
  endtask

  // ------------------------------------------- multiplier test programs
  int unsigned last_x, last_y, last_r;

  task automatic clock_chip();          // one phi1/phi2 cycle, 5 vectors
    next();
    set_signal(PHI1, 0); next();
    set_signal(PHI2, 1); next();
    set_signal(PHI2, 0); next();
    set_signal(PHI1, 1); next();
  endtask
  task automatic init_mult();
    set_signal(PX, 0); set_signal(PY, 0);
    clock_chip();
    last_r = 0; last_x = 0; last_y = 0;
  endtask
  task automatic test_mult(int unsigned x, int unsigned y);
    set_signal(PX, x); set_signal(PY, y);
    clock_chip();
    if (phase != GENERATE)
      check(get_signal(PR) == last_r,
            $sformatf("pipelined %0d*%0d gave %0d, expected %0d", last_x, last_y, get_signal(PR), last_r));
    last_r = (x * y) & 8'hFF; last_x = x; last_y = y;
  endtask
  // A dynamic block run twice: generate, offline run, verify.
  task automatic dynamic_mult_block(int unsigned i, int unsigned nj, int unsigned delay_clks);
    logic [PINS-1:0] keep_val = sh_val, keep_dir = sh_dir;
    vq.delete();
    phase = GENERATE;
    init_mult();
    for (int unsigned j = 0; j < nj; j++) test_mult(i, (j * 37 + i) & 8'hFF);
    test_mult(0, 0);
    run_offline(delay_clks);
    phase = VERIFY;
    init_mult();
    for (int unsigned j = 0; j < nj; j++) test_mult(i, (j * 37 + i) & 8'hFF);
    test_mult(0, 0);
    check(rq.size() == 0, "every response used");
    phase = ONLINE;
    sh_val = keep_val; sh_dir = keep_dir;
  endtask

  // -------------------------------------------------------------- test
  initial begin
    int unsigned blocks = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    set_direction(MPLIER, 1); set_direction(MCAND, 1);
    set_direction(PX, 1); set_direction(PY, 1);
    set_direction(PHI1, 1); set_direction(PHI2, 1);
    set_signal(PHI1, 1); set_signal(PHI2, 0);

    // Figure 1 program: all 65536 products, one online step each
    hw(REG_DELAY, 10);
    for (int unsigned i = 0; i < 256; i++)
      for (int unsigned j = 0; j < 256; j++) begin
        set_signal(MPLIER, i); set_signal(MCAND, j);
        next();
        check(get_signal(RESULT) == ((i * j) & 8'hFF),
              $sformatf("%0d * %0d gave %0d", i, j, get_signal(RESULT)));
      end

    // Figure 3 program: one dynamic block per multiplier value, each
    // 5 + 256*5 + 5 = 1290 vectors played offline
    for (int unsigned i = 0; i < 256; i += I_STEP) begin
      dynamic_mult_block(i, 256, 10);
      blocks++;
    end
    check(vq.size() == 1290, $sformatf("a dynamic block is %0d vectors", vq.size()));

    // One block that fills the vector RAM: 5 + 1090*5 + 5 = 5460 vectors,
    // the last one at RAM words 32754..32759 (5461 vectors fit).
    dynamic_mult_block(201, 1090, 10);
    check(vq.size() == 5460 && vq.size() <= MAX_VECTORS, $sformatf("capacity block of %0d vectors", vq.size()));
    blocks++;

    check(contention == 0, "no drive contention");
    check(pm_overlap == 0, "no two-phase clock overlap");
    check(online_steps == 65536, "online steps");
    check(offline_vectors == (blocks - 1) * 1290 + 5460, "offline vectors");
    $display("online steps %0d, dynamic blocks %0d, offline vectors %0d",
             online_steps, blocks, offline_vectors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
