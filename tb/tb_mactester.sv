// tb_mactester: end-to-end test of the whole tester at its default sizes
// (128 pins, 32K-word vector RAM, 200 ns RAM cycle, 5 ns clock).
//
// Three behavioural devices sit on the tester's pins, joined to it by a
// model of the board's tri-state pads (a pin no one drives reads 0):
//   tb_comb_mult  8x8 multiplier, 37 ns delay: multiplier on pins 2,4..16,
//                 multiplicand on 3,5..17, result on 25:18;
//   tb_pipe_mult  one-stage pipelined multiplier with two-phase clock:
//                 x on 39:32, y on 47:40, result on 55:48, phi1 56, phi2 57;
//   tb_dyn_mult   the same pipelined multiplier with dynamic storage that
//                 leaks after 10 us: x 71:64, y 79:72, result 87:80,
//                 phi1 88, phi2 89;
//   tb_bus_reg    register on a tri-state bus: bus 103:96, rd_n 104, wr 105.
// The testbench plays the host. It keeps the test-program view of the pins
// (set a signal, Next, get a signal), turning each Next into either an
// online step through the host registers or, inside a dynamic block, a
// vector queued for an offline run; the block is then replayed to check
// the responses uploaded from the vector RAM.
// Mechanisms exercised and counted (each must happen): online steps,
// offline vectors, a latch taken before the device settled (delay too
// short), direction changes of a bidirectional bus, loss of dynamic state
// when online steps are as slow as host software (20 us each) while the same
// program passes offline, looping offline
// playback with a stop, the done bit, host RAM reads. The offline time per
// vector (six RAM cycles + 2 clocks) and the drive-to-latch time are checked.
module tb_mactester;
  timeunit 1ns; timeprecision 1ps;
  import tester_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [HOST_W-1:0] host_wdata = '0, host_rdata;
  logic [PINS-1:0] pin_o, pin_oe, pin_i;
  logic running, done;
  int checks = 0, failures = 0;

  mactester dut (.*);

  always #2.5 clk = ~clk;   // 200 MHz
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #50ms;
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
  logic [7:0] cm_p, pm_r, bus_q, dm_r;
  int dm_lost;
  logic bus_oe;
  int pm_overlap;
  int contention = 0;

  always_comb begin
    dev_out = '0;
    dev_oe  = '0;
    dev_out[25:18] = cm_p;  dev_oe[25:18] = '1;
    dev_out[55:48] = pm_r;  dev_oe[55:48] = '1;
    dev_out[103:96] = bus_q; dev_oe[103:96] = {8{bus_oe}};
    dev_out[87:80] = dm_r;  dev_oe[87:80] = '1;
  end
  assign pin_i = (pin_oe & pin_o) | (~pin_oe & dev_oe & dev_out);
  always @(posedge clk) if ((pin_oe & dev_oe) != '0) contention++;

  tb_comb_mult u_cm (
    .a({pin_i[16], pin_i[14], pin_i[12], pin_i[10], pin_i[8], pin_i[6], pin_i[4], pin_i[2]}),
    .b({pin_i[17], pin_i[15], pin_i[13], pin_i[11], pin_i[9], pin_i[7], pin_i[5], pin_i[3]}),
    .p(cm_p));
  tb_pipe_mult u_pm (.phi1(pin_i[56]), .phi2(pin_i[57]), .x(pin_i[39:32]), .y(pin_i[47:40]),
                     .r(pm_r), .overlap(pm_overlap));
  tb_dyn_mult u_dm (.phi1(pin_i[88]), .phi2(pin_i[89]), .x(pin_i[71:64]), .y(pin_i[79:72]),
                    .r(dm_r), .lost(dm_lost));
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
  pinlist_t DX     = '{64, 65, 66, 67, 68, 69, 70, 71};
  pinlist_t DY     = '{72, 73, 74, 75, 76, 77, 78, 79};
  pinlist_t DR     = '{80, 81, 82, 83, 84, 85, 86, 87};
  pinlist_t DPHI1  = '{88};
  pinlist_t DPHI2  = '{89};
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

  int unsigned think_ns = 0;     // host software time before each online step
  task automatic next();
    logic [HOST_W-1:0] s;
    if (phase == ONLINE && think_ns != 0) #(think_ns * 1ns);
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
  // pins of the pipelined multiplier under test: the static or the dynamic one
  pinlist_t MX, MY, MR, MPHI1, MPHI2;
  int wrong = 0;               // wrong products seen while `expect_wrong`
  logic expect_wrong = 1'b0;
  task automatic use_static();
    MX = PX; MY = PY; MR = PR; MPHI1 = PHI1; MPHI2 = PHI2;
  endtask
  task automatic use_dynamic();
    MX = DX; MY = DY; MR = DR; MPHI1 = DPHI1; MPHI2 = DPHI2;
  endtask

  task automatic clock_chip();          // one phi1/phi2 cycle, 5 vectors
    next();
    set_signal(MPHI1, 0); next();
    set_signal(MPHI2, 1); next();
    set_signal(MPHI2, 0); next();
    set_signal(MPHI1, 1); next();
  endtask
  task automatic init_mult();
    set_signal(MX, 0); set_signal(MY, 0);
    clock_chip();
    last_r = 0; last_x = 0; last_y = 0;
  endtask
  task automatic test_mult(int unsigned x, int unsigned y);
    set_signal(MX, x); set_signal(MY, y);
    clock_chip();
    if (phase != GENERATE) begin
      if (expect_wrong) begin
        if (get_signal(MR) != last_r) wrong++;
      end else
        check(get_signal(MR) == last_r,
              $sformatf("pipelined %0d*%0d gave %0d, expected %0d", last_x, last_y, get_signal(MR), last_r));
    end
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
    logic [HOST_W-1:0] s;
    mem_word_t w;
    int unsigned a_old, b_old;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(pin_oe == '0, "no pin driven after reset");

    // Signal declarations: device inputs are driven by the tester.
    set_direction(MPLIER, 1); set_direction(MCAND, 1);
    set_direction(PX, 1); set_direction(PY, 1);
    set_direction(PHI1, 1); set_direction(PHI2, 1);
    set_signal(PHI1, 1); set_signal(PHI2, 0);
    set_direction(DX, 1); set_direction(DY, 1);
    set_direction(DPHI1, 1); set_direction(DPHI2, 1);
    set_signal(DPHI1, 1); set_signal(DPHI2, 0);
    use_static();
    set_direction(RD_N, 1); set_direction(WR, 1); set_signal(RD_N, 1);
    set_direction(BUS, 1);
    set_direction(LOOPP, 1);

    // ---- drive-to-latch delay: 20 ns is shorter than the 37 ns device
    hw(REG_DELAY, 10);
    set_signal(MPLIER, 3); set_signal(MCAND, 5); next();
    check(get_signal(RESULT) == 15, "3*5 with 50 ns delay");
    hw(REG_DELAY, 4);
    set_signal(MPLIER, 7); set_signal(MCAND, 9); next();
    if (get_signal(RESULT) == 15) early_latch++;
    check(get_signal(RESULT) == 15, "20 ns latch sees the old product");
    hw(REG_DELAY, 0);   // below the minimum: clamped to 20 ns
    set_signal(MPLIER, 2); set_signal(MCAND, 2); next();
    check(get_signal(RESULT) == 63, "clamped delay sees the previous product");
    hw(REG_DELAY, 8);   // 40 ns
    next();
    check(get_signal(RESULT) == 4, "40 ns latch sees the new product");
    hr(REG_STEPS, s);
    check(s == online_steps, "step counter");

    // ---- Figure 1 style online test of the combinational multiplier
    hw(REG_DELAY, 10);
    for (int unsigned i = 0; i < 256; i += 51) begin
      for (int unsigned j = 0; j < 256; j++) begin
        set_signal(MPLIER, i); set_signal(MCAND, j);
        next();
        check(get_signal(RESULT) == ((i * j) & 8'hFF),
              $sformatf("%0d * %0d gave %0d", i, j, get_signal(RESULT)));
      end
    end

    // ---- tri-state bus: write with the bus driven, read with it released
    for (int unsigned v = 0; v < 256; v += 17) begin
      set_direction(BUS, 1); set_signal(BUS, v); set_signal(WR, 0); next();
      set_signal(WR, 1); next();
      set_signal(WR, 0); next();
      set_direction(BUS, 0); set_signal(RD_N, 0); next();
      check(get_signal(BUS) == v, $sformatf("bus read back %0d, expected %0d", get_signal(BUS), v));
      set_signal(RD_N, 1); next();
      check(get_signal(BUS) == 0, "released bus reads low");
    end
    set_direction(BUS, 1);

    // ---- online pipelined multiplier (Figure 2)
    init_mult();
    for (int unsigned j = 0; j < 40; j++) test_mult(j * 5 & 8'hFF, 255 - j);
    test_mult(0, 0);

    // ---- offline dynamic blocks (Figure 3), full j range
    dynamic_mult_block(3, 256, 10);
    dynamic_mult_block(254, 256, 10);

    // ---- dynamic multiplier: online with a host that needs 20 us per step
    // (a 50 kHz software loop) its state leaks away; offline it works
    use_dynamic();
    think_ns = 20000;
    expect_wrong = 1'b1;
    init_mult();
    for (int unsigned j = 1; j <= 6; j++) test_mult(j, j + 100);
    expect_wrong = 1'b0;
    think_ns = 0;
    check(wrong > 0 && dm_lost > 0, "slow online steps lose the dynamic state");
    begin
      int lost0;
      lost0 = dm_lost;
      dynamic_mult_block(77, 64, 10);
      // only the pipeline fill may see stale operands, and its result is unused
      check(dm_lost <= lost0 + 1, "offline playback keeps the dynamic state");
    end
    use_static();

    // ---- looping playback of three vectors until stopped
    vq.delete();
    phase = GENERATE;
    for (int unsigned k = 1; k <= 3; k++) begin set_signal(LOOPP, k); next(); end
    phase = ONLINE;
    for (int v = 0; v < 3; v++)
      for (int k = 0; k < 2 * FIELD_WORDS; k++)
        ram_write(rec_addr(vec_idx_t'(100 + v), rec_word_t'(k)), vq[v][k*MEM_W +: MEM_W]);
    hw(REG_START, 100); hw(REG_END, 102); hw(REG_MODE, 1);
    hw(REG_CTRL, (1 << CMD_START) | (1 << CMD_CLEAR_DONE));
    begin
      logic [1:0] prev = pin_o[121:120];
      while (loop_wraps < 5) begin
        @(negedge clk);
        if (prev == 2'd3 && pin_o[121:120] == 2'd1) loop_wraps++;
        prev = pin_o[121:120];
      end
    end
    check(running && !done, "loop keeps running");
    hw(REG_CTRL, 1 << CMD_STOP);
    while (!done) @(negedge clk);
    done_seen++;
    hr(REG_CUR_VEC, s);
    check(s >= 100 && s <= 102, "stopped inside the loop");
    ram_read(rec_addr(vec_idx_t'(101), rec_word_t'(REC_RESP + 1)), w);
    check(w[121-MEM_W:120-MEM_W] == 2'd2, "loop response written");
    hw(REG_MODE, 0);

    // ---- results
    check(contention == 0, $sformatf("%0d clocks with tester and device both driving", contention));
    check(pm_overlap == 0, "two-phase clock overlap");
    check(online_steps > 0,   "online steps happened");
    check(offline_vectors > 0, "offline vectors happened");
    check(early_latch > 0,    "an early latch happened");
    check(dir_changes > 0,    "direction changes happened");
    check(loop_wraps > 0,     "loop wraps happened");
    check(done_seen > 0,      "done seen");
    check(mem_reads > 0,      "host RAM reads happened");
    check(wrong > 0,          "dynamic state loss happened online");
    $display("online steps %0d, offline vectors %0d, early latches %0d, direction changes %0d, loop wraps %0d, done %0d, RAM reads %0d, dynamic losses %0d",
             online_steps, offline_vectors, early_latch, dir_changes, loop_wraps, done_seen, mem_reads, wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
