// tb_datapath: random test of the 128-pin datapath through its word port.
// Random word writes with random lane masks, drive and latch enables and
// pin inputs; after every clock all six record words are read back through
// the read multiplexer and pin_o/pin_oe are compared with a 128-bit model.
// Walking-one writes check that every pin (across all six slices) is wired
// to its own bit.
module tb_datapath;
  timeunit 1ns; timeprecision 1ps;
  import tester_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en, xfer, latch;
  rec_word_t wr_word, rd_word;
  logic [1:0] wr_lanes;
  mem_word_t wr_data, rd_data;
  logic [PINS-1:0] pin_o, pin_oe, pin_i;
  logic [PINS-1:0] m_d, m_r, m_o, m_oe, m_l3;
  int checks = 0, failures = 0;

  datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mem_word_t model_word(rec_word_t w);
    logic [3*PINS-1:0] all = {m_l3, m_r, m_d};
    return all[w*MEM_W +: MEM_W];
  endfunction

  task automatic compare();
    for (int w = 0; w < VEC_WORDS; w++) begin
      rd_word = rec_word_t'(w);
      #0.1;
      checks++;
      if (rd_data !== model_word(rec_word_t'(w))) begin
        failures++;
        $display("FAIL word %0d got %h exp %h", w, rd_data, model_word(rec_word_t'(w)));
      end
    end
    checks++;
    if (pin_o !== m_o || pin_oe !== m_oe) begin
      failures++;
      $display("FAIL pins got %h/%h exp %h/%h", pin_o, pin_oe, m_o, m_oe);
    end
  endtask

  task automatic step(logic we, rec_word_t w, logic [1:0] ln, mem_word_t d,
                      logic x, logic l, logic [PINS-1:0] pi);
    logic [PINS-1:0] mask, wd;
    @(negedge clk);
    wr_en = we; wr_word = w; wr_lanes = ln; wr_data = d; xfer = x; latch = l; pin_i = pi;
    @(posedge clk);
    if (x) begin m_o = m_d; m_oe = m_r; end
    if (l) m_l3 = pi;
    mask = '0;
    for (int b = 0; b < MEM_W; b++)
      if (ln[b / HOST_W]) mask[(w % FIELD_WORDS) * MEM_W + b] = 1'b1;
    wd = {FIELD_WORDS{d}};
    if (we && w < REC_DIR)       m_d = (m_d & ~mask) | (wd & mask);
    else if (we && w < REC_RESP) m_r = (m_r & ~mask) | (wd & mask);
    #1;
    wr_en = 1'b0; xfer = 1'b0; latch = 1'b0;
    compare();
  endtask

  initial begin
    {wr_en, xfer, latch, wr_word, rd_word, wr_lanes, wr_data, pin_i} = '0;
    {m_d, m_r, m_o, m_oe, m_l3} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // walking one through every pin value, direction and response bit
    for (int p = 0; p < PINS; p++) begin
      logic [PINS-1:0] one = PINS'(1) << p;
      step(1'b1, rec_word_t'(p / MEM_W), 2'b11, one[(p / MEM_W) * MEM_W +: MEM_W], 1'b0, 1'b0, '0);
      step(1'b1, rec_word_t'(REC_DIR + p / MEM_W), 2'b11, one[(p / MEM_W) * MEM_W +: MEM_W], 1'b1, 1'b1, one);
      step(1'b1, rec_word_t'(p / MEM_W), 2'b11, '0, 1'b0, 1'b0, '0);
    end
    for (int i = 0; i < 3000; i++)
      step($urandom % 2 == 0, rec_word_t'($urandom % VEC_WORDS), 2'($urandom),
           {$urandom, $urandom}, $urandom % 5 == 0, $urandom % 5 == 0,
           {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
