// datapath: the tester's 128-pin datapath, spread over NUM_SLICES pin slices.
//
// The pins are divided as evenly as possible over the slices (128 over 6
// gives 22, 22, 21, 21, 21, 21). Level 1, 2 and 3 registers live in the
// slices (see pin_slice). This module adds the word multiplexer that lets a
// MEM_W-bit bus, shared by the vector RAM and the host, reach the registers a
// word at a time, in the order of a vector record:
//   word 0..FW-1      level 1 pin values   (FW = PINS / MEM_W)
//   word FW..2FW-1    level 1 directions
//   word 2FW..3FW-1   level 3 response (read only)
// A write names a record word and a mask of 32-bit lanes, so the host can
// write half a word. The read port is combinational. xfer copies level 1 to
// level 2 on the next clock edge; latch captures the pins into level 3.
// The slice count and the three levels follow the published tester; the
// word order and lane mask are this design's choices.
module datapath
  import tester_pkg::*;
#(
  parameter int unsigned PINS_P   = tester_pkg::PINS,
  parameter int unsigned SLICES_P = tester_pkg::NUM_SLICES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  rec_word_t         wr_word,
  input  logic [1:0]        wr_lanes,   // bit 0: bits 31:0, bit 1: bits 63:32
  input  mem_word_t         wr_data,
  input  rec_word_t         rd_word,
  output mem_word_t         rd_data,
  input  logic              xfer,
  input  logic              latch,
  output logic [PINS_P-1:0] pin_o,
  output logic [PINS_P-1:0] pin_oe,
  input  logic [PINS_P-1:0] pin_i
);

  localparam int unsigned FW   = PINS_P / MEM_W;
  localparam int unsigned BASE = PINS_P / SLICES_P;
  localparam int unsigned REM  = PINS_P % SLICES_P;

  initial begin
    assert (PINS_P % MEM_W == 0) else $fatal(1, "PINS_P must be a multiple of MEM_W");
    assert (2 * HOST_W == MEM_W) else $fatal(1, "a RAM word must be two host words");
  end

  function automatic int unsigned slice_lo(int unsigned i);
    return i * BASE + ((i < REM) ? i : REM);
  endfunction
  function automatic int unsigned slice_w(int unsigned i);
    return BASE + ((i < REM) ? 1 : 0);
  endfunction

  logic [PINS_P-1:0] d_we, r_we, wd_all;
  logic [PINS_P-1:0] l1_d, l1_r, l3;

  // Write enables: the addressed word of the addressed field, masked by lanes.
  always_comb begin
    d_we = '0;
    r_we = '0;
    for (int unsigned w = 0; w < FW; w++) begin
      for (int unsigned b = 0; b < MEM_W; b++) begin
        if (wr_en && wr_lanes[b / HOST_W]) begin
          if (wr_word == rec_word_t'(w))      d_we[w*MEM_W + b] = 1'b1;
          if (wr_word == rec_word_t'(FW + w)) r_we[w*MEM_W + b] = 1'b1;
        end
      end
    end
    wd_all = {FW{wr_data}};
  end

  // Read multiplexer over the record words.
  always_comb begin
    rd_data = '0;
    for (int unsigned w = 0; w < FW; w++) begin
      if (rd_word == rec_word_t'(w))          rd_data = l1_d[w*MEM_W +: MEM_W];
      if (rd_word == rec_word_t'(FW + w))     rd_data = l1_r[w*MEM_W +: MEM_W];
      if (rd_word == rec_word_t'(2*FW + w))   rd_data = l3[w*MEM_W +: MEM_W];
    end
  end

  for (genvar i = 0; i < SLICES_P; i++) begin : g_slice
    localparam int unsigned LO = slice_lo(i);
    localparam int unsigned SW = slice_w(i);
    pin_slice #(.W(SW)) u_slice (
      .clk    (clk),
      .rst_n  (rst_n),
      .d_we   (d_we[LO +: SW]),
      .d_wd   (wd_all[LO +: SW]),
      .r_we   (r_we[LO +: SW]),
      .r_wd   (wd_all[LO +: SW]),
      .xfer   (xfer),
      .latch  (latch),
      .l1_d   (l1_d[LO +: SW]),
      .l1_r   (l1_r[LO +: SW]),
      .l3     (l3[LO +: SW]),
      .pin_o  (pin_o[LO +: SW]),
      .pin_oe (pin_oe[LO +: SW]),
      .pin_i  (pin_i[LO +: SW])
    );
  end

endmodule
