// tester_pkg: constants and types shared by the functional tester.
//
// The tester drives and samples PINS device pins. Every test vector is kept
// in the vector RAM as a record of VEC_WORDS words of MEM_W bits: first the
// pin values, then the pin directions, then the response latched from the
// pins. With 128 pins and a 64-bit RAM word this is six words, so one vector
// costs six RAM cycles (the RAM is "multiplexed six ways").
//
// The pin count, the six-way multiplexing, the eight RAM chips, the 20 ns to
// 1 us drive-to-latch delay in about 5 ns steps and the roughly 1 MHz offline
// rate follow the published tester. The 64-bit RAM word (eight byte-wide
// chips), the 32K-word depth, the 5 ns clock, the 200 ns RAM cycle, the host
// word width and the register map are this design's choices.
package tester_pkg;

  // ---- datapath -----------------------------------------------------------
  localparam int unsigned PINS       = 128;  // test pins
  localparam int unsigned NUM_SLICES = 6;    // datapath chips the pins are spread over

  // ---- vector RAM -----------------------------------------------------------
  localparam int unsigned MEM_W       = 64;                 // 8 RAM chips x 8 bits
  localparam int unsigned MEM_DEPTH   = 32768;              // 32K words per chip
  localparam int unsigned MEM_AW      = $clog2(MEM_DEPTH);
  localparam int unsigned FIELD_WORDS = PINS / MEM_W;       // words per 128-bit field
  localparam int unsigned VEC_WORDS   = 3 * FIELD_WORDS;    // data, direction, response
  localparam int unsigned MAX_VECTORS = MEM_DEPTH / VEC_WORDS;  // 5461
  localparam int unsigned VEC_AW      = $clog2(MAX_VECTORS);    // 13
  localparam int unsigned WORD_SEL_W  = $clog2(VEC_WORDS);      // 3

  // Clock of the control logic and the RAM cycle expressed in it.
  localparam int unsigned CLK_PERIOD_NS = 5;
  localparam int unsigned ACCESS_CLKS   = 40;   // 200 ns RAM cycle

  // ---- drive to latch delay, in clocks ----------------------------------------
  localparam int unsigned DELAY_W   = 8;
  localparam int unsigned DELAY_MIN = 4;     // 20 ns
  localparam int unsigned DELAY_MAX = 200;   // 1 us

  // ---- host interface -----------------------------------------------------------
  localparam int unsigned HOST_W  = 32;
  localparam int unsigned HOST_AW = 6;

  // Word of a vector record. With FIELD_WORDS = 2: 0,1 pin values (low word
  // first), 2,3 directions (1 = tester drives the pin), 4,5 response.
  typedef logic [WORD_SEL_W-1:0] rec_word_t;
  localparam rec_word_t REC_DATA = rec_word_t'(0);
  localparam rec_word_t REC_DIR  = rec_word_t'(FIELD_WORDS);
  localparam rec_word_t REC_RESP = rec_word_t'(2 * FIELD_WORDS);

  typedef logic [MEM_AW-1:0]  mem_addr_t;
  typedef logic [MEM_W-1:0]   mem_word_t;
  typedef logic [VEC_AW-1:0]  vec_idx_t;
  typedef logic [DELAY_W-1:0] delay_t;

  // One request to the vector RAM; held stable while req is high.
  typedef struct packed {
    logic      we;
    mem_addr_t addr;
    mem_word_t wdata;
  } mem_req_t;

  // Host register map (word addresses). Pin words are 32 bits, pins 31:0 first.
  typedef enum logic [HOST_AW-1:0] {
    REG_CTRL      = 6'h00,  // W: command strobes, R: status
    REG_MODE      = 6'h01,  // bit 0: loop the offline sequence
    REG_DELAY     = 6'h02,  // drive to latch delay in clocks
    REG_START     = 6'h03,  // first vector of the offline sequence
    REG_END       = 6'h04,  // last vector of the offline sequence
    REG_MEM_ADDR  = 6'h05,  // RAM word address, advances after each access
    REG_MEM_LO    = 6'h06,  // RAM data bits 31:0
    REG_MEM_HI    = 6'h07,  // RAM data bits 63:32; a write stores the word
    REG_CUR_VEC   = 6'h08,  // R: vector now on the pins
    REG_STEPS     = 6'h09,  // R: drive/latch steps done since reset
    REG_L1_DATA   = 6'h10,  // 0x10..0x13 level 1 pin values
    REG_L1_DIR    = 6'h14,  // 0x14..0x17 level 1 directions
    REG_L3_RESP   = 6'h18   // 0x18..0x1B R: level 3 response
  } host_reg_e;

  // REG_CTRL write bits
  localparam int unsigned CMD_NEXT       = 0;  // online step
  localparam int unsigned CMD_START      = 1;  // start the offline test
  localparam int unsigned CMD_STOP       = 2;  // stop after the current vector
  localparam int unsigned CMD_MEM_READ   = 3;  // read RAM word at REG_MEM_ADDR
  localparam int unsigned CMD_CLEAR_DONE = 4;

  // REG_CTRL read bits
  localparam int unsigned ST_STEP_BUSY = 0;
  localparam int unsigned ST_RUNNING   = 1;
  localparam int unsigned ST_DONE      = 2;
  localparam int unsigned ST_MEM_BUSY  = 3;

  // RAM word address of word w of vector v.
  function automatic mem_addr_t rec_addr(vec_idx_t v, rec_word_t w);
    return mem_addr_t'(v) * mem_addr_t'(VEC_WORDS) + mem_addr_t'(w);
  endfunction

endpackage
