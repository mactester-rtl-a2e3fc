// mactester: a functional tester with 128 bidirectional test pins.
//
// A host computer sets up each test vector in the level 1 registers and
// issues a step: the vector moves in unison to the level 2 registers that
// drive the pins, and after a programmable 20 ns to 1 us the pins are latched
// into level 3 for the host to read back (online / interactive testing). For
// circuits that must run without pauses, vectors are first stored in the
// on-board vector RAM and the control logic plays them back at about 830
// thousand vectors a second, writing each response next to its vector
// (offline testing), once or in a loop.
//
// Blocks: control_unit (host registers, sequencer, delay), datapath (six pin
// slices) and vector_memory. Pins are brought out as pin_o (value), pin_oe
// (1 = tester drives) and pin_i (what is on the pin); the board's tri-state
// pads join them. `done` and `running` mirror the status register.
// Clock: one 5 ns (200 MHz) clock; asynchronous active-low reset.
module mactester
  import tester_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [HOST_W-1:0]  host_wdata,
  output logic [HOST_W-1:0]  host_rdata,
  output logic [PINS-1:0]    pin_o,
  output logic [PINS-1:0]    pin_oe,
  input  logic [PINS-1:0]    pin_i,
  output logic               running,
  output logic               done
);

  logic      mem_req, mem_ack;
  mem_req_t  mem_rq;
  mem_word_t mem_rdata;
  logic      dp_we, xfer, latch;
  rec_word_t dp_word, dp_rd_word;
  logic [1:0] dp_lanes;
  mem_word_t dp_wdata, dp_rdata;

  control_unit u_ctrl (
    .clk, .rst_n,
    .host_we, .host_addr, .host_wdata, .host_rdata,
    .mem_req, .mem_rq, .mem_ack, .mem_rdata,
    .dp_we, .dp_word, .dp_lanes, .dp_wdata, .dp_rd_word, .dp_rdata,
    .xfer, .latch, .running, .done
  );

  datapath u_dp (
    .clk, .rst_n,
    .wr_en(dp_we), .wr_word(dp_word), .wr_lanes(dp_lanes), .wr_data(dp_wdata),
    .rd_word(dp_rd_word), .rd_data(dp_rdata),
    .xfer, .latch,
    .pin_o, .pin_oe, .pin_i
  );

  vector_memory u_mem (
    .clk, .rst_n,
    .req(mem_req), .rq(mem_rq), .ack(mem_ack), .rdata(mem_rdata)
  );

endmodule
