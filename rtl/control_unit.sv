// control_unit: the tester's control chip.
//
// Holds the host registers (host_regs), the sequencer (vector_sequencer) and
// the drive/latch delay (drive_latch_delay), and arbitrates the datapath's
// single word port between host and sequencer. While an offline test runs
// the sequencer owns the port and host writes to level 1 are dropped; the
// rest of the time the host reads and writes the pin registers directly.
// Outputs to the datapath are the word port, the drive clock (`xfer`, a
// one-cycle enable) and the latch clock (`latch`); to the vector RAM the
// request/acknowledge port of vector_memory.
// That control sits in a chip of its own follows the published tester.
module control_unit
  import tester_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  logic               host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [HOST_W-1:0]  host_wdata,
  output logic [HOST_W-1:0]  host_rdata,
  // vector RAM
  output logic               mem_req,
  output mem_req_t           mem_rq,
  input  logic               mem_ack,
  input  mem_word_t          mem_rdata,
  // datapath
  output logic               dp_we,
  output rec_word_t          dp_word,
  output logic [1:0]         dp_lanes,
  output mem_word_t          dp_wdata,
  output rec_word_t          dp_rd_word,
  input  mem_word_t          dp_rdata,
  output logic               xfer,
  output logic               latch,
  // status, also visible to the board
  output logic               running,
  output logic               done
);

  logic      cmd_next, cmd_start, cmd_stop, cmd_clear_done, loop_mode;
  delay_t    delay;
  vec_idx_t  start_vec, end_vec, cur_vec;
  logic      hmem_req, hmem_ack;
  mem_req_t  hmem_rq;
  logic      step_busy;
  logic [31:0] steps;
  logic      hdp_we, sdp_we, sdp_rd_active;
  rec_word_t hdp_word, hdp_rd_word, sdp_word, sdp_rd_word;
  logic [1:0] hdp_lanes;
  mem_word_t hdp_wdata, sdp_wdata;
  logic      drive, dly_busy;

  host_regs u_regs (
    .clk, .rst_n,
    .host_we, .host_addr, .host_wdata, .host_rdata,
    .cmd_next, .cmd_start, .cmd_stop, .cmd_clear_done,
    .loop_mode, .delay, .start_vec, .end_vec,
    .hmem_req, .hmem_rq, .hmem_ack, .hmem_rdata(mem_rdata),
    .step_busy, .running, .done, .cur_vec, .steps,
    .hdp_we, .hdp_word, .hdp_lanes, .hdp_wdata, .hdp_rd_word,
    .hdp_rdata(dp_rdata)
  );

  vector_sequencer u_seq (
    .clk, .rst_n,
    .cmd_next, .cmd_start, .cmd_stop, .cmd_clear_done,
    .loop_mode, .start_vec, .end_vec,
    .hmem_req, .hmem_rq, .hmem_ack,
    .mem_req, .mem_rq, .mem_ack, .mem_rdata,
    .drive, .latch,
    .dp_we(sdp_we), .dp_word(sdp_word), .dp_wdata(sdp_wdata),
    .dp_rd_active(sdp_rd_active), .dp_rd_word(sdp_rd_word), .dp_rdata,
    .step_busy, .running, .done, .cur_vec, .steps
  );

  drive_latch_delay u_delay (
    .clk, .rst_n,
    .delay, .drive, .latch, .busy(dly_busy)
  );

  assign xfer = drive;

  // A new drive clock never cuts short the interval of the previous one.
  a_drive_after_latch: assert property (@(posedge clk) disable iff (!rst_n)
    drive |-> !dly_busy);

  always_comb begin
    if (running) begin
      dp_we    = sdp_we;
      dp_word  = sdp_word;
      dp_lanes = 2'b11;
      dp_wdata = sdp_wdata;
    end else begin
      dp_we    = hdp_we;
      dp_word  = hdp_word;
      dp_lanes = hdp_lanes;
      dp_wdata = hdp_wdata;
    end
    dp_rd_word = sdp_rd_active ? sdp_rd_word : hdp_rd_word;
  end

endmodule
