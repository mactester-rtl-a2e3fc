// host_regs: the registers the host computer sees through the parallel
// interface.
//
// The host bus is a plain synchronous register port: on a clock with
// `host_we` high, host_wdata is written to the register at host_addr; host_rdata
// always shows the register at host_addr (combinational read). The map is
// tester_pkg::host_reg_e:
//   CTRL      write: command strobes (NEXT, START, STOP, MEM_READ, CLEAR_DONE);
//             read: status (step busy, offline running, done, RAM busy)
//   MODE      bit 0 loops the offline sequence
//   DELAY     drive to latch delay in clocks
//   START/END first and last vector of the offline sequence
//   MEM_ADDR  RAM word address; advances by one after every host RAM access
//   MEM_LO/HI write: the word to store (writing HI starts the RAM write);
//             read: the word fetched by the last MEM_READ
//   L1_DATA, L1_DIR, L3_RESP  the pin registers, 32 pins per word
// A RAM access stays pending (status RAM busy) until the sequencer completes
// it; the address and data registers ignore writes while one is pending.
// Level 1 writes are passed to the datapath as half-word writes: hdp_wdata
// is host_wdata repeated in both lanes and hdp_lanes picks the lane.
// The control register with its done bit, and the start and end addresses,
// follow the published tester; the rest of the map is this design's own.
module host_regs
  import tester_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host bus
  input  logic              host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [HOST_W-1:0] host_wdata,
  output logic [HOST_W-1:0] host_rdata,
  // commands and settings to the sequencer
  output logic              cmd_next,
  output logic              cmd_start,
  output logic              cmd_stop,
  output logic              cmd_clear_done,
  output logic              loop_mode,
  output delay_t            delay,
  output vec_idx_t          start_vec,
  output vec_idx_t          end_vec,
  // host RAM access, served by the sequencer
  output logic              hmem_req,
  output mem_req_t          hmem_rq,
  input  logic              hmem_ack,
  input  mem_word_t         hmem_rdata,
  // status
  input  logic              step_busy,
  input  logic              running,
  input  logic              done,
  input  vec_idx_t          cur_vec,
  input  logic [31:0]       steps,
  // datapath access
  output logic              hdp_we,
  output rec_word_t         hdp_word,
  output logic [1:0]        hdp_lanes,
  output mem_word_t         hdp_wdata,
  output rec_word_t         hdp_rd_word,
  input  mem_word_t         hdp_rdata
);

  mem_addr_t mem_addr;
  mem_word_t mem_wbuf, mem_rbuf;
  logic      pend_wr, pend_rd;

  // Pin registers occupy 0x10..0x1B: record word = (addr - 0x10) / 2.
  logic             is_pin;
  logic [HOST_AW-1:0] pin_off;
  assign is_pin  = host_addr >= HOST_AW'(REG_L1_DATA) &&
                   host_addr <  HOST_AW'(REG_L1_DATA) + HOST_AW'(2 * VEC_WORDS);
  assign pin_off = host_addr - HOST_AW'(REG_L1_DATA);

  assign hdp_rd_word = rec_word_t'(pin_off >> 1);
  assign hdp_word    = rec_word_t'(pin_off >> 1);
  assign hdp_lanes   = pin_off[0] ? 2'b10 : 2'b01;
  assign hdp_wdata   = {host_wdata, host_wdata};
  assign hdp_we      = host_we && is_pin && (pin_off >> 1) < HOST_AW'(REC_RESP);

  logic wr_ctrl;
  assign wr_ctrl        = host_we && host_addr == HOST_AW'(REG_CTRL);
  assign cmd_next       = wr_ctrl && host_wdata[CMD_NEXT];
  assign cmd_start      = wr_ctrl && host_wdata[CMD_START];
  assign cmd_stop       = wr_ctrl && host_wdata[CMD_STOP];
  assign cmd_clear_done = wr_ctrl && host_wdata[CMD_CLEAR_DONE];

  assign hmem_req      = pend_wr || pend_rd;
  assign hmem_rq.we    = pend_wr;
  assign hmem_rq.addr  = mem_addr;
  assign hmem_rq.wdata = mem_wbuf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loop_mode <= 1'b0;
      delay     <= delay_t'(DELAY_MIN);
      start_vec <= '0;
      end_vec   <= '0;
      mem_addr  <= '0;
      mem_wbuf  <= '0;
      mem_rbuf  <= '0;
      pend_wr   <= 1'b0;
      pend_rd   <= 1'b0;
    end else begin
      if (hmem_ack) begin
        if (pend_rd) mem_rbuf <= hmem_rdata;
        pend_wr  <= 1'b0;
        pend_rd  <= 1'b0;
        mem_addr <= mem_addr + 1'b1;
      end
      if (host_we) begin
        unique case (host_addr)
          HOST_AW'(REG_CTRL):
            if (host_wdata[CMD_MEM_READ] && !hmem_req) pend_rd <= 1'b1;
          HOST_AW'(REG_MODE):  loop_mode <= host_wdata[0];
          HOST_AW'(REG_DELAY): delay     <= delay_t'(host_wdata);
          HOST_AW'(REG_START): start_vec <= vec_idx_t'(host_wdata);
          HOST_AW'(REG_END):   end_vec   <= vec_idx_t'(host_wdata);
          HOST_AW'(REG_MEM_ADDR):
            if (!hmem_req) mem_addr <= mem_addr_t'(host_wdata);
          HOST_AW'(REG_MEM_LO):
            if (!hmem_req) mem_wbuf[HOST_W-1:0] <= host_wdata;
          HOST_AW'(REG_MEM_HI):
            if (!hmem_req) begin
              mem_wbuf[MEM_W-1:HOST_W] <= host_wdata;
              pend_wr                  <= 1'b1;
            end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    host_rdata = '0;
    if (is_pin) begin
      host_rdata = pin_off[0] ? hdp_rdata[MEM_W-1:HOST_W] : hdp_rdata[HOST_W-1:0];
    end else begin
      unique case (host_addr)
        HOST_AW'(REG_CTRL): begin
          host_rdata[ST_STEP_BUSY] = step_busy;
          host_rdata[ST_RUNNING]   = running;
          host_rdata[ST_DONE]      = done;
          host_rdata[ST_MEM_BUSY]  = hmem_req;
        end
        HOST_AW'(REG_MODE):     host_rdata = HOST_W'(loop_mode);
        HOST_AW'(REG_DELAY):    host_rdata = HOST_W'(delay);
        HOST_AW'(REG_START):    host_rdata = HOST_W'(start_vec);
        HOST_AW'(REG_END):      host_rdata = HOST_W'(end_vec);
        HOST_AW'(REG_MEM_ADDR): host_rdata = HOST_W'(mem_addr);
        HOST_AW'(REG_MEM_LO):   host_rdata = mem_rbuf[HOST_W-1:0];
        HOST_AW'(REG_MEM_HI):   host_rdata = mem_rbuf[MEM_W-1:HOST_W];
        HOST_AW'(REG_CUR_VEC):  host_rdata = HOST_W'(cur_vec);
        HOST_AW'(REG_STEPS):    host_rdata = steps;
        default:                host_rdata = '0;
      endcase
    end
  end

endmodule
