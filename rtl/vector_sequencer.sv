// vector_sequencer: runs online steps and offline tests, and serves the
// host's accesses to the vector RAM.
//
// Online step (cmd_next): one `drive` pulse copies level 1 to level 2 and
// starts the drive/latch delay; the step ends with the `latch` pulse that
// loads level 3. step_busy is high in between.
//
// Offline test (cmd_start), vectors start_vec..end_vec of the RAM, each a
// record of VEC_WORDS words (values, directions, response):
//   PRELOAD   read the value and direction words of the first vector into
//             level 1;
//   DRIVE     drive pulse: the vector goes onto the pins;
//   RUN       while the delay runs, read the next vector into level 1 (level 2
//             keeps the pins steady), and wait for the latch pulse;
//   WRITEBACK write the level 3 response into the record's response words;
//   then DRIVE the next vector, or stop after end_vec. With loop_mode the
//   sequence restarts at start_vec after end_vec until cmd_stop. On a normal
//   end, and after a stop, `done` is set; it is cleared by cmd_clear_done or
//   the next start.
// The RAM is single ported, so a vector costs VEC_WORDS RAM cycles: 6 x 200 ns
// = 1.2 us, about 830 thousand vectors a second. Host RAM accesses are taken
// only when the sequencer is idle. dp_wdata is the RAM read data passed
// straight to the datapath, written into level 1 on the acknowledge clock. Commands that arrive while it is busy are
// ignored (the host polls the status bits first).
// The step and offline sequence, start/end addresses, done bit and loop
// follow the published tester; overlapping the next vector's load with the
// delay, and the record layout, are this design's choices.
module vector_sequencer
  import tester_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // commands and settings
  input  logic        cmd_next,
  input  logic        cmd_start,
  input  logic        cmd_stop,
  input  logic        cmd_clear_done,
  input  logic        loop_mode,
  input  vec_idx_t    start_vec,
  input  vec_idx_t    end_vec,
  // host RAM access
  input  logic        hmem_req,
  input  mem_req_t    hmem_rq,
  output logic        hmem_ack,
  // vector RAM
  output logic        mem_req,
  output mem_req_t    mem_rq,
  input  logic        mem_ack,
  input  mem_word_t   mem_rdata,
  // drive and latch clocks
  output logic        drive,
  input  logic        latch,
  // datapath access
  output logic        dp_we,
  output rec_word_t   dp_word,
  output mem_word_t   dp_wdata,
  output logic        dp_rd_active,
  output rec_word_t   dp_rd_word,
  input  mem_word_t   dp_rdata,
  // status
  output logic        step_busy,
  output logic        running,
  output logic        done,
  output vec_idx_t    cur_vec,
  output logic [31:0] steps
);

  typedef enum logic [2:0] {
    S_IDLE, S_HMEM, S_STEP, S_PRELOAD, S_DRIVE, S_RUN, S_WRITEBACK
  } state_e;

  state_e    state;
  vec_idx_t  vec, nxt;
  logic      has_next, latched, stop_req;
  rec_word_t k;

  localparam rec_word_t LAST_LOAD = rec_word_t'(2 * FIELD_WORDS - 1);
  localparam rec_word_t LAST_WORD = rec_word_t'(VEC_WORDS - 1);

  // Next vector after vec, and whether there is one.
  vec_idx_t nxt_c;
  logic     has_next_c;
  always_comb begin
    if (vec != end_vec) begin
      nxt_c      = vec + 1'b1;
      has_next_c = 1'b1;
    end else begin
      nxt_c      = start_vec;
      has_next_c = loop_mode && !stop_req && !cmd_stop;
    end
  end

  logic loading;   // RUN still has level 1 words of the next vector to read
  assign loading = (state == S_RUN) && has_next && (k <= LAST_LOAD);

  // RAM request for the current state.
  always_comb begin
    mem_req      = 1'b0;
    mem_rq       = '0;
    hmem_ack     = 1'b0;
    unique case (state)
      S_HMEM: begin
        mem_req  = 1'b1;
        mem_rq   = hmem_rq;
        hmem_ack = mem_ack;
      end
      S_PRELOAD: begin
        mem_req     = 1'b1;
        mem_rq.addr = rec_addr(vec, k);
      end
      S_RUN: begin
        mem_req     = loading;
        mem_rq.addr = rec_addr(nxt, k);
      end
      S_WRITEBACK: begin
        mem_req      = 1'b1;
        mem_rq.we    = 1'b1;
        mem_rq.addr  = rec_addr(vec, k);
        mem_rq.wdata = dp_rdata;
      end
      default: ;
    endcase
  end

  // Level 1 is written with each word read for a vector.
  assign dp_we        = mem_ack && (state == S_PRELOAD || (state == S_RUN && loading));
  assign dp_word      = k;
  assign dp_wdata     = mem_rdata;
  assign dp_rd_active = (state == S_WRITEBACK);
  assign dp_rd_word   = k;
  assign drive        = (state == S_DRIVE) || (state == S_IDLE && cmd_next && !cmd_start && !hmem_req);
  assign step_busy    = (state == S_STEP);
  assign running      = (state == S_PRELOAD) || (state == S_DRIVE) ||
                        (state == S_RUN) || (state == S_WRITEBACK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      vec      <= '0;
      nxt      <= '0;
      has_next <= 1'b0;
      latched  <= 1'b0;
      stop_req <= 1'b0;
      k        <= '0;
      done     <= 1'b0;
      cur_vec  <= '0;
      steps    <= '0;
    end else begin
      if (cmd_clear_done) done <= 1'b0;
      if (cmd_stop && running) stop_req <= 1'b1;
      if (latch) steps <= steps + 1'b1;

      unique case (state)
        S_IDLE: begin
          if (cmd_start) begin
            vec      <= start_vec;
            k        <= REC_DATA;
            stop_req <= 1'b0;
            done     <= 1'b0;
            state    <= S_PRELOAD;
          end else if (hmem_req) begin
            state <= S_HMEM;
          end else if (cmd_next) begin
            state <= S_STEP;
          end
        end
        S_HMEM:
          if (mem_ack) state <= S_IDLE;
        S_STEP:
          if (latch) state <= S_IDLE;
        S_PRELOAD:
          if (mem_ack) begin
            k <= k + 1'b1;
            if (k == LAST_LOAD) state <= S_DRIVE;
          end
        S_DRIVE: begin
          cur_vec  <= vec;
          nxt      <= nxt_c;
          has_next <= has_next_c;
          latched  <= 1'b0;
          k        <= REC_DATA;
          state    <= S_RUN;
        end
        S_RUN: begin
          if (latch) latched <= 1'b1;
          if (loading && mem_ack) k <= k + 1'b1;
          if ((latched || latch) && !loading) begin
            k     <= REC_RESP;
            state <= S_WRITEBACK;
          end
        end
        S_WRITEBACK:
          if (mem_ack) begin
            k <= k + 1'b1;
            if (k == LAST_WORD) begin
              if (has_next && !stop_req) begin
                vec   <= nxt;
                state <= S_DRIVE;
              end else begin
                done  <= 1'b1;
                state <= S_IDLE;
              end
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The latch pulse only ever answers a drive pulse.
  a_latch_expected: assert property (@(posedge clk) disable iff (!rst_n)
    latch |-> (state == S_STEP || state == S_RUN));

endmodule
