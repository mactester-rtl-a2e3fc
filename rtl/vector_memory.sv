// vector_memory: the test vector RAM with the timing of its static RAM chips.
//
// DEPTH words of MEM_W bits (eight byte-wide static RAMs side by side). Each
// access is a request/acknowledge handshake: the requester raises `req` with
// the request (write enable, address, write data) and holds it unchanged
// until `ack`. `ack` is high for one clock, ACCESS_CLKS - 1 clocks after the
// request was first seen; on that clock a write has been done and `rdata`
// holds the word read. The request must then be dropped or replaced, and the
// next one is taken on the following clock, so back-to-back accesses take
// ACCESS_CLKS clocks each (40 clocks of 5 ns: the 200 ns cycle of a RAM fast
// enough for the 5 MHz rate that an unmultiplexed RAM would allow).
// The published tester used eight RAM chips and held about 5300 vectors; the
// 32K depth, the word width and the handshake are this design's choices.
module vector_memory
  import tester_pkg::*;
#(
  parameter int unsigned DEPTH  = tester_pkg::MEM_DEPTH,
  parameter int unsigned ACCESS = tester_pkg::ACCESS_CLKS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req,
  input  mem_req_t  rq,
  output logic      ack,
  output mem_word_t rdata
);

  initial assert (ACCESS >= 3) else $fatal(1, "ACCESS must be at least 3 clocks");

  localparam int unsigned CW = $clog2(ACCESS);

  mem_word_t       mem [DEPTH];
  logic            busy;
  logic [CW-1:0]   cnt;
  mem_addr_t       a;

  assign a = rq.addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      ack  <= 1'b0;
      cnt  <= '0;
    end else begin
      ack <= 1'b0;
      if (!busy) begin
        if (req && !ack) begin
          busy <= 1'b1;
          cnt  <= CW'(ACCESS - 3);
        end
      end else if (cnt == '0) begin
        busy <= 1'b0;
        ack  <= 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  // The array itself, without reset: written and read on the last busy clock.
  always_ff @(posedge clk) begin
    if (busy && cnt == '0) begin
      if (rq.we) mem[a[$clog2(DEPTH)-1:0]] <= rq.wdata;
      rdata <= mem[a[$clog2(DEPTH)-1:0]];
    end
  end

  // The requester keeps its request steady until it is acknowledged.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n) (req && !ack) |=> (req && $stable(rq)) || ack;
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
