// tb_vector_memory: writes random words to random addresses, reads them
// back in a different order, and checks the data and the access time of
// every access (acknowledge in clock ACCESS_CLKS-1 after the request). Runs at full depth with a short access time.
module tb_vector_memory;
  timeunit 1ns; timeprecision 1ps;
  import tester_pkg::*;
  localparam int unsigned ACC = 5;
  localparam int unsigned N   = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req, ack;
  mem_req_t rq;
  mem_word_t rdata;
  int checks = 0, failures = 0;
  mem_addr_t addrs[N];
  mem_word_t data[N];

  vector_memory #(.ACCESS(ACC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic we, mem_addr_t a, mem_word_t wd, output mem_word_t rd);
    int n = 0;
    rq  = '{we: we, addr: a, wdata: wd};
    req = 1'b1;
    // the request is raised just after a clock edge: that is clock 0
    do begin @(negedge clk); n++; end while (!ack);
    rd = rdata;
    checks++;
    if (n != ACC) begin
      failures++;
      $display("FAIL ack in clock %0d, expected %0d", n - 1, ACC - 1);
    end
    @(posedge clk); #1 req = 1'b0;
  endtask

  initial begin
    mem_word_t r;
    req = 1'b0; rq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) begin
      addrs[i] = mem_addr_t'(i * 109 + $urandom % 100);   // distinct addresses
      data[i]  = {$urandom, $urandom};
      access(1'b1, addrs[i], data[i], r);
    end
    for (int i = N - 1; i >= 0; i--) begin
      access(1'b0, addrs[i], '0, r);
      checks++;
      if (r !== data[i]) begin
        failures++;
        $display("FAIL read %h at %h, expected %h", r, addrs[i], data[i]);
      end
    end
    // the top word of the array
    access(1'b1, mem_addr_t'(MEM_DEPTH - 1), 64'hDEAD_BEEF_0123_4567, r);
    access(1'b0, mem_addr_t'(MEM_DEPTH - 1), '0, r);
    checks++;
    if (r !== 64'hDEAD_BEEF_0123_4567) begin failures++; $display("FAIL top word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
