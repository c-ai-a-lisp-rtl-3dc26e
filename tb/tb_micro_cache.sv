// tb_micro_cache: fetches microwords through the microprogram cache from a
// memory model and checks: a first fetch misses, requests microbase+disp
// from Mp and then hits with the right word; a second fetch hits at once
// without Mp traffic; a conflicting address refills; a different microbase
// gives different words; flush forces a refetch.
`include "rtl/tb_check.svh"
module tb_micro_cache;
  import plisp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rd_en = 0, flush = 0;
  logic [AW-1:0] microbase;
  logic [UDW-1:0] disp;
  logic hit, mp_req, mp_ack;
  word_t rdata, mp_rdata;
  logic [AW-1:0] mp_addr;

  micro_cache #(.WORDS(64)) dut (.*);
  mp_model #(.LATENCY(3), .ABITS(12)) mem (.clk, .req(mp_req), .we(1'b0), .addr(mp_addr),
                                           .wdata('0), .ack(mp_ack), .rdata(mp_rdata));
  always #5 clk = ~clk;

  function automatic word_t expect_word(input logic [AW-1:0] a);
    return {32'hC0DE_0000 | 32'(a[11:0]), 32'(a[11:0]) * 32'h9E37};
  endfunction

  // fetch and return the number of clocks until hit
  task automatic fetch(input logic [UDW-1:0] d, output int cyc);
    disp = d; rd_en = 1; cyc = 0;
    #1;
    while (!hit && cyc < 50) begin @(posedge clk); #1; cyc++; end
    `CHECK(hit && rdata == expect_word(microbase + AW'(d)), $sformatf("word at disp %0d", d))
    @(negedge clk);
    rd_en = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    int cyc, r0;
    microbase = 24'h100; disp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int d = 0; d < 20; d++) begin
      fetch(16'(d), cyc);
      `CHECK(cyc > 0, "first fetch misses")
    end
    r0 = mem.reads;
    for (int d = 0; d < 20; d++) begin
      fetch(16'(d), cyc);
      `CHECK(cyc == 0, "second fetch hits")
    end
    `CHECK(mem.reads == r0, "hits cause no Mp reads")
    fetch(16'd64, cyc);             // same line as disp 0
    `CHECK(cyc > 0, "conflict miss")
    fetch(16'd0, cyc);
    `CHECK(cyc > 0, "evicted line refetched")
    microbase = 24'h300;
    fetch(16'd1, cyc);
    `CHECK(cyc > 0, "new microbase misses")
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    fetch(16'd1, cyc);
    `CHECK(cyc > 0, "flush forces refetch")
    for (int n = 0; n < 200; n++) fetch(16'($urandom % 100), cyc);
    `TB_END
  end
endmodule
