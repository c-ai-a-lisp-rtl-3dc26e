// tb_mp_arbiter: two requesters issue random reads and writes to one memory
// model through the arbiter. Checks that each request is acknowledged to its
// own requester only, that reads return the addressed word, that writes
// land, and that port 0 wins when both ask at once.
`include "rtl/tb_check.svh"
module tb_mp_arbiter;
  import plisp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] req = '0, we = '0, ack;
  logic [1:0][AW-1:0] addr;
  word_t [1:0] wdata;
  word_t rdata, mp_wdata, mp_rdata;
  logic mp_req, mp_we, mp_ack;
  logic [AW-1:0] mp_addr;
  word_t ref_mem [bit [9:0]];
  int done_cnt [2];

  mp_arbiter dut (.*);
  mp_model #(.LATENCY(2), .ABITS(10)) mem (.clk, .req(mp_req), .we(mp_we), .addr(mp_addr),
                                           .wdata(mp_wdata), .ack(mp_ack), .rdata(mp_rdata));
  always #5 clk = ~clk;

  function automatic word_t mem_word(input logic [9:0] a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return {32'hC0DE_0000 | 32'(a), 32'(a) * 32'h9E37};
  endfunction

  task automatic requester(input int p);
    for (int n = 0; n < 300; n++) begin
      logic [9:0] a;
      logic w;
      word_t d;
      repeat ($urandom % 3) @(negedge clk);
      a = 10'($urandom % 64); w = 1'($urandom); d = {$urandom, $urandom};
      req[p] = 1; we[p] = w; addr[p] = AW'(a); wdata[p] = d;
      @(posedge clk); #1;
      while (!ack[p]) begin @(posedge clk); #1; end
      if (w) ref_mem[a] = d;
      else `CHECK(rdata == mem_word(a), $sformatf("port %0d read %h", p, a))
      done_cnt[p]++;
      @(negedge clk);
      req[p] = 0;
    end
  endtask

  always @(posedge clk)
    if (rst_n && ack[0] && ack[1]) begin
      failures++;
      $display("both ports acknowledged");
    end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // simultaneous requests: port 0 first
    @(negedge clk);
    req = 2'b11; we = 2'b00; addr[0] = 24'd5; addr[1] = 24'd6;
    @(posedge clk); #1;
    `CHECK(mp_addr == 24'd5, "port 0 granted first")
    while (!ack[0]) begin @(posedge clk); #1; end
    @(negedge clk); req[0] = 0;
    @(posedge clk); #1;
    `CHECK(mp_addr == 24'd6, "then port 1")
    while (!ack[1]) begin @(posedge clk); #1; end
    @(negedge clk); req = '0;
    fork
      requester(0);
      requester(1);
    join
    `CHECK(done_cnt[0] == 300 && done_cnt[1] == 300, "all requests served")
    `TB_END
  end
endmodule
