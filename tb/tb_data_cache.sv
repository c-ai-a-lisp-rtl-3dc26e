// tb_data_cache: random reads and writes through the data cache to a
// memory model, compared with a reference copy of memory. Checks that a
// repeated read hits in the same cycle, that writes go through to Mp and
// that a later read returns the written word.
`include "rtl/tb_check.svh"
module tb_data_cache;
  import plisp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, req = 0, we = 0;
  logic [AW-1:0] addr;
  word_t wdata, rdata, mp_wdata, mp_rdata;
  logic done, hit, mp_req, mp_we, mp_ack;
  logic [AW-1:0] mp_addr;
  word_t ref_mem [bit [11:0]];
  int hits = 0;

  data_cache #(.WORDS(64)) dut (.*);
  mp_model #(.LATENCY(4), .ABITS(12)) mem (.clk, .req(mp_req), .we(mp_we), .addr(mp_addr),
                                           .wdata(mp_wdata), .ack(mp_ack), .rdata(mp_rdata));
  always #5 clk = ~clk;

  function automatic word_t mem_word(input logic [11:0] a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return {32'hC0DE_0000 | 32'(a), 32'(a) * 32'h9E37};
  endfunction

  task automatic access(input logic w, input logic [AW-1:0] a, input word_t d, output int cyc);
    req = 1; we = w; addr = a; wdata = d; cyc = 0;
    #1;
    while (!done && cyc < 50) begin @(posedge clk); #1; cyc++; end
    if (!w) `CHECK(rdata == mem_word(a[11:0]), $sformatf("read %h got %h exp %h cyc %0d", a, rdata, mem_word(a[11:0]), cyc))
    if (w) ref_mem[a[11:0]] = d;
    @(posedge clk);   // the access completes at the end of its done cycle
    #1;
    req = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    int cyc, w0;
    addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    access(0, 24'h10, '0, cyc);
    `CHECK(cyc > 0, "cold read misses")
    access(0, 24'h10, '0, cyc);
    `CHECK(cyc == 0, "repeated read hits in the same cycle")
    w0 = mem.writes;
    access(1, 24'h10, 64'hDEAD_BEEF_0000_0001, cyc);
    `CHECK(cyc > 0 && mem.writes == w0 + 1, "write goes through to Mp")
    access(0, 24'h10, '0, cyc);
    `CHECK(cyc == 0, "written word hits")
    for (int n = 0; n < 1500; n++) begin
      logic w;
      w = ($urandom % 4) == 0;
      access(w, AW'($urandom % 160), {$urandom, $urandom}, cyc);
      if (!w && cyc == 0) hits++;
    end
    `CHECK(hits > 100, "random reads hit some of the time")
    `TB_END
  end
endmodule
