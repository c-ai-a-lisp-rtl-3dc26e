// tb_local_store: random writes on all write ports and reads on all read
// ports against a model array, including the PDT and ODT entry widths
// (only TYPE and the pointer field are kept) and the write-port priority.
`include "rtl/tb_check.svh"
module tb_local_store;
  import plisp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [5:0][7:0] raddr;
  word_t [5:0]     rdata;
  logic [2:0]      we;
  logic [2:0][7:0] waddr;
  word_t [2:0]     wdata;
  word_t model [256];
  bit    known [256];

  local_store #(.NREG(256), .NRD(6), .NWR(3)) dut (.*);
  always #5 clk = ~clk;

  function automatic word_t fit(input int a, input word_t d);
    word_t r;
    r = d;
    if (a >= 64 && a < 128)  for (int i = 4; i < 40; i++) r[i] = 1'b0;
    if (a >= 128 && a < 192) for (int i = 4; i < 48; i++) r[i] = 1'b0;
    return r;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        we[p] = 1'($urandom);
        waddr[p] = 8'($urandom % 12) + ((n % 2) ? 8'h40 : 8'h84) - ((n % 3) == 0 ? 8'h40 : 8'h0);
        wdata[p] = {$urandom, $urandom};
      end
      for (int p = 0; p < 3; p++)
        if (we[p]) begin model[waddr[p]] = fit(waddr[p], wdata[p]); known[waddr[p]] = 1; end
      for (int p = 0; p < 6; p++) raddr[p] = 8'($urandom % 12) + ((p % 2) ? 8'h40 : 8'h84) - ((p % 3) == 0 ? 8'h40 : 8'h0);
      @(posedge clk);
      #1;
      we = '0;
      for (int p = 0; p < 6; p++)
        if (known[raddr[p]])
          `CHECK(rdata[p] == model[raddr[p]], $sformatf("port %0d addr %h got %h exp %h", p, raddr[p], rdata[p], model[raddr[p]]))
    end
    `TB_END
  end
endmodule
