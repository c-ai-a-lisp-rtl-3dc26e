// tb_micro_sequencer: drives the sequencer's inputs at random for many
// steps and checks the next UPC against a model of the sequencing rules:
// a stall or a missing microword holds UPC; a UPC write wins over a jump;
// type-2 jumps always, type-4 jumps on any/none of the selected conditions,
// type-6 jumps on (not) equal; otherwise UPC+1. Also start, halt and the
// error stop on an illegal microword.
`include "rtl/tb_check.svh"
module tb_micro_sequencer;
  import plisp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, word_ok = 0, word_valid = 0, stall = 0, halt_req = 0;
  logic [UDW-1:0] start_disp = '0, jaddr = '0, upc_load_val = '0, upc;
  jkind_e jkind = JK_NONE;
  logic tsense = 0, cmp_eq = 0, cmp_jeq = 0, upc_load = 0;
  logic [NCOND-1:0] tmask = '0, cond = '0;
  logic running, retire, taken, uerr;

  micro_sequencer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    logic [UDW-1:0] exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(!running, "stopped after reset")
    start = 1; start_disp = 16'h1234;
    @(negedge clk); start = 0;
    `CHECK(running && upc == 16'h1234, "start at start_disp")
    for (int n = 0; n < 3000; n++) begin
      word_ok = ($urandom % 8) != 0;
      word_valid = 1;
      stall = ($urandom % 6) == 0;
      jkind = jkind_e'($urandom % 4);
      jaddr = 16'($urandom);
      tsense = 1'($urandom);
      tmask = NCOND'({$urandom, $urandom}) & NCOND'({$urandom, $urandom}) & NCOND'({$urandom, $urandom});
      cond = NCOND'({$urandom, $urandom});
      cmp_eq = 1'($urandom); cmp_jeq = 1'($urandom);
      upc_load = ($urandom % 10) == 0;
      upc_load_val = 16'($urandom);
      #1;
      exp = upc;
      if (word_ok && !stall) begin
        bit tk;
        case (jkind)
          JK_ALWAYS: tk = 1;
          JK_TEST:   tk = tsense ? ((cond & tmask) == 0) : ((cond & tmask) != 0);
          JK_CMP:    tk = (cmp_eq == cmp_jeq);
          default:   tk = 0;
        endcase
        exp = upc_load ? upc_load_val : tk ? jaddr : upc + 1;
        `CHECK(retire, "retires when not stalled")
      end else `CHECK(!retire, "no retire while stalled")
      @(negedge clk);
      `CHECK(upc == exp, $sformatf("step %0d kind %0d upc %h exp %h", n, jkind, upc, exp))
    end
    // halt
    word_ok = 1; stall = 0; upc_load = 0; jkind = JK_NONE; halt_req = 1;
    @(negedge clk); halt_req = 0;
    `CHECK(!running && !uerr, "halt stops the engine")
    start = 1; start_disp = 16'd7; @(negedge clk); start = 0;
    word_valid = 0;
    @(negedge clk);
    `CHECK(!running && uerr && upc == 16'd7, "illegal microword stops with error")
    `TB_END
  end
endmodule
