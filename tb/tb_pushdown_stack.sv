// tb_pushdown_stack: random pushes, pops and push+pop (replace) against a
// queue model, including filling to overflow and popping past empty.
`include "rtl/tb_check.svh"
module tb_pushdown_stack;
  import plisp_pkg::*;
  int checks = 0, failures = 0;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  word_t push_val, top;
  logic empty, full, overflow, underflow;
  word_t q[$];

  pushdown_stack #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    push_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(empty && !full && top == '0, "empty after reset")
    for (int n = 0; n < 2000; n++) begin
      int r;
      r = int'($urandom % 3);
      push = (r == 0) || (r == 2 && q.size() > 0);
      pop  = (r == 1) || (r == 2 && q.size() > 0);
      if (n > 1500) begin push = 0; pop = 1; end
      push_val = {$urandom, $urandom};
      if (push && pop) begin
        void'(q.pop_back()); q.push_back(push_val);
      end else if (push) begin
        if (q.size() < D) q.push_back(push_val);
      end else if (pop) begin
        if (q.size() > 0) void'(q.pop_back());
      end
      @(negedge clk);
      push = 0; pop = 0;
      `CHECK(empty == (q.size() == 0) && full == (q.size() == D), $sformatf("step %0d size flags", n))
      if (q.size() > 0) `CHECK(top == q[$], $sformatf("step %0d top", n))
    end
    // fill past the top and pop past the bottom
    repeat (D + 1) begin push = 1; push_val = {$urandom, $urandom}; @(negedge clk); end
    push = 0;
    `CHECK(full && overflow, "overflow flagged")
    repeat (D + 1) begin pop = 1; @(negedge clk); end
    pop = 0;
    `CHECK(empty && underflow, "underflow flagged")
    `TB_END
  end
endmodule
