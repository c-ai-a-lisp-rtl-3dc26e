// tb_alu_unit: launches random ALU functions and checks the result against
// a model, and the timing: ready must rise exactly LOGIC_STEPS-1 clocks
// microsteps counting the launching one (ready for the next microword) for
// logic functions and ARITH_STEPS for adder functions, and a release must clear the result.
`include "rtl/tb_check.svh"
module tb_alu_unit;
  import plisp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, go = 0, release_bus = 0;
  word_t opa, opb, result;
  logic [4:0] fn;
  logic ready, busy, zero, neg, carry;

  alu_unit #(.LOGIC_STEPS(2), .ARITH_STEPS(3)) dut (.*);
  always #5 clk = ~clk;

  function automatic word_t model(input logic [4:0] f, input word_t a, input word_t b);
    case (f)
      ALU_PASSA: return a;
      ALU_PASSB: return b;
      ALU_ADD:   return a + b;
      ALU_SUB:   return a - b;
      ALU_AND:   return a & b;
      ALU_OR:    return a | b;
      ALU_XOR:   return a ^ b;
      ALU_NOTA:  return ~a;
      ALU_INCA:  return a + 1;
      ALU_DECA:  return a - 1;
      ALU_SHL:   return a << 1;
      ALU_SHR:   return a >> 1;
      ALU_ASR:   return word_t'($signed(a) >>> 1);
      ALU_EQ:    return (a == b) ? word_t'(1) : word_t'(0);
      ALU_NEGA:  return -a;
      default:   return a;
    endcase
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    opa = '0; opb = '0; fn = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int wait_cycles, exp_steps;
      word_t e;
      @(negedge clk);
      opa = {$urandom, $urandom}; opb = (n % 7 == 0) ? opa : {$urandom, $urandom};
      fn = 5'($urandom % 15);
      go = 1;
      @(negedge clk);
      go = 0;
      opa = '0; opb = '0;   // operands are latched
      exp_steps = (fn inside {ALU_ADD, ALU_SUB, ALU_INCA, ALU_DECA, ALU_NEGA}) ? 3 : 2;
      wait_cycles = 1;
      while (!ready && wait_cycles < 10) begin
        @(negedge clk); wait_cycles++;
      end
      e = model(fn, dut.la, dut.lb);
      `CHECK(wait_cycles == exp_steps - 1, $sformatf("fn %0d ready after %0d steps", fn, wait_cycles))
      `CHECK(result == e, $sformatf("fn %0d result %h exp %h", fn, result, e))
      `CHECK(zero == (e == 0) && neg == e[0], $sformatf("fn %0d flags", fn))
      if (n % 5 == 0) begin
        release_bus = 1;
        @(negedge clk);
        release_bus = 0;
        `CHECK(!ready && result == '0, "release clears the result")
      end
    end
    // a known sum with carry
    @(negedge clk);
    opa = '1; opb = 64'd2; fn = ALU_ADD; go = 1;
    @(negedge clk); go = 0;
    `CHECK(busy && !ready, "add still settling after one step")
    @(negedge clk);

    `CHECK(ready && result == 64'd1 && carry, "all-ones + 2 = 1 carry out")
    `TB_END
  end
endmodule
