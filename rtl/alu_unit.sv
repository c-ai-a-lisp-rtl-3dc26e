// alu_unit: the processor's arithmetic-logic unit (L(3), L(4), K(3), S(5)).
//
// The ALU runs alongside the micro-engine. A launch (go) latches the two
// operands on the ALU input buses L(3)/L(4) and the function code; the
// microprogram then carries on while the function settles, and the result
// may be stored through S(5) once ready is high. Each bus latch holds until
// released: release clears the operand latches, the result and ready.
// Following the description, even the simplest function needs two microsteps
// from launch to store: the microword right after the launching one may
// store the result (LOGIC_STEPS = 2); a function of N steps is ready N-2
// clocks after the launch edge. Both step counts must be at least 2. The function set is left open by the description; this
// design offers pass, add, subtract, logic, increment/decrement, shifts,
// negate and an equality test, and gives the adder functions (add, sub, inc,
// dec, neg) a longer settle time of ARITH_STEPS microsteps, its own choice.
// zero/neg/carry describe the latched result.
module alu_unit
  import plisp_pkg::*;
#(
  parameter int unsigned LOGIC_STEPS = 2,
  parameter int unsigned ARITH_STEPS = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,
  input  word_t      opa,
  input  word_t      opb,
  input  logic [4:0] fn,
  input  logic       release_bus,
  output word_t      result,
  output logic       ready,
  output logic       busy,
  output logic       zero,
  output logic       neg,
  output logic       carry
);
  word_t      la, lb;
  logic [4:0] lfn;
  logic [3:0] steps;      // microsteps still to wait
  logic       active;
  logic [64:0] wide;

  initial assert (LOGIC_STEPS >= 2 && ARITH_STEPS >= 2);
  word_t      comb_res;

  function automatic logic is_arith(input logic [4:0] f);
    return f inside {ALU_ADD, ALU_SUB, ALU_INCA, ALU_DECA, ALU_NEGA};
  endfunction

  always_comb begin
    wide = '0;
    unique case (lfn)
      ALU_PASSA: wide = {1'b0, la};
      ALU_PASSB: wide = {1'b0, lb};
      ALU_ADD:   wide = {1'b0, la} + {1'b0, lb};
      ALU_SUB:   wide = {1'b0, la} - {1'b0, lb};
      ALU_AND:   wide = {1'b0, la & lb};
      ALU_OR:    wide = {1'b0, la | lb};
      ALU_XOR:   wide = {1'b0, la ^ lb};
      ALU_NOTA:  wide = {1'b0, ~la};
      ALU_INCA:  wide = {1'b0, la} + 65'd1;
      ALU_DECA:  wide = {1'b0, la} - 65'd1;
      ALU_SHL:   wide = {la, 1'b0};
      ALU_SHR:   wide = {1'b0, la >> 1};
      ALU_ASR:   wide = {1'b0, la[0], la[0:62]};
      ALU_EQ:    wide = {1'b0, 63'd0, la == lb};
      ALU_NEGA:  wide = 65'd0 - {1'b0, la};
      default:   wide = {1'b0, la};
    endcase
    comb_res = wide[63:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la <= '0; lb <= '0; lfn <= '0; steps <= '0; active <= 1'b0;
    end else if (go) begin
      la     <= opa;
      lb     <= opb;
      lfn    <= fn;
      active <= 1'b1;
      steps  <= 4'((is_arith(fn) ? ARITH_STEPS : LOGIC_STEPS) - 2);
    end else if (release_bus) begin
      la <= '0; lb <= '0; lfn <= '0; steps <= '0; active <= 1'b0;
    end else if (steps != 0) begin
      steps <= steps - 4'd1;
    end
  end

  assign ready  = active && (steps == 0);
  assign busy   = active && (steps != 0);
  assign result = ready ? comb_res : '0;
  assign zero   = ready && (comb_res == '0);
  assign neg    = ready && comb_res[0];
  assign carry  = ready && wide[64];
endmodule
