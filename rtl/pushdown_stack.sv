// pushdown_stack: the push-down store behind the STACK register.
//
// STACK is the top of a push-down store: any transfer into STACK pushes and
// any transfer out of it pops, as the processor description specifies. top
// always shows the top entry, so a read is the top value in the same
// microstep and the pop happens at the clock edge. A push and a pop in the
// same step replace the top. Depth, the empty/full flags, and what happens
// at the ends (a push onto a full store is dropped and sets overflow, a pop
// of an empty store returns zero and sets underflow; both stick until reset)
// are this design's choices, the description names none. The entries live in
// a register array indexed by a stack pointer.
module pushdown_stack
  import plisp_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  word_t push_val,
  input  logic  pop,
  output word_t top,
  output logic  empty,
  output logic  full,
  output logic  overflow,
  output logic  underflow
);
  localparam int unsigned PW = $clog2(DEPTH + 1);
  word_t         mem [DEPTH];
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [PW-1:0] sp;   // number of entries
  logic [IW-1:0] top_i, next_i;   // index of the top entry and of the next free one

  assign top_i  = IW'(sp - PW'(1));
  assign next_i = IW'(sp);

  assign empty = (sp == '0);
  assign full  = (sp == PW'(DEPTH));
  assign top   = empty ? '0 : mem[top_i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0; overflow <= 1'b0; underflow <= 1'b0;
    end else begin
      if (push && pop) begin
        if (empty) begin
          mem[0] <= push_val; sp <= PW'(1); underflow <= 1'b1;
        end else
          mem[top_i] <= push_val;
      end else if (push) begin
        if (full) overflow <= 1'b1;
        else begin
          mem[next_i] <= push_val; sp <= sp + PW'(1);
        end
      end else if (pop) begin
        if (empty) underflow <= 1'b1;
        else sp <= sp - PW'(1);
      end
    end
  end
endmodule
