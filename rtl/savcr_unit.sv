// savcr_unit: structure-access-vector control register (SAVCR).
//
// Holds a structure access vector: TYPE<0:3>, GC<4:5>, COUNTER<6:11> and
// VECTOR<12:63>. COUNTER is a two-way mod-64 counter and VECTOR a 52-bit
// shift register used as a stack of path bits whose top is the rightmost bit
// (bit 63, LASTBIT): 0 means take the CAR, 1 the CDR. A pop shifts VECTOR one
// place right (VECTOR/2) and counts down; a push shifts it one place left,
// puts the new bit at the top and counts up. The whole word can be loaded and
// read in parallel. All of that follows the processor description; the
// priority load > pop > push when several are asked in one cycle is this
// design's choice. Updates on the rising clock edge; outputs are registered.
module savcr_unit
  import plisp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  word_t       load_val,
  input  logic        pop,        // COUNTER <- COUNTER-1, VECTOR <- VECTOR/2
  input  logic        push,
  input  logic        push_bit,
  output word_t       value,
  output logic        cnt_zero,   // COUNTER = 0
  output logic        last_bit    // VECTOR<51> = word bit 63
);
  logic [3:0]  typ;
  logic [1:0]  gc;
  logic [5:0]  cnt;
  logic [0:51] vec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      typ <= TY_SAV;
      gc  <= '0;
      cnt <= '0;
      vec <= '0;
    end else if (load) begin
      typ <= load_val[0:3];
      gc  <= load_val[4:5];
      cnt <= load_val[6:11];
      vec <= load_val[12:63];
    end else if (pop) begin
      cnt <= cnt - 6'd1;
      vec <= vec >> 1;
    end else if (push) begin
      cnt <= cnt + 6'd1;
      vec <= {vec[1:51], push_bit};
    end
  end

  assign value    = {typ, gc, cnt, vec};
  assign cnt_zero = (cnt == 6'd0);
  assign last_bit = vec[51];
endmodule
