// tb_savcr_unit: loads structure access vectors, pops and pushes path bits
// and checks the register against a model: COUNTER counts down on a pop and
// up on a push (mod 64), VECTOR shifts right on a pop (VECTOR/2) and left on
// a push with the new bit at the rightmost place; LASTBIT is that place.
`include "rtl/tb_check.svh"
module tb_savcr_unit;
  import plisp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, pop = 0, push = 0, push_bit = 0;
  word_t load_val, value;
  logic cnt_zero, last_bit;
  logic [5:0]  m_cnt;
  logic [51:0] m_vec;   // m_vec[0] is the rightmost bit
  logic [5:0]  m_gc_typ;

  savcr_unit dut (.*);
  always #5 clk = ~clk;

  task automatic compare(string what);
    `CHECK(value[6:11] == m_cnt, {what, ": counter"})
    `CHECK(value[12:63] == m_vec, {what, ": vector"})
    `CHECK(value[0:5] == m_gc_typ, {what, ": type/gc"})
    `CHECK(cnt_zero == (m_cnt == 0), {what, ": zero"})
    `CHECK(last_bit == m_vec[0], {what, ": lastbit"})
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    load_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(value[0:3] == TY_SAV && cnt_zero, "reset state")
    for (int n = 0; n < 400; n++) begin
      int op;
      op = (n % 50 == 0) ? 0 : 1 + int'($urandom % 3);
      load = 0; pop = 0; push = 0;
      if (op == 0) begin
        load = 1;
        load_val = {TY_SAV, 2'b01, 6'($urandom), $urandom, 20'($urandom)};
        m_gc_typ = load_val[0:5]; m_cnt = load_val[6:11]; m_vec = load_val[12:63];
      end else if (op == 1) begin
        pop = 1; m_cnt = m_cnt - 1; m_vec = m_vec >> 1;
      end else begin
        push = 1; push_bit = 1'($urandom);
        m_cnt = m_cnt + 1; m_vec = {m_vec[50:0], push_bit};
      end
      @(negedge clk);
      load = 0; pop = 0; push = 0;
      compare($sformatf("step %0d op %0d", n, op));
    end
    // CADDR walk: vector ...011 (CDR, CDR, CAR read from the right), count 3
    load = 1; load_val = {TY_SAV, 2'b00, 6'd3, 52'b011}; m_gc_typ = {TY_SAV, 2'b00};
    @(negedge clk); load = 0;
    `CHECK(last_bit == 1 && !cnt_zero, "first step is CDR")
    pop = 1; @(negedge clk);
    `CHECK(last_bit == 1, "second step is CDR")
    @(negedge clk);
    `CHECK(last_bit == 0, "third step is CAR")
    @(negedge clk); pop = 0;
    `CHECK(cnt_zero, "walk finished")
    `TB_END
  end
endmodule
