// mp_model: behavioural model of the C.ai primary memory port, for the
// testbenches. A request (req held until ack) is answered after LATENCY
// clocks with a one-cycle ack; reads return the addressed word, writes store
// wdata. Words never written read as a function of their address. Holds
// 2**ABITS words; higher address bits are ignored.
module mp_model
  import plisp_pkg::*;
#(
  parameter int LATENCY = 4,
  parameter int ABITS   = 16
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  word_t         wdata,
  output logic          ack,
  output word_t         rdata
);
  word_t mem [2**ABITS];
  int    cnt = 0;
  int    reads = 0, writes = 0;

  initial
    for (int i = 0; i < 2**ABITS; i++) mem[i] = {32'hC0DE_0000 | 32'(i), 32'(i) * 32'h9E37};

  initial ack = 1'b0;
  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      if (cnt == LATENCY - 1) begin
        cnt <= 0;
        ack <= 1'b1;
        if (we) begin mem[addr[ABITS-1:0]] <= wdata; writes++; end
        else begin rdata <= mem[addr[ABITS-1:0]]; reads++; end
      end else cnt <= cnt + 1;
    end
  end
endmodule
