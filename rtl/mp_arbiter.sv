// mp_arbiter: shares the processor's single primary-memory (Mp) port between
// the microprogram cache (port 0) and the data cache (port 1).
//
// Both caches sit in front of the same Mp port of the C.ai memory. A
// requester holds req until its ack; the arbiter grants a free port to port
// 0 first (the engine cannot go on without its microword), then holds the
// grant until the memory's ack, which it passes back to the owner only. The
// priority and the handshake (req held until a one-cycle ack) are this
// design's choices. rdata goes to both requesters; only the owner takes it.
module mp_arbiter
  import plisp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    req,
  input  logic [1:0]    we,
  input  logic [1:0][AW-1:0] addr,
  input  word_t [1:0]   wdata,
  output logic [1:0]    ack,
  output word_t         rdata,
  output logic          mp_req,
  output logic          mp_we,
  output logic [AW-1:0] mp_addr,
  output word_t         mp_wdata,
  input  logic          mp_ack,
  input  word_t         mp_rdata
);
  logic busy, owner, sel;

  // while idle, choose port 0 if it asks, else port 1
  assign sel      = busy ? owner : !req[0];
  assign mp_req   = req[sel];
  assign mp_we    = we[sel];
  assign mp_addr  = addr[sel];
  assign mp_wdata = wdata[sel];
  assign rdata    = mp_rdata;
  assign ack[0]   = mp_ack && (sel == 1'b0);
  assign ack[1]   = mp_ack && (sel == 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; owner <= 1'b0;
    end else if (mp_ack) begin
      busy <= 1'b0;
    end else if (!busy && mp_req) begin
      busy <= 1'b1; owner <= sel;
    end
  end

  // a requester keeps its request up until it has seen its acknowledge
  a_hold0: assert property (@(posedge clk) disable iff (!rst_n)
                            (req[0] && !ack[0]) |=> (req[0] || ack[0]));
  a_hold1: assert property (@(posedge clk) disable iff (!rst_n)
                            (req[1] && !ack[1]) |=> (req[1] || ack[1]));
endmodule
