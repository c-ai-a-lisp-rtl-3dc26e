// data_cache: data cache, the processor's front end of primary memory (Mp)
// for the LISP program and data being interpreted.
//
// Serves the micro-engine's memory reads (MBR <- M[MAR]) and writes
// (M[MAR] <- MBR). Direct-mapped, one word per line, write-through with
// allocate on write: organisation, policy and size are this design's
// choices; the default of 2048 words takes up the description's remark that
// a 2K cache serves conventional LISP well. Handshake: the engine holds req
// (with we, addr, wdata) until done, a one-cycle pulse. A read hit is done in
// the cycle it is asked (combinational lookup); a read miss and every write
// go to Mp, hold mp_req until mp_ack, and are done in the mp_ack cycle.
module data_cache
  import plisp_pkg::*;
#(
  parameter int unsigned WORDS = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  word_t         wdata,
  output logic          done,
  output word_t         rdata,
  output logic          hit,
  output logic          mp_req,
  output logic          mp_we,
  output logic [AW-1:0] mp_addr,
  output word_t         mp_wdata,
  input  logic          mp_ack,
  input  word_t         mp_rdata
);
  localparam int unsigned IW = $clog2(WORDS);
  localparam int unsigned TW = AW - IW;

  word_t            data [WORDS];
  logic [TW-1:0]    tags [WORDS];
  logic [WORDS-1:0] valid;
  logic [IW-1:0]    idx;
  logic             going;   // an Mp access is outstanding

  assign idx      = addr[IW-1:0];
  assign hit      = req && !we && valid[idx] && (tags[idx] == addr[AW-1:IW]);
  assign mp_req   = going;
  assign mp_we    = we;
  assign mp_addr  = addr;
  assign mp_wdata = wdata;
  assign done     = hit || (going && mp_ack);
  assign rdata    = hit ? data[idx] : mp_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      going <= 1'b0;
    end else if (going) begin
      if (mp_ack) begin
        going      <= 1'b0;
        valid[idx] <= 1'b1;
      end
    end else if (req && !hit) begin
      going <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (going && mp_ack) begin
      data[idx] <= we ? wdata : mp_rdata;
      tags[idx] <= addr[AW-1:IW];
    end
endmodule
