// micro_cache: microprogram cache M(1).
//
// Microcode lives in primary memory (Mp) and this cache keeps the most used
// microwords next to the micro-engine. A microword's Mp address is the
// microbase, set per language by the operating system, plus the 16-bit
// displacement held in UPC. The cache is direct-mapped with one microword per
// line; its size, organisation and the single-word refill are this design's
// choices, the description only asks for a cache. A lookup is combinational:
// with rd_en high, hit says whether rdata holds the word this cycle. On a
// miss the cache raises mp_req with the Mp address and keeps it until mp_ack,
// when the line is filled; the next cycle hits. flush clears every valid bit,
// so microcode rewritten in Mp is fetched again (writable microcode); a
// refill already under way still completes, with the fresh word.
module micro_cache
  import plisp_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   microbase,
  input  logic            rd_en,
  input  logic [UDW-1:0]  disp,
  output logic            hit,
  output word_t           rdata,
  input  logic            flush,
  output logic            mp_req,
  output logic [AW-1:0]   mp_addr,
  input  logic            mp_ack,
  input  word_t           mp_rdata
);
  localparam int unsigned IW = $clog2(WORDS);
  localparam int unsigned TW = AW - IW;

  word_t          data  [WORDS];
  logic [TW-1:0]  tags  [WORDS];
  logic [WORDS-1:0] valid;
  logic [AW-1:0]  addr;
  logic [IW-1:0]  idx;
  logic           filling;

  assign addr    = microbase + AW'(disp);
  assign idx     = addr[IW-1:0];
  assign hit     = rd_en && valid[idx] && (tags[idx] == addr[AW-1:IW]);
  assign rdata   = data[idx];
  assign mp_req  = filling;
  assign mp_addr = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= '0;
      filling <= 1'b0;
    end else begin
      if (flush) valid <= '0;
      if (filling) begin
        if (mp_ack) begin
          valid[idx] <= 1'b1;
          filling    <= 1'b0;
        end
      end else if (rd_en && !hit && !flush) begin
        filling <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (filling && mp_ack) begin
      data[idx] <= mp_rdata;
      tags[idx] <= addr[AW-1:IW];
    end
endmodule
