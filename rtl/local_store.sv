// local_store: the local memory M(LOCAL) scratchpad.
//
// A register array addressed by 8-bit register numbers, as the microword
// register fields are 8 bits wide. It holds the general registers R1-R3 and
// T1-T3, the argument registers A[16], the registers F[16], the property
// descriptor table PDT[64] and the operator descriptor table ODT[64] (see
// plisp_pkg for the address map, which is this design's own). Special units
// (STACK, UPC, SAVCR, IAR, MAR, MBR) are outside and are selected by the
// datapath. PDT entries are 28 bits (TYPE and a 24-bit pointer) and ODT
// entries 20 bits (TYPE and a 16-bit pointer): a write keeps only the TYPE
// field <0:3> and the pointer in the low bits (<40:63>, resp. <48:63>), so an
// entry reads back as a pointer word and compares directly with one.
// NRD asynchronous read ports, NWR write ports written on the clock edge;
// a higher-numbered write port wins on an address clash. No reset: the
// contents are loaded by microcode or through a write port before use.
module local_store
  import plisp_pkg::*;
#(
  parameter int unsigned NREG = 256,
  parameter int unsigned NRD  = 6,
  parameter int unsigned NWR  = 3
) (
  input  logic             clk,
  input  logic [NRD-1:0][7:0] raddr,
  output word_t [NRD-1:0]  rdata,
  input  logic [NWR-1:0]   we,
  input  logic [NWR-1:0][7:0] waddr,
  input  word_t [NWR-1:0]  wdata
);
  word_t regs [NREG];

  function automatic word_t fit(input logic [7:0] a, input word_t d);
    word_t r;
    r = d;
    if (a >= RA_PDT0 && a < RA_PDT0 + 8'd64)
      r = {d[0:3], 36'd0, d[40:63]};
    else if (a >= RA_ODT0 && a < RA_ODT0 + 8'd64)
      r = {d[0:3], 44'd0, d[48:63]};
    return r;
  endfunction

  always_comb
    for (int p = 0; p < NRD; p++)
      rdata[p] = (32'(raddr[p]) < NREG) ? regs[raddr[p]] : '0;

  always_ff @(posedge clk)
    for (int p = 0; p < NWR; p++)
      if (we[p] && 32'(waddr[p]) < NREG) regs[waddr[p]] <= fit(waddr[p], wdata[p]);
endmodule
