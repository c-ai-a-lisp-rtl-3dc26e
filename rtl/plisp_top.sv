// plisp_top: P.LISP, a microprogrammed processor for interpreting LISP.
//
// The processor runs the LISP interpreter as recursive microcode held in
// primary memory (Mp) and cached in the microprogram cache; LISP program and
// data come through a second, data cache. Both caches share the one Mp port.
// Every microword (one per clock when nothing waits) may move words between
// registers of the local memory over two buses L(1) and L(2), each with its
// own byte-transfer switch pair, so any contiguous bit field of a register can
// be written into any place of another. An ALU with latched operand buses
// works alongside; its result is stored by a later microword. Special
// registers: STACK (write pushes, read pops; saved UPC words make the
// microcode recursive), SAVCR (structure access vector walker), IAR (index
// into local memory, for PDT/ODT scans), MAR/MBR (memory address and buffer)
// and UPC (read gives the return address UPC+1, write jumps).
//
// Timing: a microword executes in one clock; it waits while its microword is
// being fetched into the cache, while a memory access it starts is under way,
// and while the ALU result it wants to store has not settled. Reads are
// combinational and all register writes happen at the clock edge that ends
// the microword. Both buses carry one transfer each per microword.
//
// The organisation (two buses with byte matrices, asynchronous ALU, dual
// caches, the register set, the microword formats) follows the processor
// description. The local-memory address map, type codes, memory commands via
// the set-conditions field, the host load/inspect port used to put arguments
// into local memory while the engine is stopped, and all sizes not stated
// there are this design's choices (see plisp_pkg).
//
// Ports: microbase selects the language's microcode in Mp; start/start_disp
// begin execution; the mp_* port is a req/ack port to the C.ai memory (req
// held until a one-cycle ack); flags are the condition bits set and reset by
// microcode for the outside world; ext_in are outside conditions microcode
// can test. bus1_latch/bus2_latch show the word each bus last carried; a
// microword's release bits clear them.
module plisp_top
  import plisp_pkg::*;
#(
  parameter int unsigned LS_REGS         = 256,
  parameter int unsigned STACK_DEPTH     = 64,
  parameter int unsigned UCACHE_WORDS    = 1024,
  parameter int unsigned DCACHE_WORDS    = 2048,
  parameter int unsigned ALU_LOGIC_STEPS = 2,
  parameter int unsigned ALU_ARITH_STEPS = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [AW-1:0]      microbase,
  input  logic               start,
  input  logic [UDW-1:0]     start_disp,
  input  logic               ucache_flush,
  input  logic [NEXT_IN-1:0] ext_in,
  input  logic               host_we,
  input  logic [7:0]         host_addr,
  input  word_t              host_wdata,
  input  logic [7:0]         host_raddr,
  output word_t              host_rdata,
  output logic               mp_req,
  output logic               mp_we,
  output logic [AW-1:0]      mp_addr,
  output word_t              mp_wdata,
  input  logic               mp_ack,
  input  word_t              mp_rdata,
  output logic               running,
  output logic               uerr,
  output logic [UDW-1:0]     upc,
  output logic [NFLAG-1:0]   flags,
  output logic               stack_overflow,
  output logic               stack_underflow,
  output word_t              bus1_latch,
  output word_t              bus2_latch
);
  // ------------------------------------------------------------ fetch/decode
  word_t mw;
  uop_t  u;
  logic  uc_hit, uflush;
  logic  uc_mreq, dc_mreq, dc_mwe;
  logic [AW-1:0] uc_maddr, dc_maddr;
  word_t dc_mwdata, arb_rdata;
  logic [1:0] arb_ack;

  micro_cache #(.WORDS(UCACHE_WORDS)) u_ucache (
    .clk, .rst_n, .microbase, .rd_en(running), .disp(upc), .hit(uc_hit),
    .rdata(mw), .flush(uflush), .mp_req(uc_mreq), .mp_addr(uc_maddr),
    .mp_ack(arb_ack[0]), .mp_rdata(arb_rdata));

  micro_decoder u_dec (.mw, .u);

  // ---------------------------------------------------------- special units
  logic [7:0]    iar;
  logic [AW-1:0] mar;
  word_t         mbr;
  word_t         stk_top, sav_val, alu_res;
  logic          stk_empty, stk_full, sav_zero, sav_last;
  logic          alu_rdy, alu_zero, alu_neg, alu_cry;

  // effective addresses (indirect transfers use IAR)
  logic [7:0] src_a [2], dst_a [2];
  xfer_t      bx [2];
  assign bx[0] = u.bus1;
  assign bx[1] = u.bus2;
  always_comb
    for (int b = 0; b < 2; b++) begin
      src_a[b] = bx[b].src_ind ? iar : bx[b].src;
      dst_a[b] = bx[b].dst_ind ? iar : bx[b].dst;
    end

  // local memory: ports 0,1 bus sources; 2,3 bus destinations; 4,5 ALU; 6 host
  logic  [6:0][7:0] ls_raddr;
  word_t [6:0]      ls_rdata;
  logic  [2:0]      ls_we;
  logic  [2:0][7:0] ls_waddr;
  word_t [2:0]      ls_wdata;

  assign ls_raddr[0] = src_a[0];
  assign ls_raddr[1] = src_a[1];
  assign ls_raddr[2] = dst_a[0];
  assign ls_raddr[3] = dst_a[1];
  assign ls_raddr[4] = u.alu_a;
  assign ls_raddr[5] = u.alu_b;
  assign ls_raddr[6] = host_raddr;

  local_store #(.NREG(LS_REGS), .NRD(7), .NWR(3)) u_ls (
    .clk, .raddr(ls_raddr), .rdata(ls_rdata), .we(ls_we), .waddr(ls_waddr),
    .wdata(ls_wdata));

  function automatic word_t rv(input logic [7:0] a, input word_t ls);
    word_t r;
    unique case (a)
      RA_ZERO:  r = '0;
      RA_STACK: r = stk_top;
      RA_UPC:   r = {TY_UPC, 44'd0, upc + UDW'(1)};
      RA_SAVCR: r = sav_val;
      RA_IAR:   r = {56'd0, iar};
      RA_MAR:   r = {40'd0, mar};
      RA_MBR:   r = mbr;
      RA_COND:  r = {44'd0, flags};
      default:  r = ls;
    endcase
    return r;
  endfunction

  // --------------------------------------------------------- buses and ALU
  word_t bsrc [2], bdst [2], bout [2];
  logic  is_cmp;
  assign is_cmp = (u.jkind == JK_CMP);

  for (genvar b = 0; b < 2; b++) begin : g_bus
    assign bsrc[b] = bx[b].src_alu ? alu_res : rv(src_a[b], ls_rdata[b]);
    assign bdst[b] = is_cmp ? '0 : rv(dst_a[b], ls_rdata[2+b]);
    byte_transfer u_bt (.src(bsrc[b]), .dst_in(bdst[b]), .ibp1(bx[b].ibp1),
                        .ibp2(bx[b].ibp2), .fbp2(bx[b].fbp2), .dst_out(bout[b]),
                        .mask());
  end

  // immediate byte compare (type 6): the byte arrives right-aligned
  logic [15:0] cmp_field, cmp_lenmask;
  logic        cmp_eq;
  assign cmp_field   = u.cmp_bus ? bout[1][48:63] : bout[0][48:63];
  assign cmp_lenmask = 16'((17'd1 << u.cmp_len) - 17'd1);
  assign cmp_eq      = ((cmp_field ^ u.cmp_pat) & cmp_lenmask) == 16'd0;

  // ------------------------------------------------------------- control
  logic exec, commit, alu_stall, mem_stall, mem_req, mem_done;
  word_t dc_rdata;

  assign exec      = running && uc_hit && u.valid;
  assign alu_stall = exec && u.alu_store && !alu_rdy;
  assign mem_req   = exec && (u.cmd[SC_MRD] || u.cmd[SC_MWR]);
  assign mem_stall = mem_req && !mem_done;
  assign commit    = exec && !alu_stall && !mem_stall;
  assign uflush    = ucache_flush || (commit && u.cmd[SC_UFLUSH]);

  alu_unit #(.LOGIC_STEPS(ALU_LOGIC_STEPS), .ARITH_STEPS(ALU_ARITH_STEPS)) u_alu (
    .clk, .rst_n, .go(commit && u.alu_go),
    .opa(rv(u.alu_a, ls_rdata[4])), .opb(rv(u.alu_b, ls_rdata[5])), .fn(u.alu_fn),
    .release_bus(commit && u.ralu), .result(alu_res), .ready(alu_rdy),
    .busy(), .zero(alu_zero), .neg(alu_neg), .carry(alu_cry));

  // destination writes
  logic  wr [2];
  logic  stk_push, stk_pop, sav_load, upc_load;
  word_t stk_pval, sav_lval;
  logic [UDW-1:0] upc_lval;

  always_comb begin
    stk_push = 1'b0; stk_pval = '0; sav_load = 1'b0; sav_lval = '0;
    upc_load = 1'b0; upc_lval = '0; stk_pop = 1'b0;
    ls_we = '0; ls_waddr = '0; ls_wdata = '0;
    for (int b = 0; b < 2; b++) begin
      wr[b] = commit && bx[b].en;
      if (wr[b] && !bx[b].src_alu && src_a[b] == RA_STACK) stk_pop = 1'b1;
      if (wr[b]) begin
        unique case (dst_a[b])
          RA_STACK: begin stk_push = 1'b1; stk_pval = bout[b]; end
          RA_SAVCR: begin sav_load = 1'b1; sav_lval = bout[b]; end
          RA_UPC:   begin upc_load = 1'b1; upc_lval = bout[b][48:63]; end
          RA_ZERO, RA_COND, RA_IAR, RA_MAR, RA_MBR: ;
          default: begin
            ls_we[b] = 1'b1; ls_waddr[b] = dst_a[b]; ls_wdata[b] = bout[b];
          end
        endcase
      end
    end
    if (commit && u.alu_go && (u.alu_a == RA_STACK || u.alu_b == RA_STACK)) stk_pop = 1'b1;
    ls_we[2] = host_we && !running;
    ls_waddr[2] = host_addr;
    ls_wdata[2] = host_wdata;
  end

  assign host_rdata = rv(host_raddr, ls_rdata[6]);

  pushdown_stack #(.DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n, .push(stk_push), .push_val(stk_pval), .pop(stk_pop),
    .top(stk_top), .empty(stk_empty), .full(stk_full),
    .overflow(stack_overflow), .underflow(stack_underflow));

  savcr_unit u_sav (
    .clk, .rst_n, .load(sav_load), .load_val(sav_lval),
    .pop(commit && u.cmd[SC_SAV_POP]),
    .push(commit && (u.cmd[SC_SAV_PSH0] || u.cmd[SC_SAV_PSH1])),
    .push_bit(u.cmd[SC_SAV_PSH1]), .value(sav_val), .cnt_zero(sav_zero),
    .last_bit(sav_last));

  // IAR, MAR, MBR, flags and the bus latches
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iar <= '0; mar <= '0; mbr <= '0; flags <= '0;
      bus1_latch <= '0; bus2_latch <= '0;
    end else if (commit) begin
      for (int b = 0; b < 2; b++) begin
        if (wr[b]) begin
          if (dst_a[b] == RA_IAR) iar <= bout[b][56:63];
          if (dst_a[b] == RA_MAR) mar <= bout[b][40:63];
          if (dst_a[b] == RA_MBR) mbr <= bout[b];
        end
      end
      if (wr[0]) bus1_latch <= bout[0];
      if (wr[1]) bus2_latch <= bout[1];
      if (u.rtb1) bus1_latch <= '0;
      if (u.rtb2) bus2_latch <= '0;
      if (u.cmd[SC_IAR_INC]) iar <= iar + 8'd1;
      if (u.cmd[SC_IAR_DEC]) iar <= iar - 8'd1;
      if (u.cmd[SC_MRD]) mbr <= dc_rdata;
      flags <= (flags & ~u.frst) | u.fset;
    end
  end

  // ---------------------------------------------------------------- memory
  data_cache #(.WORDS(DCACHE_WORDS)) u_dcache (
    .clk, .rst_n, .req(mem_req), .we(u.cmd[SC_MWR]), .addr(mar), .wdata(mbr),
    .done(mem_done), .rdata(dc_rdata), .hit(), .mp_req(dc_mreq),
    .mp_we(dc_mwe), .mp_addr(dc_maddr), .mp_wdata(dc_mwdata),
    .mp_ack(arb_ack[1]), .mp_rdata(arb_rdata));

  mp_arbiter u_arb (
    .clk, .rst_n, .req({dc_mreq, uc_mreq}), .we({dc_mwe, 1'b0}),
    .addr({dc_maddr, uc_maddr}), .wdata({dc_mwdata, word_t'('0)}), .ack(arb_ack),
    .rdata(arb_rdata), .mp_req, .mp_we, .mp_addr, .mp_wdata, .mp_ack, .mp_rdata);

  // --------------------------------------------------------------- sequence
  logic [NCOND-1:0] cond;
  always_comb begin
    cond = '0;
    cond[NFLAG-1:0] = flags;
    cond[CD_SAVZERO] = sav_zero;
    cond[CD_LASTBIT] = sav_last;
    cond[CD_ALUZERO] = alu_zero;
    cond[CD_ALUNEG]  = alu_neg;
    cond[CD_ALUCRY]  = alu_cry;
    cond[CD_STKEMP]  = stk_empty;
    cond[CD_STKFUL]  = stk_full;
    cond[CD_ALURDY]  = alu_rdy;
    cond[CD_EXT0 +: NEXT_IN] = ext_in;
  end

  micro_sequencer u_seq (
    .clk, .rst_n, .start, .start_disp, .word_ok(running && uc_hit),
    .word_valid(u.valid), .stall(alu_stall || mem_stall),
    .halt_req(u.cmd[SC_HALT]), .jkind(u.jkind), .jaddr(u.jaddr),
    .tsense(u.tsense), .tmask(u.tmask), .cond, .cmp_eq, .cmp_jeq(u.cmp_jeq),
    .upc_load, .upc_load_val(upc_lval), .upc, .running, .retire(), .taken(), .uerr);

  // a memory access keeps its address and data while it waits
  a_mem_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_stall |=> $stable(mar) && $stable(mbr));
  // a store-ALU microword never shares its bus with a transfer of the same bus
  a_one_per_bus: assert property (@(posedge clk) disable iff (!rst_n)
    !(exec && u.op == OP_TWO_XFER && u.alu_store &&
      (mw[8] ? mw[34] : mw[17])));
endmodule
