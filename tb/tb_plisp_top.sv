// tb_plisp_top: end-to-end test of the whole processor at its default sizes.
//
// Microcode is assembled into a memory model at microbase 0x8000 and runs
// from there through the microprogram cache. Three microprograms:
//  - entry 0: a call of CHAIN, which checks its first argument's TYPE (byte
//    compare), loads the structure access vector A[2] into SAVCR and follows
//    CAR or CDR (per LASTBIT) from the cell A[1] points to, one memory read per
//    step, until COUNTER is zero, then reads the cell reached into R1, pushes
//    a junk word and RETURNs by popping the stack until a saved UPC appears.
//    Back in the caller, F[0] is incremented by the ALU (its result is stored
//    at once, so the engine waits for the adder), and R1 is written to Mp.
//    Run for many random list structures and vectors, and once with a bad
//    argument type, which must set ERRORFLAG.
//  - entry 48: a search of the property descriptor table with IAR and
//    indirect transfers, comparing each entry with A[5] in the ALU.
//  - entry 64: rewrites one of its own microwords in Mp, flushes the
//    microprogram cache and runs the new word (writable microcode).
// Results are compared with a walk of the same structures done here, and
// every mechanism is counted; one that never happens is a failure. The ALU
// wait is also checked cycle-exact: the adder takes three microsteps, so
// storing its result in the next microword waits one cycle.
`include "rtl/tb_check.svh"
module tb_plisp_top;
  import plisp_pkg::*;
  import plisp_asm_pkg::*;
  int checks = 0, failures = 0;

  localparam logic [AW-1:0] UBASE = 24'h8000;
  localparam int NODE0 = 'h100, NNODES = 256;
  localparam int TRIALS = 40;

  logic clk = 0, rst_n = 0, start = 0, ucache_flush = 0, host_we = 0;
  logic [AW-1:0] microbase = UBASE;
  logic [UDW-1:0] start_disp = '0, upc;
  logic [NEXT_IN-1:0] ext_in = '0;
  logic [7:0] host_addr = '0, host_raddr = '0;
  word_t host_wdata = '0, host_rdata, mp_wdata, mp_rdata, bus1_latch, bus2_latch;
  logic mp_req, mp_we, mp_ack, running, uerr, stack_overflow, stack_underflow;
  logic [AW-1:0] mp_addr;
  logic [NFLAG-1:0] flags;

  plisp_top dut (.*);
  mp_model #(.LATENCY(10), .ABITS(16)) mem (.clk, .req(mp_req), .we(mp_we), .addr(mp_addr),
                                            .wdata(mp_wdata), .ack(mp_ack), .rdata(mp_rdata));
  always #5 clk = ~clk;

  // ------------------------------------------------------- mechanism counters
  int n_umiss, n_dhit, n_dmiss, n_alustall, n_memstall, n_push, n_pop, n_upcload,
      n_byte, n_cmp_taken, n_test_taken, n_indirect, n_savpop, n_iarinc, n_uflush,
      n_mwr, n_cycles;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (dut.running && !dut.uc_hit) n_umiss++;
    if (dut.mem_req && dut.u_dcache.hit && dut.commit) n_dhit++;
    if (dut.mem_req && !dut.u_dcache.hit && dut.commit) n_dmiss++;
    if (dut.alu_stall) n_alustall++;
    if (dut.mem_stall) n_memstall++;
    if (dut.stk_push) n_push++;
    if (dut.stk_pop) n_pop++;
    if (dut.commit && dut.upc_load) n_upcload++;
    if (dut.commit && dut.u.op == OP_BYTE_JUMP) n_byte++;
    if (dut.commit && dut.u.jkind == JK_CMP && dut.u_seq.taken) n_cmp_taken++;
    if (dut.commit && dut.u.jkind == JK_TEST && dut.u_seq.taken) n_test_taken++;
    if (dut.commit && (dut.u.bus1.src_ind || dut.u.bus2.src_ind)) n_indirect++;
    if (dut.commit && dut.u.cmd[SC_SAV_POP]) n_savpop++;
    if (dut.commit && dut.u.cmd[SC_IAR_INC]) n_iarinc++;
    if (dut.uflush) n_uflush++;
    if (dut.commit && dut.u.cmd[SC_MWR]) n_mwr++;
  end

  // ---------------------------------------------------------------- helpers
  localparam logic [7:0] A1 = RA_A0 + 1, A2 = RA_A0 + 2, A4 = RA_A0 + 4, A5 = RA_A0 + 5,
                         A6 = RA_A0 + 6, A7 = RA_A0 + 7, A8 = RA_A0 + 8,
                         F0 = RA_F0, F1 = RA_F0 + 1;

  task automatic put_u(input int disp, input word_t w);
    mem.mem[int'(UBASE) + disp] = w;
  endtask

  function automatic logic [NCOND-1:0] sel(input int c);
    logic [NCOND-1:0] m;
    m = '0; m[c] = 1'b1;
    return m;
  endfunction

  function automatic word_t ptr(input int a);
    return {TY_PTR, 2'b00, 6'd0, AM_LISTPTR, 24'd0, AM_LISTPTR, 24'(a)};
  endfunction

  task automatic host_write(input logic [7:0] a, input word_t d);
    @(negedge clk);
    host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic host_read(input logic [7:0] a, output word_t d);
    host_raddr = a;
    #1;
    d = host_rdata;
  endtask

  task automatic run(input logic [UDW-1:0] entry, output int cyc);
    @(negedge clk);
    start = 1; start_disp = entry;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (running && cyc < 5000) begin @(negedge clk); cyc++; end
    `CHECK(!running && !uerr, $sformatf("program at %0d halts cleanly", entry))
    if (running) `TB_END   // a runaway program ends the test
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    word_t rd, node;
    int cyc, stall0;
    // ------------------------------------------------ microcode
    // entry 0: caller
    put_u(0, call(16'd16));
    put_u(1, alu(ALU_INCA, F0, RA_ZERO));
    put_u(2, salu(F0));
    put_u(3, mov2(A4, RA_MAR, RA_R1, RA_MBR));
    put_u(4, cmd(SC_MWR));
    put_u(5, cmd(SC_HALT));
    // CHAIN
    put_u(16, jtype(A1, TY_PTR, 1'b0, 16'd40));
    put_u(17, mov2(A2, RA_SAVCR, A1, RA_MAR));
    put_u(18, t4(1'b0, sel(CD_SAVZERO), 16'd27));
    put_u(19, cmd(SC_MRD));
    put_u(20, mov(RA_MBR, RA_R2));
    put_u(21, t4(1'b0, sel(CD_LASTBIT), 16'd23));
    put_u(22, t2(1'b0, RA_R2, 6'd14, RA_MAR, 6'd40, 6'd63, 1'b1, 16'd24)); // CAR
    put_u(23, t2(1'b1, RA_R2, 6'd40, RA_MAR, 6'd40, 6'd63, 1'b1, 16'd24)); // CDR
    put_u(24, cmd(SC_SAV_POP));
    put_u(25, jmp(16'd18));
    put_u(27, cmd(SC_MRD));
    put_u(28, mov(RA_MBR, RA_R1));
    put_u(29, mov(A1, RA_STACK));
    // RETURN: pop until a saved UPC
    put_u(30, mov(RA_STACK, RA_T1));
    put_u(31, jtype(RA_T1, TY_UPC, 1'b0, 16'd30));
    put_u(32, mov(RA_T1, RA_UPC));
    put_u(40, setflag(FL_ERROR));
    put_u(41, jmp(16'd30));
    // entry 48: PDT search
    put_u(48, mov(A6, RA_IAR));
    put_u(49, t1(1'b0, 8'd0, 8'd0, 5'd0, 1'b0, 1'b0, 8'd0, 8'd0, 1'b1, 1'b0, 1'b0, RA_T2));
    put_u(50, alu(ALU_EQ, RA_T2, A5));
    put_u(51, salu(RA_T3));
    put_u(52, t6(1'b0, RA_T3, 6'd63, 4'd0, 16'h1, 1'b1, 16'd55));
    put_u(53, cmd(SC_IAR_INC));
    put_u(54, jmp(16'd49));
    put_u(55, mov(RA_IAR, F1));
    put_u(56, cmd(SC_HALT));
    // entry 64: self-modifying microcode
    put_u(64, jmp(16'd80));
    put_u(80, setflag(3));
    put_u(81, jmp(16'd82));
    put_u(82, t4(1'b0, sel(4), 16'd87));
    put_u(83, mov2(A8, RA_MAR, A7, RA_MBR));
    put_u(84, cmd(SC_MWR));
    put_u(85, cmd(SC_UFLUSH));
    put_u(86, jmp(16'd80));
    put_u(87, cmd(SC_HALT));

    // ------------------------------------------------ list structure
    for (int i = 0; i < NNODES; i++)
      mem.mem[NODE0 + i] = {TY_CELL, 2'b00, 6'd0, AM_LISTPTR, 24'(NODE0 + ($urandom % NNODES)),
                            AM_LISTPTR, 24'(NODE0 + ($urandom % NNODES))};

    repeat (3) @(posedge clk);
    rst_n = 1;
    host_write(F0, '0);

    for (int t = 0; t < TRIALS; t++) begin
      int a, cnt;
      logic [51:0] vec;
      a = NODE0 + int'($urandom % NNODES);
      cnt = (t == 0) ? 0 : int'($urandom % 53);
      if (cnt > 52) cnt = 52;
      vec = {$urandom, $urandom};
      host_write(A1, ptr(a));
      host_write(A2, {TY_SAV, 2'b00, 6'(cnt), vec});
      host_write(A4, ptr('h3000 + t));
      stall0 = n_alustall;
      run(16'd0, cyc);
      // reference walk
      for (int s = 0; s < cnt; s++) begin
        node = mem.mem[a];
        a = vec[s] ? int'(node[40:63]) : int'(node[14:37]);
      end
      host_read(RA_R1, rd);
      `CHECK(rd == mem.mem[a], $sformatf("trial %0d (%0d steps): R1 %h exp %h", t, cnt, rd, mem.mem[a]))
      `CHECK(mem.mem['h3000 + t] == rd, $sformatf("trial %0d: result written to Mp", t))
      if (t > 0) `CHECK(n_alustall - stall0 == 1, $sformatf("trial %0d: adder result one microstep late", t))
      `CHECK(!stack_overflow && !stack_underflow && dut.u_stack.empty, "stack balanced")
    end
    host_read(F0, rd);
    `CHECK(rd == 64'(TRIALS), "F[0] counted every call")
    `CHECK(flags[FL_ERROR] == 0, "no error on good arguments")
    // bad argument: a cell instead of a pointer
    host_write(A1, {TY_CELL, 60'd0});
    run(16'd0, cyc);
    `CHECK(flags[FL_ERROR] == 1, "bad argument type sets ERRORFLAG")
    `CHECK(dut.u_stack.empty, "stack balanced after error return")

    // ------------------------------------------------ PDT search
    for (int k = 0; k < 64; k++)
      host_write(RA_PDT0 + 8'(k), {TY_ATOM, 36'd0, 24'h5000 + 24'(k)});
    begin
      int k;
      k = 37;
      host_write(A5, {TY_ATOM, 36'd0, 24'h5000 + 24'(k)});
      host_write(A6, 64'(RA_PDT0));
      run(16'd48, cyc);
      host_read(F1, rd);
      `CHECK(rd == 64'(RA_PDT0 + 8'(k)), $sformatf("PDT search found index %0d", int'(rd) - int'(RA_PDT0)))
    end

    // ------------------------------------------------ writable microcode
    host_write(A7, setflag(4));
    host_write(A8, ptr(int'(UBASE) + 80));
    run(16'd64, cyc);
    `CHECK(flags[3] && flags[4], "rewritten microword executed after flush")
    `CHECK(mem.mem[int'(UBASE) + 80] == setflag(4), "microword rewritten in Mp")

    // ------------------------------------------------ mechanisms
    `CHECK(n_umiss > 0, "microprogram cache miss")
    `CHECK(n_dhit > 0, "data cache hit")
    `CHECK(n_dmiss > 0, "data cache miss")
    `CHECK(n_alustall > 0, "ALU wait")
    `CHECK(n_memstall > 0, "memory wait")
    `CHECK(n_push > 0 && n_pop > n_push / 2, "stack push and pop")
    `CHECK(n_upcload > 0, "return through UPC")
    `CHECK(n_byte > 0, "byte transfer")
    `CHECK(n_cmp_taken > 0, "byte compare jump")
    `CHECK(n_test_taken > 0, "condition jump")
    `CHECK(n_indirect > 0, "indirect transfer")
    `CHECK(n_savpop > 0, "SAV step")
    `CHECK(n_iarinc > 0, "IAR count")
    `CHECK(n_uflush > 0, "microprogram cache flush")
    `CHECK(n_mwr > 0, "memory write")
    $display("cycles=%0d umiss=%0d dhit=%0d dmiss=%0d alustall=%0d memstall=%0d push=%0d pop=%0d",
             n_cycles, n_umiss, n_dhit, n_dmiss, n_alustall, n_memstall, n_push, n_pop);
    `TB_END
  end
endmodule
