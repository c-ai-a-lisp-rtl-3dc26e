// tb_plisp_lisp: LISP primitives written as P.LISP microcode, run on the
// whole processor at its default sizes.
//
//  - CONS checks that both arguments are pointers, calls GETCELL (which takes
//    the next free cell from the free pointer F[1] and advances it with the
//    ALU), assembles the new cell from the arguments' address modes and
//    addresses with four byte transfers, writes it to memory and returns a
//    pointer to it in R1. Used to build a 12-element list, cell by cell.
//  - EQ returns TRUE or NIL in R1 from an ALU comparison.
//  - EQUAL is recursive on CARs and iterative on CDRs: it pushes a CORK
//    marker, saves both CDR pointers on the stack, recurses through a saved
//    UPC, and on the first mismatch pops everything down to the CORK. Run on
//    pairs of random nested lists, equal copies and copies with one atom
//    changed, and compared with a recursive reference here.
//  - GET searches the property list of an atom for a property. Each element
//    holds a 6-bit property number (PN); IAR is pointed at PDT entry PN and
//    either the PDT entry (GET) or the index itself (GETI, which sets IFLAG
//    first) is compared with the second argument. The search follows the
//    next-element pointers until a match or an element whose AM2 says the
//    list ends. Run on 40 random property lists, present and absent
//    properties, both flavours.
// All programs end with the usual RETURN (pop until a saved UPC).
// Interface and timing: no ports. The memory model answers after 10 cycles.
// Arguments go into the A registers through the host port while the engine
// is stopped. Each run is started at an entry point and waited for until the
// engine halts. A watchdog ends the simulation.
// Following the document: the control structure of CONS, GETCELL, EQ,
// EQUAL (with CORK and RETURN) and GET/GETI. This design's own choices: the register
// numbers, the constant words held in F[2..6] (the CELL, NIL, TRUE, PTR and
// CORK templates), F[1] as the free pointer, F[7] holding the PDT base, the
// list layout in memory, and the immediate index of GETI being the PDT entry's
// local-memory address (40h + PN), which is what IAR holds.
`include "rtl/tb_check.svh"
module tb_plisp_lisp;
  import plisp_pkg::*;
  import plisp_asm_pkg::*;
  int checks = 0, failures = 0;

  localparam logic [AW-1:0] UBASE = 24'h8000;
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

  localparam logic [7:0] A1 = RA_A0 + 1, A2 = RA_A0 + 2,
                         F1 = RA_F0 + 1, F2 = RA_F0 + 2, F3 = RA_F0 + 3, F4 = RA_F0 + 4,
                         F5 = RA_F0 + 5, F6 = RA_F0 + 6, F7 = RA_F0 + 7;
  localparam logic [15:0] RET = 90, EQ = 60, CONS = 100, GETCELL = 120, ERR = 130,
                          EQUAL = 140, EQUAL1 = 141, ENDEQ2 = 170, ENDEQ3 = 172,
                          GETI = 199, GET = 200, GET0 = 206, GET1 = 207, GET2 = 210,
                          GETIMM = 216, GETCMP = 217, ENDGET1 = 225, GETX = 226, ERRGET = 230;

  int max_depth_seen = 0;
  always @(posedge clk) if (rst_n && 32'(dut.u_stack.sp) > max_depth_seen) max_depth_seen = 32'(dut.u_stack.sp);

  task automatic put_u(input int disp, input word_t w);
    mem.mem[int'(UBASE) + disp] = w;
  endtask

  function automatic word_t ptr(input logic [1:0] am, input int a);
    return {TY_PTR, 2'b00, 6'd0, 2'b00, 24'd0, am, 24'(a)};
  endfunction

  function automatic logic [NCOND-1:0] sel(input int c);
    logic [NCOND-1:0] m;
    m = '0; m[c] = 1'b1;
    return m;
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

  task automatic run(input logic [UDW-1:0] entry);
    int cyc;
    @(negedge clk);
    start = 1; start_disp = entry;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (running && cyc < 50000) begin @(negedge clk); cyc++; end
    `CHECK(!running && !uerr, $sformatf("program at %0d halts cleanly", entry))
    if (running) `TB_END
  endtask

  // ---------------------------------------------- list structures in memory
  int next_free = 'h1000;
  // build a random list of len elements, nesting up to depth; returns (am, addr)
  function automatic int build(input int len, input int depth);
    int first, a;
    first = next_free;
    next_free += len;
    for (int i = 0; i < len; i++) begin
      logic [1:0] am1, am2;
      int car, cdr;
      a = first + i;
      if (depth > 0 && ($urandom % 3) == 0) begin
        am1 = AM_LISTPTR; car = build(1 + int'($urandom % 4), depth - 1);
      end else begin
        am1 = AM_ATOMPTR; car = 1 + int'($urandom % 6);
      end
      if (i == len - 1) begin am2 = AM_ATOMPTR; cdr = 0; end
      else begin am2 = AM_LISTPTR; cdr = a + 1; end
      mem.mem[a] = {TY_CELL, 2'b00, 6'd0, am1, 24'(car), am2, 24'(cdr)};
    end
    return first;
  endfunction

  // deep copy; if mutate is set, one atom of the copy is changed
  function automatic int copy(input int src, input bit mutate, inout bit done);
    int dst, n, a;
    n = 1;
    while (mem.mem[src + n - 1][38:39] == AM_LISTPTR) n++;
    dst = next_free;
    next_free += n;
    for (int i = 0; i < n; i++) begin
      word_t c;
      c = mem.mem[src + i];
      a = dst + i;
      if (c[12:13] == AM_LISTPTR) c[14:37] = 24'(copy(int'(c[14:37]), mutate, done));
      else if (mutate && !done && ($urandom % 2 == 0 || i == n - 1)) begin
        c[14:37] = c[14:37] + 24'd10; done = 1;
      end
      if (c[38:39] == AM_LISTPTR) c[40:63] = 24'(a + 1);
      mem.mem[a] = c;
    end
    return dst;
  endfunction

  function automatic bit ref_equal(input logic [1:0] am1, input int a1, input logic [1:0] am2, input int a2);
    word_t c1, c2;
    if (am1 == am2 && a1 == a2) return 1;
    if (am1 != AM_LISTPTR || am2 != AM_LISTPTR) return 0;
    c1 = mem.mem[a1]; c2 = mem.mem[a2];
    return ref_equal(c1[12:13], int'(c1[14:37]), c2[12:13], int'(c2[14:37])) &&
           ref_equal(c1[38:39], int'(c1[40:63]), c2[38:39], int'(c2[40:63]));
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    word_t rd, cw;
    int n_eq, n_ne, n_get, n_geti;
    // ------------------------------------------------------------ microcode
    put_u(0, call(CONS));  put_u(1, cmd(SC_HALT));
    put_u(8, call(EQUAL)); put_u(9, cmd(SC_HALT));
    // EQ: R1 <- NIL; same type and same word -> R1 <- TRUE
    put_u(60, mov(F3, RA_R1));
    put_u(61, alu(ALU_XOR, A1, A2));
    put_u(62, salu(RA_T3));
    put_u(63, t6(1'b0, RA_T3, 6'd0, 4'd3, 16'd0, 1'b0, RET));
    put_u(64, alu(ALU_EQ, A1, A2));
    put_u(65, salu(RA_T3));
    put_u(66, t6(1'b0, RA_T3, 6'd63, 4'd0, 16'd1, 1'b0, RET));
    put_u(67, mov(F4, RA_R1));
    put_u(68, jmp(RET));
    // RETURN
    put_u(90, mov(RA_STACK, RA_T1));
    put_u(91, jtype(RA_T1, TY_UPC, 1'b0, RET));
    put_u(92, mov(RA_T1, RA_UPC));
    // CONS
    put_u(100, jtype(A1, TY_PTR, 1'b0, ERR));
    put_u(101, jtype(A2, TY_PTR, 1'b0, ERR));
    put_u(102, call(GETCELL));
    put_u(103, mov(F2, RA_R2));
    put_u(104, t2(1'b0, A1, 6'd38, RA_R2, 6'd12, 6'd13, 1'b0, 16'd0));
    put_u(105, t2(1'b1, A2, 6'd38, RA_R2, 6'd38, 6'd39, 1'b0, 16'd0));
    put_u(106, t2(1'b0, A1, 6'd40, RA_R2, 6'd14, 6'd37, 1'b0, 16'd0));
    put_u(107, t2(1'b1, A2, 6'd40, RA_R2, 6'd40, 6'd63, 1'b0, 16'd0));
    put_u(108, mov2(RA_R1, RA_MAR, RA_R2, RA_MBR));
    put_u(109, cmd(SC_MWR));
    put_u(110, jmp(RET));
    put_u(120, mov(F1, RA_R1));
    put_u(121, alu(ALU_INCA, F1, RA_ZERO));
    put_u(122, salu(F1));
    put_u(123, jmp(RET));
    put_u(130, setflag(FL_ERROR));
    put_u(131, mov(F3, RA_R1));
    put_u(132, jmp(RET));
    // EQUAL
    put_u(140, mov(F6, RA_STACK));
    put_u(141, call(EQ));
    put_u(142, jtype(RA_R1, TY_TRUE, 1'b1, RET));
    put_u(143, jtype(A1, TY_PTR, 1'b0, ENDEQ2));
    put_u(144, jtype(A2, TY_PTR, 1'b0, ENDEQ2));
    put_u(145, t6(1'b0, A1, 6'd38, 4'd1, 16'(AM_LISTPTR), 1'b0, ENDEQ2));
    put_u(146, t6(1'b1, A2, 6'd38, 4'd1, 16'(AM_LISTPTR), 1'b0, ENDEQ2));
    put_u(147, mov(A1, RA_MAR));
    put_u(148, cmd(SC_MRD));
    put_u(149, mov(RA_MBR, RA_R1));
    put_u(150, mov(A2, RA_MAR));
    put_u(151, cmd(SC_MRD));
    put_u(152, mov(RA_MBR, RA_R2));
    put_u(153, mov(F5, RA_T1));
    put_u(154, t2(1'b0, RA_R1, 6'd38, RA_T1, 6'd38, 6'd63, 1'b0, 16'd0));
    put_u(155, mov(RA_T1, RA_STACK));
    put_u(156, t2(1'b0, RA_R2, 6'd38, RA_T1, 6'd38, 6'd63, 1'b0, 16'd0));
    put_u(157, mov(RA_T1, RA_STACK));
    put_u(158, mov2(F5, A1, F5, A2));
    put_u(159, t2(1'b0, RA_R1, 6'd12, A1, 6'd38, 6'd39, 1'b0, 16'd0));
    put_u(160, t2(1'b1, RA_R1, 6'd14, A1, 6'd40, 6'd63, 1'b0, 16'd0));
    put_u(161, t2(1'b0, RA_R2, 6'd12, A2, 6'd38, 6'd39, 1'b0, 16'd0));
    put_u(162, t2(1'b1, RA_R2, 6'd14, A2, 6'd40, 6'd63, 1'b0, 16'd0));
    put_u(163, call(EQUAL1));
    put_u(164, jtype(RA_R1, TY_NIL, 1'b1, ENDEQ3));
    put_u(165, mov(RA_STACK, A2));
    put_u(166, mov(RA_STACK, A1));
    put_u(167, jmp(EQUAL1));
    put_u(170, mov(F3, RA_R1));
    put_u(171, jmp(RET));
    put_u(172, mov(RA_STACK, RA_T1));
    put_u(173, jtype(RA_T1, TY_CORK, 1'b1, RET));
    put_u(174, jmp(ENDEQ3));

    n_eq = 0; n_ne = 0; n_get = 0; n_geti = 0;
    // GET / GETI: property-list search, by PDT entry or by immediate index
    put_u(10, call(GET));  put_u(11, cmd(SC_HALT));
    put_u(12, call(GETI)); put_u(13, cmd(SC_HALT));
    put_u(14, t5('0, '0, sel(FL_ERROR)[NFLAG-1:0])); put_u(15, cmd(SC_HALT));
    put_u(199, setflag(FL_I));
    put_u(200, jtype(A1, TY_PTR, 1'b1, GET0));
    put_u(201, jtype(A1, TY_PL, 1'b0, ERRGET));
    put_u(202, mov2(F3, RA_R1, A1, RA_R2));
    put_u(203, jmp(GET2));
    put_u(206, mov2(A1, RA_MAR, A1, RA_R1));
    put_u(207, cmd(SC_MRD));
    put_u(208, mov(RA_MBR, RA_R2));
    put_u(209, jtype(RA_R2, TY_PL, 1'b0, ERRGET));
    put_u(210, mov(F7, RA_T2));
    put_u(211, t2(1'b0, RA_R2, 6'd6, RA_T2, 6'd58, 6'd63, 1'b0, 16'd0));
    put_u(212, mov(RA_T2, RA_IAR));
    put_u(213, t4(1'b0, sel(FL_I), GETIMM));
    put_u(214, t1(1'b0, 8'd0, 8'd0, 5'd0, 1'b0, 1'b0, 8'd0, 8'd0, 1'b1, 1'b0, 1'b0, RA_T1));
    put_u(215, jmp(GETCMP));
    put_u(216, mov(RA_IAR, RA_T1));
    put_u(217, alu(ALU_EQ, A2, RA_T1));
    put_u(218, salu(RA_T3));
    put_u(219, t6(1'b0, RA_T3, 6'd63, 4'd0, 16'd1, 1'b1, GETX));
    put_u(220, t6(1'b0, RA_R2, 6'd38, 4'd1, 16'(AM_IMMED), 1'b1, ENDGET1));
    put_u(221, mov(F5, RA_R1));
    put_u(222, t2(1'b0, RA_R2, 6'd38, RA_R1, 6'd38, 6'd63, 1'b0, 16'd0));
    put_u(223, mov(RA_R1, RA_MAR));
    put_u(224, jmp(GET1));
    put_u(225, mov(F3, RA_R1));
    put_u(226, t5('0, '0, sel(FL_I)[NFLAG-1:0]));
    put_u(227, jmp(RET));
    put_u(230, setflag(FL_ERROR));
    put_u(231, jmp(GETX));

    repeat (3) @(posedge clk);
    rst_n = 1;
    host_write(F1, ptr(AM_LISTPTR, 'h4000));
    host_write(F2, {TY_CELL, 60'd0});
    host_write(F3, {TY_NIL, 60'd0});
    host_write(F4, {TY_TRUE, 60'd0});
    host_write(F5, {TY_PTR, 60'd0});
    host_write(F6, {TY_CORK, 60'd0});
    host_write(F7, 64'(RA_PDT0));

    // ----------------------------------------------------- CONS a list
    host_write(A2, ptr(AM_ATOMPTR, 0));   // NIL
    for (int i = 0; i < 12; i++) begin
      host_write(A1, ptr(AM_ATOMPTR, 100 + i));
      run(16'd0);
      host_read(RA_R1, rd);
      `CHECK(rd == ptr(AM_LISTPTR, 'h4000 + i), $sformatf("CONS %0d returns the new cell", i))
      cw = mem.mem['h4000 + i];
      `CHECK(cw[0:3] == TY_CELL && cw[12:13] == AM_ATOMPTR && cw[14:37] == 24'(100 + i) &&
             cw[38:39] == (i == 0 ? AM_ATOMPTR : AM_LISTPTR) &&
             cw[40:63] == (i == 0 ? 24'd0 : 24'('h4000 + i - 1)),
             $sformatf("CONS %0d cell contents %h", i, cw))
      host_write(A2, rd);
    end
    host_write(A1, {TY_ATOM, 60'd0});
    run(16'd0);
    `CHECK(flags[FL_ERROR], "CONS of a non-pointer sets ERRORFLAG")

    // ----------------------------------------------------- EQUAL
    for (int t = 0; t < 30; t++) begin
      int x, y;
      bit done, exp;
      done = 0;
      x = build(2 + int'($urandom % 5), 3);
      y = (t % 5 == 4) ? build(2 + int'($urandom % 5), 3) : copy(x, t % 2 == 1, done);
      exp = ref_equal(AM_LISTPTR, x, AM_LISTPTR, y);
      host_write(A1, ptr(AM_LISTPTR, x));
      host_write(A2, ptr(AM_LISTPTR, y));
      run(16'd8);
      host_read(RA_R1, rd);
      `CHECK(rd[0:3] == (exp ? TY_TRUE : TY_NIL), $sformatf("EQUAL trial %0d: got type %0d exp %0d", t, rd[0:3], exp))
      `CHECK(dut.u_stack.empty && !stack_overflow, $sformatf("EQUAL trial %0d leaves the stack empty", t))
      if (exp) n_eq++; else n_ne++;
    end
    `CHECK(n_eq > 0 && n_ne > 0, "both outcomes of EQUAL seen")
    `CHECK(max_depth_seen > 6, "recursion went several levels deep")
    $display("EQUAL: %0d equal, %0d unequal, deepest stack %0d", n_eq, n_ne, max_depth_seen);

    // ----------------------------------------------------- GET and GETI
    run(16'd14);   // clear ERRORFLAG left by the CONS error case
    `CHECK(!flags[FL_ERROR], "ERRORFLAG cleared")
    for (int k = 0; k < 64; k++) host_write(RA_PDT0 + 8'(k), {TY_ATOM, 36'd0, 24'h6000 + 24'(k)});
    for (int t = 0; t < 40; t++) begin
      int len, base, want, hit, pn[8];
      logic [23:0] vl[8];
      bit imm;
      len = 1 + int'($urandom % 8);
      base = next_free;
      next_free += len;
      for (int i = 0; i < len; i++) begin
        bit dup;
        do begin
          pn[i] = int'($urandom % 64);
          dup = 0;
          for (int j = 0; j < i; j++) if (pn[j] == pn[i]) dup = 1;
        end while (dup);
        vl[i] = 24'($urandom);
        mem.mem[base + i] = {TY_PL, 2'b00, 6'(pn[i]), AM_ATOMPTR, vl[i],
                             (i == len - 1) ? AM_IMMED : AM_LISTPTR, 24'(base + i + 1)};
      end
      want = (t % 4 == 3) ? 64 + int'($urandom % 64) : pn[$urandom % len];   // >= 64: absent
      if (want >= 64) begin
        bit dup;
        do begin
          want = int'($urandom % 64);
          dup = 0;
          for (int j = 0; j < len; j++) if (pn[j] == want) dup = 1;
        end while (dup);
        hit = -1;
      end else
        for (int j = 0; j < len; j++) if (pn[j] == want) hit = j;
      imm = t[0];
      host_write(A1, ptr(AM_LISTPTR, base));
      host_write(A2, imm ? 64'(RA_PDT0 + 8'(want)) : {TY_ATOM, 36'd0, 24'h6000 + 24'(want)});
      run(imm ? 16'd12 : 16'd10);
      host_read(RA_R1, rd);
      if (hit < 0)
        `CHECK(rd[0:3] == TY_NIL, $sformatf("GET trial %0d: absent property gives NIL", t))
      else begin
        `CHECK(rd == ptr(AM_LISTPTR, base + hit), $sformatf("GET trial %0d: R1 %h points to element %0d", t, rd, hit))
        host_read(RA_R2, cw);
        `CHECK(cw[14:37] == vl[hit], $sformatf("GET trial %0d: value in R2", t))
      end
      `CHECK(!flags[FL_I] && !flags[FL_ERROR] && dut.u_stack.empty, $sformatf("GET trial %0d: IFLAG cleared, no error, stack empty", t))
      if (imm) n_geti++; else n_get++;
    end
    host_write(A1, {TY_INT, 60'd5});
    run(16'd10);
    `CHECK(flags[FL_ERROR], "GET on a non-pointer sets ERRORFLAG")
    `CHECK(n_get > 0 && n_geti > 0, "both GET flavours ran")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
