// plisp_asm_pkg: a small microword assembler for the testbenches. Each
// function packs the fields of one microword format at the bit positions of
// the processor's microword layouts (bit 0 leftmost), with TYPE set to
// 'microcommand'. Helpers build common idioms: a register move, a call
// (push UPC+1 and jump), an unconditional jump and a halt.
package plisp_asm_pkg;
  import plisp_pkg::*;

  function automatic word_t base(input logic [2:0] op);
    word_t w;
    w = '0; w[0:3] = TY_UC; w[4:6] = op;
    return w;
  endfunction

  function automatic word_t rbs(input word_t w, input logic rtb1, input logic rtb2, input logic ralu);
    w[59] = rtb1; w[60] = rtb2; w[61] = ralu;
    return w;
  endfunction

  // type 1: ALU launch, full-word transfer, indirect transfer
  function automatic word_t t1(input logic alue, input logic [7:0] a, input logic [7:0] b,
                               input logic [4:0] fn, input logic tfe, input logic tbs,
                               input logic [7:0] r1, input logic [7:0] r2, input logic itfe,
                               input logic itft, input logic itbs, input logic [7:0] ri);
    word_t w;
    w = base(OP_ALU_XFER);
    w[7] = alue; w[8:15] = a; w[16:23] = b; w[24:28] = fn;
    w[29] = tfe; w[30] = tbs; w[31:38] = r1; w[39:46] = r2;
    w[47] = itfe; w[48] = itft; w[49] = itbs; w[50:57] = ri;
    return w;
  endfunction

  // type 2: byte transfer R2<IBP2:FBP2> <- R1<IBP1:...>, optional jump
  function automatic word_t t2(input logic tbs, input logic [7:0] r1, input logic [5:0] ibp1,
                               input logic [7:0] r2, input logic [5:0] ibp2, input logic [5:0] fbp2,
                               input logic je, input logic [15:0] nxt);
    word_t w;
    w = base(OP_BYTE_JUMP);
    w[7] = tbs; w[8:15] = r1; w[16:21] = ibp1; w[22:29] = r2; w[30:35] = ibp2;
    w[36:41] = fbp2; w[42] = je; w[43:58] = nxt;
    return w;
  endfunction

  // type 3: store ALU, two parallel full-word transfers
  function automatic word_t t3(input logic salue, input logic tbs, input logic [7:0] r1,
                               input logic b1e, input logic [7:0] b1s, input logic [7:0] b1d,
                               input logic b2e, input logic [7:0] b2s, input logic [7:0] b2d);
    word_t w;
    w = base(OP_TWO_XFER);
    w[7] = salue; w[8] = tbs; w[9:16] = r1;
    w[17] = b1e; w[18:25] = b1s; w[26:33] = b1d;
    w[34] = b2e; w[35:42] = b2s; w[43:50] = b2d;
    return w;
  endfunction

  // type 4: jump on conditions; mask bit i selects condition i
  function automatic word_t t4(input logic sense, input logic [NCOND-1:0] mask, input logic [15:0] ja);
    word_t w;
    w = base(OP_TEST_JUMP);
    w[7] = sense;
    for (int i = 0; i < int'(NCOND); i++) w[8+i] = mask[i];
    w[43:58] = ja;
    return w;
  endfunction

  // type 5: commands (cmd[i] = SCF<i>), flag set and reset masks
  function automatic word_t t5(input logic [11:0] cmd, input logic [NFLAG-1:0] fs,
                               input logic [NFLAG-1:0] fr);
    word_t w;
    w = base(OP_SET_COND);
    for (int i = 0; i < 12; i++) w[7+i] = cmd[i];
    for (int i = 0; i < int'(NFLAG); i++) begin w[19+i] = fs[i]; w[39+i] = fr[i]; end
    return w;
  endfunction

  // type 6: compare BL+1 bits of R1 from IBP1 with the low bits of pat
  function automatic word_t t6(input logic bs, input logic [7:0] r1, input logic [5:0] ibp1,
                               input logic [3:0] bl, input logic [15:0] pat, input logic jc,
                               input logic [15:0] ja);
    word_t w;
    w = base(OP_CMP_JUMP);
    w[7] = bs; w[8:15] = r1; w[16:21] = ibp1; w[22:25] = bl; w[26:41] = pat;
    w[42] = jc; w[43:58] = ja;
    return w;
  endfunction

  function automatic word_t mov(input logic [7:0] s, input logic [7:0] d);
    return t1(1'b0, 8'd0, 8'd0, 5'd0, 1'b1, 1'b0, s, d, 1'b0, 1'b0, 1'b0, 8'd0);
  endfunction
  function automatic word_t mov2(input logic [7:0] s1, input logic [7:0] d1,
                                 input logic [7:0] s2, input logic [7:0] d2);
    return t3(1'b0, 1'b0, 8'd0, 1'b1, s1, d1, 1'b1, s2, d2);
  endfunction
  function automatic word_t alu(input logic [4:0] fn, input logic [7:0] a, input logic [7:0] b);
    return t1(1'b1, a, b, fn, 1'b0, 1'b0, 8'd0, 8'd0, 1'b0, 1'b0, 1'b0, 8'd0);
  endfunction
  function automatic word_t salu(input logic [7:0] d);
    return rbs(t3(1'b1, 1'b0, d, 1'b0, 8'd0, 8'd0, 1'b0, 8'd0, 8'd0), 1'b0, 1'b0, 1'b1);
  endfunction
  function automatic word_t call(input logic [15:0] target);
    return t2(1'b0, RA_UPC, 6'd0, RA_STACK, 6'd0, 6'd63, 1'b1, target);
  endfunction
  function automatic word_t jmp(input logic [15:0] target);
    return t4(1'b1, '0, target);
  endfunction
  function automatic word_t cmd(input int c);
    logic [11:0] m;
    m = '0; m[c] = 1'b1;
    return t5(m, '0, '0);
  endfunction
  function automatic word_t setflag(input int f);
    logic [NFLAG-1:0] m;
    m = '0; m[f] = 1'b1;
    return t5('0, m, '0);
  endfunction
  function automatic word_t jtype(input logic [7:0] r, input logic [3:0] ty, input logic eq,
                                  input logic [15:0] ja);
    return t6(1'b0, r, 6'd0, 4'd3, {12'd0, ty}, eq, ja);
  endfunction
endpackage
