// micro_decoder: microword decoder D(1).
//
// Takes a 64-bit microword and splits it into the control fields of its
// format, chosen by OP<0:2> = MW<4:6>. The field positions are those of the
// six microword formats of the processor description (ALU + transfer +
// indirect transfer; byte transfer + jump; store ALU + two transfers; test
// conditions + jump; set conditions; compare byte + jump), and the
// release-bus bits RBS<0:2> = MW<59:61> are common to all. Every transfer is
// handed on as an xfer_t for the bus it uses, a full-word transfer being a
// byte transfer of bits 0..63. A microword whose TYPE<0:3> is not
// 'microcommand', or whose OP is 0 or 7, decodes as invalid.
// Choices of this design where the description is open: FBP2 sits at
// MW<36:41> (right after IBP2); ITFT=0 reads M(LOCAL)[IAR] into Ri and
// ITFT=1 writes Ri there; the byte length BL of a compare means BL+1 bits;
// a store-ALU takes its bus away from that bus's transfer field; the 36-bit
// test field is a sense bit and 35 condition-select bits; the 52-bit
// set-conditions field is 12 command bits, 20 flag-set and 20 flag-reset
// bits. Purely combinational.
module micro_decoder
  import plisp_pkg::*;
(
  input  word_t mw,
  output uop_t  u
);
  function automatic xfer_t full(input logic en, input logic [7:0] s, input logic [7:0] d);
    xfer_t x;
    x = '0;
    x.en = en; x.src = s; x.dst = d; x.ibp1 = 6'd0; x.ibp2 = 6'd0; x.fbp2 = 6'd63;
    return x;
  endfunction

  always_comb begin
    xfer_t x;
    x = '0;
    u = '0;
    u.op    = mw[4:6];
    u.valid = (mw[0:3] == TY_UC) && (mw[4:6] inside {[3'd1:3'd6]});
    u.rtb1  = mw[59];
    u.rtb2  = mw[60];
    u.ralu  = mw[61];
    u.jkind = JK_NONE;
    case (mw[4:6])
      OP_ALU_XFER: begin
        u.alu_go = mw[7];
        u.alu_a  = mw[8:15];
        u.alu_b  = mw[16:23];
        u.alu_fn = mw[24:28];
        if (mw[29]) begin
          x = full(1'b1, mw[31:38], mw[39:46]);
          if (mw[30]) u.bus2 = x; else u.bus1 = x;
        end
        if (mw[47]) begin
          x = full(1'b1, mw[50:57], mw[50:57]);
          x.src_ind = !mw[48];
          x.dst_ind =  mw[48];
          if (mw[49]) u.bus2 = x; else u.bus1 = x;
        end
      end
      OP_BYTE_JUMP: begin
        x = '0;
        x.en = 1'b1; x.src = mw[8:15]; x.ibp1 = mw[16:21];
        x.dst = mw[22:29]; x.ibp2 = mw[30:35]; x.fbp2 = mw[36:41];
        if (mw[7]) u.bus2 = x; else u.bus1 = x;
        u.jkind = mw[42] ? JK_ALWAYS : JK_NONE;
        u.jaddr = mw[43:58];
      end
      OP_TWO_XFER: begin
        u.bus1 = full(mw[17], mw[18:25], mw[26:33]);
        u.bus2 = full(mw[34], mw[35:42], mw[43:50]);
        if (mw[7]) begin
          u.alu_store = 1'b1;
          x = full(1'b1, 8'h00, mw[9:16]);
          x.src_alu = 1'b1;
          if (mw[8]) u.bus2 = x; else u.bus1 = x;
        end
      end
      OP_TEST_JUMP: begin
        u.jkind  = JK_TEST;
        u.tsense = mw[7];
        for (int i = 0; i < int'(NCOND); i++) u.tmask[i] = mw[8+i];
        u.jaddr  = mw[43:58];
      end
      OP_SET_COND: begin
        for (int i = 0; i < 12; i++) u.cmd[i] = mw[7+i];
        for (int i = 0; i < int'(NFLAG); i++) begin
          u.fset[i] = mw[19+i];
          u.frst[i] = mw[39+i];
        end
      end
      OP_CMP_JUMP: begin
        u.jkind   = JK_CMP;
        u.cmp_bus = mw[7];
        u.cmp_len = 5'(mw[22:25]) + 5'd1;
        u.cmp_pat = mw[26:41];
        u.cmp_jeq = mw[42];
        u.jaddr   = mw[43:58];
        x = '0;
        x.src = mw[8:15]; x.ibp1 = mw[16:21];
        x.ibp2 = 6'(7'd64 - 7'(u.cmp_len)); x.fbp2 = 6'd63;
        if (mw[7]) u.bus2 = x; else u.bus1 = x;
      end
      default: ;
    endcase
  end
endmodule
