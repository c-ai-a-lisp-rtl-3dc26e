// tb_micro_decoder: assembles microwords of all six formats with random
// field values and checks that the decoder hands each field to the right
// control output (bus, ALU, jump, compare, commands, flags, release bits),
// and that words without the microcommand TYPE or with OP 0/7 are invalid.
`include "rtl/tb_check.svh"
module tb_micro_decoder;
  import plisp_pkg::*;
  import plisp_asm_pkg::*;
  int checks = 0, failures = 0;
  word_t mw;
  uop_t  u;

  micro_decoder dut (.mw, .u);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [7:0] a, b, c, d;
      logic [5:0] i1, i2, f2;
      logic [4:0] fn;
      logic [15:0] ja, pat;
      logic s, e1, e2, e3;
      logic [NCOND-1:0] tm;
      logic [11:0] cm;
      logic [NFLAG-1:0] fs, fr;
      xfer_t x;
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      i1 = 6'($urandom); i2 = 6'($urandom); f2 = 6'($urandom); fn = 5'($urandom);
      ja = 16'($urandom); pat = 16'($urandom); s = 1'($urandom);
      e1 = 1'($urandom); e2 = 1'($urandom); e3 = 1'($urandom);
      tm = {3'($urandom), $urandom}; cm = 12'($urandom);
      fs = 20'($urandom); fr = 20'($urandom);

      // type 1: ALU + transfer on bus s + indirect transfer on the other bus
      mw = rbs(t1(e1, a, b, fn, 1'b1, s, c, d, 1'b1, e2, !s, b), e1, e2, e3);
      #1;
      x = s ? u.bus2 : u.bus1;
      `CHECK(u.valid && u.op == OP_ALU_XFER, "t1 valid")
      `CHECK(u.alu_go == e1 && u.alu_a == a && u.alu_b == b && u.alu_fn == fn, "t1 alu fields")
      `CHECK(x.en && x.src == c && x.dst == d && x.ibp1 == 0 && x.ibp2 == 0 && x.fbp2 == 63, "t1 transfer")
      x = s ? u.bus1 : u.bus2;
      `CHECK(x.en && x.src == b && x.src_ind == !e2 && x.dst_ind == e2, "t1 indirect")
      `CHECK(u.rtb1 == e1 && u.rtb2 == e2 && u.ralu == e3 && u.jkind == JK_NONE, "t1 rbs")

      // type 2: byte transfer with jump
      mw = t2(s, a, i1, b, i2, f2, e1, ja);
      #1;
      x = s ? u.bus2 : u.bus1;
      `CHECK(u.valid && x.en && x.src == a && x.ibp1 == i1 && x.dst == b && x.ibp2 == i2 && x.fbp2 == f2, "t2 byte fields")
      `CHECK(u.jkind == (e1 ? JK_ALWAYS : JK_NONE) && u.jaddr == ja, "t2 jump")
      x = s ? u.bus1 : u.bus2;
      `CHECK(!x.en, "t2 other bus idle")

      // type 3: two transfers, store-ALU on bus s replaces that bus's transfer
      mw = t3(e3, s, d, e1, a, b, e2, c, d);
      #1;
      if (e3) begin
        x = s ? u.bus2 : u.bus1;
        `CHECK(u.alu_store && x.en && x.src_alu && x.dst == d, "t3 store alu")
        x = s ? u.bus1 : u.bus2;
        `CHECK(x.en == (s ? e1 : e2), "t3 other bus")
      end else begin
        `CHECK(!u.alu_store && u.bus1.en == e1 && u.bus1.src == a && u.bus1.dst == b, "t3 bus1")
        `CHECK(u.bus2.en == e2 && u.bus2.src == c && u.bus2.dst == d, "t3 bus2")
      end

      // type 4: test and jump
      mw = t4(s, tm, ja);
      #1;
      `CHECK(u.valid && u.jkind == JK_TEST && u.tsense == s && u.tmask == tm && u.jaddr == ja, "t4 fields")

      // type 5: set conditions
      mw = t5(cm, fs, fr);
      #1;
      `CHECK(u.valid && u.cmd == cm && u.fset == fs && u.frst == fr && !u.bus1.en && !u.bus2.en, "t5 fields")

      // type 6: compare byte and jump
      mw = t6(s, a, i1, 4'(fn), pat, e1, ja);
      #1;
      x = s ? u.bus2 : u.bus1;
      `CHECK(u.valid && u.jkind == JK_CMP && u.cmp_bus == s && u.cmp_len == 5'(4'(fn)) + 1 &&
             u.cmp_pat == pat && u.cmp_jeq == e1 && u.jaddr == ja, "t6 fields")
      `CHECK(!x.en && x.src == a && x.ibp1 == i1 && x.fbp2 == 63 && 32'(x.ibp2) == 64 - 32'(u.cmp_len), "t6 byte path")

      // invalid words
      mw = t5(cm, fs, fr); mw[0:3] = TY_CELL;
      #1;
      `CHECK(!u.valid, "non-microcommand type rejected")
      mw = t5(cm, fs, fr); mw[4:6] = (n % 2) ? 3'd7 : 3'd0;
      #1;
      `CHECK(!u.valid, "undefined op rejected")
    end
    `TB_END
  end
endmodule
