// tb_byte_transfer: random byte transfers against a bit-by-bit reference:
// destination bit k in IBP2..FBP2 takes source bit IBP1+(k-IBP2) (zero past
// the end of the source word); all other destination bits are unchanged.
// Also checks full-word transfers and single-bit bytes at the word ends.
`include "rtl/tb_check.svh"
module tb_byte_transfer;
  int checks = 0, failures = 0;
  logic [0:63] src, dst_in, dst_out, mask, exp;
  logic [5:0]  ibp1, ibp2, fbp2;

  byte_transfer dut (.*);

  task automatic run_one();
    #1;
    for (int k = 0; k < 64; k++) begin
      int s;
      s = int'(ibp1) + k - int'(ibp2);
      if (k >= int'(ibp2) && k <= int'(fbp2)) exp[k] = (s < 64) ? src[s] : 1'b0;
      else exp[k] = dst_in[k];
    end
    `CHECK(dst_out == exp, $sformatf("ibp1=%0d ibp2=%0d fbp2=%0d got %h exp %h",
                                      ibp1, ibp2, fbp2, dst_out, exp))
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    // full word
    src = 64'h0123_4567_89AB_CDEF; dst_in = '1; ibp1 = 0; ibp2 = 0; fbp2 = 63;
    run_one();
    `CHECK(dst_out == 64'h0123_4567_89AB_CDEF, "full-word transfer")
    // TYPE field <0:3> of a word into bits <60:63> of zero
    dst_in = '0; ibp1 = 0; ibp2 = 60; fbp2 = 63;
    run_one();
    `CHECK(dst_out == 64'h0, "type nibble 0 moved right")
    src = 64'hA000_0000_0000_0000; run_one();
    `CHECK(dst_out == 64'hA, "type nibble A moved right")
    // single bits at the ends
    src = 64'h1; dst_in = '0; ibp1 = 63; ibp2 = 0; fbp2 = 0; run_one();
    `CHECK(dst_out == 64'h8000_0000_0000_0000, "bit 63 to bit 0")
    for (int n = 0; n < 3000; n++) begin
      src = {$urandom, $urandom}; dst_in = {$urandom, $urandom};
      ibp1 = 6'($urandom); ibp2 = 6'($urandom); fbp2 = 6'($urandom);
      if (fbp2 < ibp2) fbp2 = ibp2;
      run_one();
    end
    `TB_END
  end
endmodule
