// tb_byte_mask_gen: exhaustive test of the byte-transfer mask: for every
// first/last bit pair the mask must be exactly the bits first..last (empty
// when first > last). Combinational, so no clock; a watchdog still guards it.
`include "rtl/tb_check.svh"
module tb_byte_mask_gen;
  int checks = 0, failures = 0;
  logic [5:0] j, k;
  logic [0:63] mask, exp;

  byte_mask_gen dut (.first_bit(j), .last_bit(k), .mask(mask));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    `TB_END
  end

  initial begin
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        j = 6'(a); k = 6'(b);
        #1;
        for (int i = 0; i < 64; i++) exp[i] = (i >= a) && (i <= b);
        `CHECK(mask == exp, $sformatf("mask j=%0d k=%0d got %h", a, b, mask))
      end
    `TB_END
  end
endmodule
