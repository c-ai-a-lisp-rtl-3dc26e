// byte_mask_gen: output-register enable mask of a byte transfer.
//
// Two 1-of-64 decoders mark the leftmost bit J (R_j) and the rightmost bit K
// (L_k) of the destination byte. Two ripple chains run in opposite
// directions: the one from the left turns on every bit from J rightwards, the
// one from the right every bit from K leftwards, and a bit of the mask is set
// where both are on. The mask is therefore bits J..K inclusive, a single bit
// when J = K. This is the two-way ripple network of the byte-transfer
// description; a J to the right of K gives an empty mask, which is this
// design's choice. Purely combinational; bit 0 is the leftmost bit.
module byte_mask_gen (
  input  logic [5:0]  first_bit,  // J: leftmost bit of the byte
  input  logic [5:0]  last_bit,   // K: rightmost bit of the byte
  output logic [0:63] mask
);
  logic [0:63] r_dec, l_dec, from_left, from_right;
  logic        acc;

  always_comb begin
    for (int i = 0; i < 64; i++) begin
      r_dec[i] = (first_bit == 6'(i));
      l_dec[i] = (last_bit  == 6'(i));
    end
    // ripple from the left: on from J to the right end
    acc = 1'b0;
    for (int i = 0; i < 64; i++) begin
      acc = acc | r_dec[i];
      from_left[i] = acc;
    end
    // ripple from the right: on from K to the left end
    acc = 1'b0;
    for (int i = 63; i >= 0; i--) begin
      acc = acc | l_dec[i];
      from_right[i] = acc;
    end
    mask = from_left & from_right;
  end
endmodule
