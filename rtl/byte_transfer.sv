// byte_transfer: byte-transfer switch pair of one bus (S(1), S(2), K(1)).
//
// Moves a string of contiguous bits from any place in a source word to any
// place in a destination word without changing the order of the bits. It is
// built as the "Method 1" matrix: a one-hot input diagonal DA selects the
// first source bit i and drives the transfer lines t[m] = src[i+m]; a one-hot
// output diagonal DB selects the first destination bit j and drives
// out[j+m] = t[m]. An enable mask from byte_mask_gen (bits IBP2..FBP2)
// decides which destination bits take the new value; the rest keep the
// destination's old value (dst_in). A full-word transfer is IBP1=0, IBP2=0,
// FBP2=63. Bit numbering: bit 0 is the leftmost bit. Combinational.
module byte_transfer (
  input  logic [0:63] src,       // word on the bus
  input  logic [0:63] dst_in,    // current contents of the destination
  input  logic [5:0]  ibp1,      // initial bit of the input byte
  input  logic [5:0]  ibp2,      // initial bit of the output byte
  input  logic [5:0]  fbp2,      // final bit of the output byte
  output logic [0:63] dst_out,
  output logic [0:63] mask
);
  logic [0:63] da, db, t, placed;

  byte_mask_gen u_mask (.first_bit(ibp2), .last_bit(fbp2), .mask(mask));

  always_comb begin
    for (int i = 0; i < 64; i++) begin
      da[i] = (ibp1 == 6'(i));
      db[i] = (ibp2 == 6'(i));
    end
    // input matrix S(1): diagonal i drives t[m] from src[i+m]
    t = '0;
    for (int m = 0; m < 64; m++)
      for (int i = 0; i + m < 64; i++)
        t[m] = t[m] | (da[i] & src[i+m]);
    // output matrix S(2): diagonal j drives out[j+m] from t[m]
    placed = '0;
    for (int j = 0; j < 64; j++)
      for (int m = 0; j + m < 64; m++)
        placed[j+m] = placed[j+m] | (db[j] & t[m]);
    dst_out = (dst_in & ~mask) | (placed & mask);
  end
endmodule
