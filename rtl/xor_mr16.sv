// xor_mr16: GF(2^4) addition (bitwise XOR) of two 1-of-16 coded elements.
// Output wire z is the OR of the sixteen rendezvous a[x] & b[x^z]; for valid
// inputs exactly one rendezvous fires, for a spacer on either input none
// does. Purely combinational.
//
// Rendezvous/OR arrays on the 1-of-16 code follow the reference S-box.
module xor_mr16
  import aes_async_pkg::*;
(
  input  mr16_t a,
  input  mr16_t b,
  output mr16_t y
);

  always_comb begin
    y = '0;
    for (int z = 0; z < 16; z++)
      for (int x = 0; x < 16; x++)
        y[z] |= a[x] & b[x ^ z];
  end

endmodule
