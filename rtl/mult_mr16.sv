// mult_mr16: GF(2^4) multiplication (polynomial x^4+x+1) of two 1-of-16
// coded elements. Each of the 256 operand pairs (x,y) has one rendezvous
// a[x] & b[y], ORed into output wire x*y. For valid inputs exactly one
// rendezvous fires. Purely combinational.
//
// Rendezvous/OR arrays on the 1-of-16 code follow the reference S-box; the field
// polynomial is this design's choice.
module mult_mr16
  import aes_async_pkg::*;
(
  input  mr16_t a,
  input  mr16_t b,
  output mr16_t y
);

  always_comb begin
    y = '0;
    for (int x = 0; x < 16; x++)
      for (int z = 0; z < 16; z++)
        y[gf16_mul(4'(x), 4'(z))] |= a[x] & b[z];
  end

endmodule
