// xor8_sb: 8-bit dual-rail XOR (eight dr_xor gates), the Xor8_SB block of the
// MixColumns data path. Purely combinational; spacer in gives spacer out.
//
// Follows the reference MixColumns structure.
module xor8_sb
  import aes_async_pkg::*;
(
  input  dr_byte_t a,
  input  dr_byte_t b,
  output dr_byte_t c
);

  for (genvar i = 0; i < 8; i++) begin : g_bit
    dr_xor u_x (.a(a[i]), .b(b[i]), .c(c[i]));
  end

endmodule
