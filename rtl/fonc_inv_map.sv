// fonc_inv_map: inverse of fonc_map, from the composite field GF((2^4)^2)
// (a = ah*x + al) back to the AES polynomial basis of GF(2^8). A linear map
// built of dual-rail XOR gates:
//   with A = al1^ah3 and B = ah0^ah1
//   a0 = al0^ah0      a1 = B^ah3        a2 = A^B          a3 = B^al1^ah2
//   a4 = A^B^al3      a5 = B^al2        a6 = A^al2^al3^ah0
//   a7 = B^al2^ah3
// Purely combinational.
//
// The use of the map follows the reference S-box; the matrix is this design's
// choice, matching fonc_map.
module fonc_inv_map
  import aes_async_pkg::*;
(
  input  dr_nib_t  ah,
  input  dr_nib_t  al,
  output dr_byte_t a
);

  dr_t ta, tb, tab, t3, t6a, t6b, t7;

  dr_xor u_ta  (.a(al[1]), .b(ah[3]), .c(ta));
  dr_xor u_tb  (.a(ah[0]), .b(ah[1]), .c(tb));
  dr_xor u_tab (.a(ta),    .b(tb),    .c(tab));

  dr_xor u_a0  (.a(al[0]), .b(ah[0]), .c(a[0]));
  dr_xor u_a1  (.a(tb),    .b(ah[3]), .c(a[1]));
  assign a[2] = tab;
  dr_xor u_a3a (.a(tb),    .b(al[1]), .c(t3));
  dr_xor u_a3b (.a(t3),    .b(ah[2]), .c(a[3]));
  dr_xor u_a4  (.a(tab),   .b(al[3]), .c(a[4]));
  dr_xor u_a5  (.a(tb),    .b(al[2]), .c(a[5]));
  dr_xor u_a6a (.a(ta),    .b(al[2]), .c(t6a));
  dr_xor u_a6b (.a(al[3]), .b(ah[0]), .c(t6b));
  dr_xor u_a6c (.a(t6a),   .b(t6b),   .c(a[6]));
  dr_xor u_a7a (.a(tb),    .b(al[2]), .c(t7));
  dr_xor u_a7b (.a(t7),    .b(ah[3]), .c(a[7]));

endmodule
