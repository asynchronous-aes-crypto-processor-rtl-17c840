// fonc_map: isomorphism from GF(2^8) (polynomial basis, x^8+x^4+x^3+x+1) to
// the composite field GF((2^4)^2) used by the S-box, a = ah*x + al, with
// GF(2^4) over x^4+x+1 and the extension polynomial x^2+x+{e}. It is a
// linear map, so it is a network of dual-rail XOR gates:
//   al = {a2^a4, a1^a7, a1^a2, a4^a6^a0^a5}
//   ah = {a5^a7, a5^a7^a2^a3, a1^a7^a4^a6, a4^a6^a5}    (bit 3 .. bit 0)
// The matrix is this design's choice (the standard one for this composite
// field). Purely combinational.
module fonc_map
  import aes_async_pkg::*;
(
  input  dr_byte_t a,
  output dr_nib_t  ah,
  output dr_nib_t  al
);

  dr_t ta, tb, tc, t0, t1;

  dr_xor u_ta (.a(a[1]), .b(a[7]), .c(ta));
  dr_xor u_tb (.a(a[5]), .b(a[7]), .c(tb));
  dr_xor u_tc (.a(a[4]), .b(a[6]), .c(tc));

  dr_xor u_l0a (.a(tc),   .b(a[0]), .c(t0));
  dr_xor u_l0b (.a(t0),   .b(a[5]), .c(al[0]));
  dr_xor u_l1  (.a(a[1]), .b(a[2]), .c(al[1]));
  assign al[2] = ta;
  dr_xor u_l3  (.a(a[2]), .b(a[4]), .c(al[3]));

  dr_xor u_h0  (.a(tc),   .b(a[5]), .c(ah[0]));
  dr_xor u_h1  (.a(ta),   .b(tc),   .c(ah[1]));
  dr_xor u_h2a (.a(tb),   .b(a[2]), .c(t1));
  dr_xor u_h2b (.a(t1),   .b(a[3]), .c(ah[2]));
  assign ah[3] = tb;

endmodule
