// bytesub: AES S-box (SubBytes on one byte) on a dual-rail byte.
//
// The GF(2^8) inverse is computed in the composite field GF((2^4)^2):
//   a = ah*x + al                                      (fonc_map)
//   d = (ah^2*{e} + ah*al + al^2)^-1                   (in GF(2^4))
//   a^-1 = (ah*d)*x + (ah+al)*d                         (fonc_inv_map)
// followed by the affine transform (affine_dr). The GF(2^4) part runs on the
// 1-of-16 code: squaring, multiplication by {e} and inversion are pure
// wiring, additions and products are rendezvous/OR arrays, and only one wire
// of sixteen is active per element. Zero maps to zero as AES requires.
// Purely combinational; spacer in gives spacer out.
//
// The composite-field algorithm, the 1-of-16 code and the block list follow the
// reference S-box; the field polynomial and map matrices are this design's.
module bytesub
  import aes_async_pkg::*;
(
  input  dr_byte_t a,
  output dr_byte_t y
);

  dr_nib_t  ah_dr, al_dr, ih_dr, il_dr;
  mr16_t    ah, al, ah2, ah2e, ahal, al2, s1, s2, d, ihm, sum_hl, ilm;
  dr_byte_t inv;

  fonc_map        u_map  (.a(a), .ah(ah_dr), .al(al_dr));
  conv_dr_to_mr16 u_ch   (.d(ah_dr), .m(ah));
  conv_dr_to_mr16 u_cl   (.d(al_dr), .m(al));

  square_mr16     u_sqh  (.a(ah), .y(ah2));
  mult_e_mr16     u_me   (.a(ah2), .y(ah2e));
  mult_mr16       u_mhl  (.a(ah), .b(al), .y(ahal));
  square_mr16     u_sql  (.a(al), .y(al2));
  xor_mr16        u_x1   (.a(ah2e), .b(ahal), .y(s1));
  xor_mr16        u_x2   (.a(s1), .b(al2), .y(s2));
  inverse_mr16    u_inv  (.a(s2), .y(d));
  mult_mr16       u_mh   (.a(ah), .b(d), .y(ihm));
  xor_mr16        u_x3   (.a(ah), .b(al), .y(sum_hl));
  mult_mr16       u_ml   (.a(sum_hl), .b(d), .y(ilm));

  conv_mr16_to_dr u_oh   (.m(ihm), .d(ih_dr));
  conv_mr16_to_dr u_ol   (.m(ilm), .d(il_dr));
  fonc_inv_map    u_imap (.ah(ih_dr), .al(il_dr), .a(inv));
  affine_dr       u_aff  (.a(inv), .b(y));

endmodule
