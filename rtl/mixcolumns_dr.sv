// mixcolumns_dr: MixColumns of one state column (a,b,c,d = rows 0..3) on
// dual-rail bytes, factored as
//   M0 = 02(a^b) ^ b ^ c ^ d      M1 = 02(b^c) ^ c ^ a ^ d
//   M2 = 02(c^d) ^ a ^ b ^ d      M3 = 02(d^a) ^ a ^ b ^ c
// with Xor8_SB blocks (xor8_sb) and four Xtime blocks (xtime_dr). The
// sums of three bytes share a common pair where possible. Purely
// combinational; spacer in gives spacer out.
//
// The factoring with 02(a^b) terms follows the reference design; the sharing of
// the three-byte sums is this design's choice.
module mixcolumns_dr
  import aes_async_pkg::*;
(
  input  dr_word_t col,
  output dr_word_t res
);

  dr_byte_t a, b, c, d;
  dr_byte_t ab, bc, cd, da, x_ab, x_bc, x_cd, x_da;
  dr_byte_t s0, s1, s2, s3;   // three-byte sums

  assign a = col[0];
  assign b = col[1];
  assign c = col[2];
  assign d = col[3];

  xor8_sb u_ab (.a(a), .b(b), .c(ab));
  xor8_sb u_bc (.a(b), .b(c), .c(bc));
  xor8_sb u_cd (.a(c), .b(d), .c(cd));
  xor8_sb u_da (.a(d), .b(a), .c(da));

  xtime_dr u_t0 (.a(ab), .y(x_ab));
  xtime_dr u_t1 (.a(bc), .y(x_bc));
  xtime_dr u_t2 (.a(cd), .y(x_cd));
  xtime_dr u_t3 (.a(da), .y(x_da));

  xor8_sb u_s0 (.a(bc), .b(d),  .c(s0));   // b^c^d
  xor8_sb u_s1 (.a(da), .b(c),  .c(s1));   // a^c^d
  xor8_sb u_s2 (.a(ab), .b(d),  .c(s2));   // a^b^d
  xor8_sb u_s3 (.a(a),  .b(bc), .c(s3));   // a^b^c

  xor8_sb u_m0 (.a(x_ab), .b(s0), .c(res[0]));
  xor8_sb u_m1 (.a(x_bc), .b(s1), .c(res[1]));
  xor8_sb u_m2 (.a(x_cd), .b(s2), .c(res[2]));
  xor8_sb u_m3 (.a(x_da), .b(s3), .c(res[3]));

endmodule
