// affine_dr: affine transform of the AES S-box on a dual-rail byte,
//   b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7) ^ c_i,  c = {63},
// indices mod 8. Shared pair sums bring it to 16 dual-rail XOR gates. The
// additions of the constant cost nothing: inverting a dual-rail bit is a swap
// of its two rails. Purely combinational.
//
// The equations and the rail-swap trick follow the reference design; the
// 16-gate factoring is this design's (the reference counts 17).
module affine_dr
  import aes_async_pkg::*;
(
  input  dr_byte_t a,
  output dr_byte_t b
);

  dr_t x01, x23, x45, x67, y4567, y0123, y2345, y0167;
  dr_t b0, b1, b5, b6;   // before the constant is added

  dr_xor u_x01 (.a(a[0]), .b(a[1]), .c(x01));
  dr_xor u_x23 (.a(a[2]), .b(a[3]), .c(x23));
  dr_xor u_x45 (.a(a[4]), .b(a[5]), .c(x45));
  dr_xor u_x67 (.a(a[6]), .b(a[7]), .c(x67));
  dr_xor u_y47 (.a(x45),  .b(x67),  .c(y4567));
  dr_xor u_y03 (.a(x01),  .b(x23),  .c(y0123));
  dr_xor u_y25 (.a(x23),  .b(x45),  .c(y2345));
  dr_xor u_y01 (.a(x01),  .b(x67),  .c(y0167));

  dr_xor u_b7 (.a(a[3]), .b(y4567), .c(b[7]));
  dr_xor u_b0 (.a(a[0]), .b(y4567), .c(b0));
  dr_xor u_b4 (.a(a[4]), .b(y0123), .c(b[4]));
  dr_xor u_b3 (.a(a[7]), .b(y0123), .c(b[3]));
  dr_xor u_b6 (.a(a[6]), .b(y2345), .c(b6));
  dr_xor u_b5 (.a(a[1]), .b(y2345), .c(b5));
  dr_xor u_b2 (.a(a[2]), .b(y0167), .c(b[2]));
  dr_xor u_b1 (.a(a[5]), .b(y0167), .c(b1));

  // Constant {63} sets bits 0, 1, 5 and 6: swap their rails.
  assign b[0] = {b0[0], b0[1]};
  assign b[1] = {b1[0], b1[1]};
  assign b[5] = {b5[0], b5[1]};
  assign b[6] = {b6[0], b6[1]};

endmodule
