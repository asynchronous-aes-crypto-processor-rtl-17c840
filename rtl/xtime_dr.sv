// xtime_dr: multiplication by {02} in GF(2^8) on a dual-rail byte.
//
// The byte is shifted left by one and the reduction by x^8+x^4+x^3+x+1 is
// applied by XORing the old MSB into bits 1, 3 and 4 (the shifted-out MSB
// itself becomes bit 0). The reduction is always computed, whatever the MSB,
// so the gate activity does not depend on the data. Built of three dr_xor
// gates and wires. Purely combinational.
//
// Always computing the reduction follows the reference design; the gate list
// is this design's.
module xtime_dr
  import aes_async_pkg::*;
(
  input  dr_byte_t a,
  output dr_byte_t y
);

  assign y[0] = a[7];
  assign y[2] = a[1];
  assign y[5] = a[4];
  assign y[6] = a[5];
  assign y[7] = a[6];
  dr_xor u_b1 (.a(a[0]), .b(a[7]), .c(y[1]));
  dr_xor u_b3 (.a(a[2]), .b(a[7]), .c(y[3]));
  dr_xor u_b4 (.a(a[3]), .b(a[7]), .c(y[4]));

endmodule
