// xor_rc: the XOR_RC block of the key schedule. It applies the RotBytes
// permutation to a 4-byte word (lane i takes lane i+1, lane 3 takes lane 0;
// pure wiring) and adds the round constant Rcon to lane 0 with dual-rail
// XOR gates. Used on the S-box output of the key word, which is equivalent
// to the standard SubWord(RotWord(w)) ^ Rcon since SubWord works per byte.
// Purely combinational.
//
// XOR_RC with the RotBytes permutation follows the reference key schedule;
// placing it after the S-boxes is this design's choice.
module xor_rc
  import aes_async_pkg::*;
(
  input  dr_word_t w,
  input  dr_byte_t rcon,
  output dr_word_t y
);

  xor8_sb u_rc (.a(w[1]), .b(rcon), .c(y[0]));
  assign y[1] = w[2];
  assign y[2] = w[3];
  assign y[3] = w[0];

endmodule
