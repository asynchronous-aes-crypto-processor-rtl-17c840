// addkey: AddRoundKey on one 4-byte state column: the column is XORed with
// a 32-bit key word using dual-rail XOR gates (four xor8_sb), so the key is
// combined with the data by balanced gates only. The same block serves as
// Addkey0 (initial key), Addroundkey (round keys) and Addlastkey (last key).
// Purely combinational; spacer on either input gives spacer on the output.
//
// Follows the reference architecture (Addkey0, Addroundkey, Addlastkey as
// dual-rail XORs).
module addkey
  import aes_async_pkg::*;
(
  input  dr_word_t col,
  input  dr_word_t key,
  output dr_word_t res
);

  for (genvar l = 0; l < 4; l++) begin : g_lane
    xor8_sb u_x (.a(col[l]), .b(key[l]), .c(res[l]));
  end

endmodule
