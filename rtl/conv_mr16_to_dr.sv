// conv_mr16_to_dr: converts a GF(2^4) element from the 1-of-16 code back to
// four dual-rail bits. Rail r of bit i is the OR of the eight wires whose
// value has bit i equal to r. All wires low gives the spacer.
// Purely combinational.
//
// The converter is part of the reference S-box; its gate structure is this
// design's choice.
module conv_mr16_to_dr
  import aes_async_pkg::*;
(
  input  mr16_t   m,
  output dr_nib_t d
);

  always_comb begin
    d = '0;
    for (int v = 0; v < 16; v++)
      for (int i = 0; i < 4; i++)
        d[i][(v >> i) & 1] |= m[v];
  end

endmodule
