// conv_dr_to_mr16: converts a GF(2^4) element from four dual-rail bits to
// the 1-of-16 code. Output wire v is the rendezvous of the rails that spell v
// (one rail per bit), so exactly one of the sixteen wires rises for a valid
// input and none for the spacer. Purely combinational.
//
// The converter is part of the reference S-box; its gate structure is this
// design's choice.
module conv_dr_to_mr16
  import aes_async_pkg::*;
(
  input  dr_nib_t d,
  output mr16_t   m
);

  for (genvar v = 0; v < 16; v++) begin : g_v
    assign m[v] = d[0][v % 2] & d[1][(v / 2) % 2] & d[2][(v / 4) % 2] & d[3][v / 8];
  end

endmodule
