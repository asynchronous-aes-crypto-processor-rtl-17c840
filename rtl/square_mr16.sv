// square_mr16: GF(2^4) squaring on a 1-of-16 coded element
// (field polynomial x^4+x+1). The function x^2 is a permutation of the
// sixteen field elements, so in the 1-of-16 code it needs no gate at all:
// input wire v is simply routed to output wire f(v). The routing is computed
// at elaboration time from the field arithmetic in aes_async_pkg.
//
// Wiring-only GF(2^4) blocks on the 1-of-16 code follow the reference S-box;
// the field polynomial x^4+x+1 is this design's choice.
module square_mr16
  import aes_async_pkg::*;
(
  input  mr16_t a,
  output mr16_t y
);

  for (genvar v = 0; v < 16; v++) begin : g_wire
    localparam logic [3:0] F = gf16_mul(4'(v), 4'(v));
    assign y[F] = a[v];
  end

endmodule
