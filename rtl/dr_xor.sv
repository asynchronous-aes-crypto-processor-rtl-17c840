// dr_xor: dual-rail XOR gate.
//
// c = a ^ b on dual-rail operands: each of the four input minterms
// (a0b0, a0b1, a1b0, a1b1) is detected by one rendezvous and the two rails of
// the result are the ORs of the minterms that give 0 and 1. For every valid
// input exactly one minterm fires and exactly one output rail rises, so the
// gate switches the same number of nodes whatever the data: it is balanced.
// Spacer on either input gives spacer on the output.
//
// The rendezvous are written as AND terms: inside a combinational block the
// design evaluates each phase of the four-phase protocol as a whole (see the
// clocked model in c_element), so the C-element hysteresis is not needed
// here. The output half-buffer drawn with the gate is provided separately by
// half_buffer where a stage needs storage.
//
// The minterm structure is the reference dual-rail XOR; leaving out its output
// half-buffer is this design's choice.
module dr_xor
  import aes_async_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t c
);

  assign c[0] = (a[0] & b[0]) | (a[1] & b[1]);
  assign c[1] = (a[0] & b[1]) | (a[1] & b[0]);

endmodule
