// half_buffer: four-phase dual-rail buffer stage (weak-conditioned
// half-buffer), W bits wide, used as a one-token memory.
//
// Each output rail is a C-element joining the matching input rail with the
// inverted acknowledge from the next stage, so a token is copied forward only
// when the next stage has released the previous one, and the spacer is copied
// forward only when the next stage has acknowledged the token. The
// acknowledge returned to the previous stage is the completion of the output:
// a C-element over the per-bit ORs of the two rails, high once every output
// bit is valid, low once every output bit is back to the spacer.
//
// Interface: in_d/in_ack towards the sender, out_d/out_ack towards the
// receiver, all following the four-phase (return-to-zero) protocol.
// Timing: in the clocked model each C-element takes one clock, so a token
// appears on out_d one clock after in_d and in_ack follows one clock later.
//
// The half-buffer as a one-token dual-rail memory is part of the reference
// architecture; this particular weak-conditioned form is this design's choice.
module half_buffer
  import aes_async_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dr_t  [W-1:0]   in_d,
  output logic           in_ack,
  output dr_t  [W-1:0]   out_d,
  input  logic           out_ack
);

  logic [W-1:0] bit_done;

  for (genvar i = 0; i < W; i++) begin : g_bit
    for (genvar r = 0; r < 2; r++) begin : g_rail
      c_element #(.N(2)) u_c (
        .clk  (clk),
        .rst_n(rst_n),
        .in   ({in_d[i][r], ~out_ack}),
        .out  (out_d[i][r])
      );
    end
    assign bit_done[i] = out_d[i][0] | out_d[i][1];
  end

  c_element #(.N(W)) u_done (
    .clk  (clk),
    .rst_n(rst_n),
    .in   (bit_done),
    .out  (in_ack)
  );

endmodule
