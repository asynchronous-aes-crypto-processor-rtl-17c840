// dr_rx: receiving end of a four-phase dual-rail word channel.
//
// avail is high while a complete, not yet acknowledged token sits on the
// channel (completion detection: every bit has one rail high). The consumer
// pulses take in a cycle where avail is high to latch data; the acknowledge
// then rises and stays high until the sender has returned every rail to the
// spacer, when it falls again and the channel is free for the next token.
// Assertions check the sender's side of the protocol.
//
// A helper of this design.
module dr_rx
  import aes_async_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  dr_word_t d,
  output logic     ack,
  output logic     avail,
  input  logic     take
);

  assign avail = dr_word_valid(d) && !ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       ack <= 1'b0;
    else if (avail && take)           ack <= 1'b1;
    else if (ack && dr_word_spacer(d)) ack <= 1'b0;
  end

  // Four-phase rules for the sender: a token stays unchanged until it is
  // acknowledged, and while the acknowledge is high rails may only fall.
  assert property (@(posedge clk) disable iff (!rst_n)
    (!ack && $past(avail) && !$past(take)) |-> (d == $past(d)))
    else $error("dr_rx: token changed before it was acknowledged");
  assert property (@(posedge clk) disable iff (!rst_n)
    ($past(ack) && ack) |-> ((d & ~$past(d)) == '0))
    else $error("dr_rx: rail rose while the acknowledge was high");

endmodule
