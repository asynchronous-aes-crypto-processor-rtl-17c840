// c_element: Muller C-element (rendezvous cell) with N inputs and reset.
//
// The output rises when every input is high, falls when every input is low,
// and otherwise keeps its value. It is what joins the partial completion
// signals of a multi-bit channel into one acknowledge, and it is the storage
// cell of the four-phase half-buffer.
//
// This is a clocked model of the asynchronous cell: the output is a flip-flop
// that takes its new value at the next rising clock edge, i.e. every C-element
// has a delay of one clock. Since a QDI circuit is correct for any gate delay,
// this fixed delay is one legal timing of the real circuit. rst_n (active low,
// asynchronous) clears the output, like the reset input of the "Cr" gate.
//
// The rendezvous rule is the standard Muller C-element; the one-clock delay and the
// reset polarity are this design's choices.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out <= 1'b0;
    else if (&in)      out <= 1'b1;
    else if (!(|in))   out <= 1'b0;
  end

endmodule
