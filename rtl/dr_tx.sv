// dr_tx: sending end of a four-phase dual-rail word channel.
//
// A pulse on send (accepted when idle) puts the dual-rail word data on the
// channel (phase 1). When the receiver raises ack (phase 2) the channel
// returns to the spacer (phase 3), and once ack has fallen (phase 4) the
// sender is idle again. The word is held in a register, so it is stable for
// the whole valid phase.
//
// A helper of this design.
module dr_tx
  import aes_async_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     send,
  input  dr_word_t data,
  output logic     idle,
  output dr_word_t d,
  input  logic     ack
);

  typedef enum logic [1:0] {TX_IDLE, TX_VALID, TX_RTZ} tx_state_e;
  tx_state_e state;

  assign idle = (state == TX_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= TX_IDLE;
      d     <= '0;
    end else begin
      unique case (state)
        TX_IDLE:  if (send) begin
                    d     <= data;
                    state <= TX_VALID;
                  end
        TX_VALID: if (ack) begin
                    d     <= '0;
                    state <= TX_RTZ;
                  end
        TX_RTZ:   if (!ack) state <= TX_IDLE;
        default:  state <= TX_IDLE;
      endcase
    end
  end

  // Four-phase rule for the receiver: it acknowledges only a valid token and
  // releases the acknowledge only after the spacer.
  assert property (@(posedge clk) disable iff (!rst_n)
    ($rose(ack)) |-> (state == TX_VALID))
    else $error("dr_tx: acknowledge without a token");
  assert property (@(posedge clk) disable iff (!rst_n)
    ($fell(ack)) |-> (d == '0))
    else $error("dr_tx: acknowledge released before the spacer");

endmodule
