// sync_async_if: synchronous-to-asynchronous interface. On go it sends
// n_words binary words (words[0] first), each converted to dual rail, as
// tokens of a four-phase channel into the asynchronous core.
//
// A dr_tx sender drives the channel and a half_buffer stage (C-element
// latches) forms the boundary towards the asynchronous block: the receiver's
// acknowledge releases the half-buffer, whose own completion acknowledges
// the sender. busy is high from go until the last token has been
// acknowledged and its spacer has passed through the half-buffer.
// N_MAX is the largest number of words of one transfer (8 for a 256-bit key).
//
// Binary-to-dual-rail conversion follows the reference design; the sender,
// the half-buffer stage and the word sequencing are this design's choices.
module sync_async_if
  import aes_async_pkg::*;
#(
  parameter int unsigned N_MAX = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       go,
  input  logic [$clog2(N_MAX+1)-1:0] n_words,
  input  bin_word_t [N_MAX-1:0]      words,
  output dr_word_t                   ch_d,
  input  logic                       ch_ack,
  output logic                       busy
);

  logic [$clog2(N_MAX+1)-1:0] idx, n_r;
  logic     tx_idle, send, hb_ack;
  dr_word_t tx_d;

  assign send = busy && tx_idle && (idx < n_r);

  dr_tx u_tx (
    .clk(clk), .rst_n(rst_n), .send(send),
    .data(dr_enc_word(words[$clog2(N_MAX)'(idx)])),
    .idle(tx_idle), .d(tx_d), .ack(hb_ack)
  );

  half_buffer #(.W(32)) u_hb (
    .clk(clk), .rst_n(rst_n), .in_d(tx_d), .in_ack(hb_ack),
    .out_d(ch_d), .out_ack(ch_ack)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      n_r  <= '0;
    end else if (go) begin
      busy <= 1'b1;
      idx  <= '0;
      n_r  <= n_words;
    end else if (busy) begin
      if (send) idx <= idx + 1'b1;
      if (idx == n_r && tx_idle && ch_d == '0 && !ch_ack) busy <= 1'b0;
    end
  end

endmodule
