// aes_key: the AES_key block: on-the-fly key expansion on a 32-bit dual-rail
// data path, producing the round-key words w[0], w[1], ... in the order the
// cipher consumes them.
//
// The Nk words of the cipher key (Nk = 4, 6 or 8 for 128, 192 or 256-bit
// keys) arrive as dual-rail tokens on a four-phase channel and fill the key
// FIFO. The FIFO head is the word offered to the cipher (kw_d, kw_valid).
// Each time the cipher consumes it (kw_next) the next word
//   w[j+Nk] = w[j] ^ g(w[j+Nk-1])
// is computed from head and tail and shifted in, where g is
//   SubWord(RotWord(w)) ^ Rcon   when j mod Nk = 0        (bytesub, xor_rc)
//   SubWord(w)                   when Nk = 8, j mod Nk = 4
//   w                            otherwise.
// The four S-boxes are always evaluated, so the gate activity does not
// depend on which case applies. Rcon is held as a dual-rail byte and
// advanced with the Xtime block after each use.
//
// eval is the evaluate phase of the cipher's four-phase step: outside it the
// data-path inputs are held at the spacer, so every rail returns to zero
// between two computations, and while the FIFO is being filled. kw_next is
// only given during eval.
//
// The 32-bit path with its own S-boxes, a key FIFO and XOR_RC follows the
// reference; the selection multiplexer, the Rcon register and the gating while
// loading are this design's choices.
module aes_key
  import aes_async_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  keylen_e  keylen,
  input  dr_word_t key_in_d,
  output logic     key_in_ack,
  input  logic     eval,
  output dr_word_t kw_d,
  output logic     kw_valid,
  input  logic     kw_next
);

  logic [3:0] nk;
  logic [2:0] jm;        // j mod Nk
  dr_byte_t   rcon, rcon_x2;
  dr_word_t   head, tail, head_g, tail_g, sw, rw, gsel, new_w, fifo_wr;
  logic       rx_avail, full, load;

  always_comb begin
    unique case (keylen)
      KEY192:  nk = 4'd6;
      KEY256:  nk = 4'd8;
      default: nk = 4'd4;
    endcase
  end

  dr_rx u_rx (
    .clk(clk), .rst_n(rst_n), .d(key_in_d), .ack(key_in_ack),
    .avail(rx_avail), .take(load)
  );
  assign load = rx_avail && !full;

  key_fifo #(.DEPTH(8)) u_fifo (
    .clk(clk), .rst_n(rst_n), .clear(start), .nk(nk),
    .load(load), .shift(kw_next && full), .wr_d(fifo_wr),
    .head(head), .tail(tail), .full(full)
  );

  assign kw_d     = head;
  assign kw_valid = full;

  // Return-to-zero gating of the expansion data path. It also stays at the
  // spacer while a new key is loaded, so the previous key's words never
  // reach the S-boxes again.
  assign head_g = (eval && full) ? head : '0;
  assign tail_g = (eval && full) ? tail : '0;

  for (genvar l = 0; l < 4; l++) begin : g_sbox
    bytesub u_sb (.a(tail_g[l]), .y(sw[l]));
  end
  xor_rc u_rc (.w(sw), .rcon(rcon), .y(rw));

  always_comb begin
    if (jm == 3'd0)                       gsel = rw;
    else if (nk == 4'd8 && jm == 3'd4)    gsel = sw;
    else                                  gsel = tail_g;
  end

  addkey u_xor (.col(head_g), .key(gsel), .res(new_w));
  xtime_dr u_rcon (.a(rcon), .y(rcon_x2));

  assign fifo_wr = load ? key_in_d : new_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jm   <= '0;
      rcon <= dr_enc_byte(8'h01);
    end else if (start) begin
      jm   <= '0;
      rcon <= dr_enc_byte(8'h01);
    end else if (kw_next && full) begin
      if (jm == 3'(nk - 4'd1)) jm <= '0;
      else                      jm <= jm + 3'd1;
      if (jm == 3'd0) rcon <= rcon_x2;
    end
  end

  always_ff @(posedge clk) begin
    if (kw_next) begin
      assert (full && eval) else $error("aes_key: key word consumed while not available");
      assert (dr_word_valid(new_w)) else $error("aes_key: incomplete key word");
    end
  end

endmodule
