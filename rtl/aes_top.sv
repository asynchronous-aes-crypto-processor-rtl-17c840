// aes_top: the complete AES crypto-processor: a synchronous register file
// for the host, a synchronous-to-asynchronous interface for the plaintext
// and one for the key, the asynchronous cipher block (aes_core) with its key
// scheduler (aes_key), and an asynchronous-to-synchronous interface that
// returns the ciphertext to the register file.
//
// Operation: the host writes the plaintext (8 x 16 bits) and key (up to
// 16 x 16 bits) registers, then writes the Mode register with the key length
// and the start bit. The plaintext (4 words) and the Nk key words are then
// sent as dual-rail tokens over four-phase channels, the core ciphers the
// block in 4*Nr steps, and the four ciphertext words come back over a
// four-phase channel into the ciphertext registers, after which the done
// flag of the Mode register is set. The register file and interfaces are
// idle while the core computes.
//
// Ports: clock, active-low reset and the host register bus (see reg_file).
// busy is high while the core is working, io_busy while the input
// interfaces are sending; done_flag mirrors the flag; iterations is the
// number of cipher loop iterations of the last block (4*Nr).
//
// The partition (register file, interfaces, AES_core, AES_key) follows the
// reference design; the separate plaintext and key interfaces and the host bus
// are this design's choices.
module aes_top
  import aes_async_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  addr,
  input  logic        wr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        busy,
  output logic        io_busy,
  output logic        done_flag,
  output logic [5:0]  iterations
);

  logic            start, ct_we, set_done, key_ack, pt_ack, ct_ack, kw_valid, kw_next, eval;
  keylen_e         keylen;
  bin_word_t [3:0] plain;
  bin_word_t [7:0] key;
  bin_word_t       ct_data;
  logic [1:0]      ct_idx;
  logic [3:0]      nk;
  dr_word_t        pt_ch, key_ch, ct_ch, kw_d;
  logic            pt_busy, key_busy;

  assign nk = (keylen == KEY256) ? 4'd8 : (keylen == KEY192) ? 4'd6 : 4'd4;

  reg_file u_regs (
    .clk(clk), .rst_n(rst_n), .addr(addr), .wr(wr), .wdata(wdata), .rdata(rdata),
    .start(start), .keylen(keylen), .plain(plain), .key(key),
    .ct_we(ct_we), .ct_idx(ct_idx), .ct_data(ct_data), .set_done(set_done)
  );

  sync_async_if #(.N_MAX(4)) u_pt_if (
    .clk(clk), .rst_n(rst_n), .go(start), .n_words(3'd4), .words(plain),
    .ch_d(pt_ch), .ch_ack(pt_ack), .busy(pt_busy)
  );

  sync_async_if #(.N_MAX(8)) u_key_if (
    .clk(clk), .rst_n(rst_n), .go(start), .n_words(nk), .words(key),
    .ch_d(key_ch), .ch_ack(key_ack), .busy(key_busy)
  );

  aes_key u_key (
    .clk(clk), .rst_n(rst_n), .start(start), .keylen(keylen),
    .key_in_d(key_ch), .key_in_ack(key_ack), .eval(eval),
    .kw_d(kw_d), .kw_valid(kw_valid), .kw_next(kw_next)
  );

  aes_core u_core (
    .clk(clk), .rst_n(rst_n), .start(start), .keylen(keylen),
    .in_d(pt_ch), .in_ack(pt_ack), .out_d(ct_ch), .out_ack(ct_ack),
    .kw_d(kw_d), .kw_valid(kw_valid), .kw_next(kw_next), .eval(eval),
    .busy(busy), .iterations(iterations)
  );

  async_sync_if #(.N_WORDS(4)) u_ct_if (
    .clk(clk), .rst_n(rst_n), .start(start), .ch_d(ct_ch), .ch_ack(ct_ack),
    .wr_en(ct_we), .wr_idx(ct_idx), .wr_data(ct_data), .done(set_done)
  );

  assign io_busy = pt_busy | key_busy;

  // The flag is the Mode register's bit 3, read back through the bus path.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        done_flag <= 1'b0;
    else if (start)    done_flag <= 1'b0;
    else if (set_done) done_flag <= 1'b1;
  end

endmodule
