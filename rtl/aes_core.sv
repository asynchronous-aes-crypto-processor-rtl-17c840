// aes_core: the AES_core cipher block on a 32-bit (one column, 4-byte)
// dual-rail data path.
//
// Data path (per step, one state column):
//   col_reg -> 4 x bytesub -> ShiftRows C0..C3 -> mixcolumns_dr -> addkey
//                                       \-> addkey (last round, no MixColumns)
// The result of each departure from ShiftRows is written back into col_reg,
// so a round takes four steps and a cipher 4*Nr steps (40 for a 128-bit
// key). The four plaintext words enter through Addkey0 (addkey with the
// first four key words) from a four-phase input channel; the four
// ciphertext words leave through Addlastkey on a four-phase output channel.
// Key words come from aes_key in order, one per Addkey operation.
//
// Sequencing: every step is a four-phase cycle of two clocks. In the
// evaluate clock (eval=1) the registered operands are presented to the data
// path in dual-rail code and the results are latched at its end; in the
// return-to-zero clock all data-path inputs are forced to the spacer so
// every rail goes back to 0 before the next token, as the four-phase
// protocol requires. A ShiftRows arrival and departure are each a
// rendezvous of the four Ci blocks (AND of their flags).
//
// Interface: start (one clock, with keylen stable) begins a block; in_d /
// in_ack is the plaintext channel, out_d / out_ack the ciphertext channel,
// kw_d / kw_valid / kw_next the round-key words; busy is high from start
// until the last ciphertext word has been acknowledged; iterations counts
// the ShiftRows departures (loop iterations) of the current block.
//
// The 32-bit column data path, the 12-byte ShiftRows and the 4*Nr iterations
// follow the reference; the two-clock step, the loop register col_reg and the
// control equations are this design's.
module aes_core
  import aes_async_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  keylen_e    keylen,
  input  dr_word_t   in_d,
  output logic       in_ack,
  output dr_word_t   out_d,
  input  logic       out_ack,
  input  dr_word_t   kw_d,
  input  logic       kw_valid,
  output logic       kw_next,
  output logic       eval,
  output logic       busy,
  output logic [5:0] iterations
);

  logic [3:0] nr;
  logic [2:0] loaded;      // plaintext words taken (0..4)
  logic [5:0] dep_cnt;     // ShiftRows departures
  logic [2:0] sent;        // ciphertext words sent
  dr_word_t   col_reg;
  logic       col_vld;

  dr_word_t   sb_in, sb_out, sr_out, sr_g, kw_g, mc_out, ark_out, last_out, ak0_out;
  logic [3:0] ci_rdy_nodep, ci_rdy_dep, ci_out_valid;
  logic       arrive, depart, last_round, rx_avail, load, tx_idle;

  always_comb begin
    unique case (keylen)
      KEY192:  nr = 4'd12;
      KEY256:  nr = 4'd14;
      default: nr = 4'd10;
    endcase
  end

  assign iterations = dep_cnt;
  assign last_round = (dep_cnt[5:2] == nr - 4'd1);

  // ---------------- data path ----------------
  assign sb_in = (eval && col_vld) ? col_reg : '0;
  assign kw_g  = (eval && kw_valid) ? kw_d : '0;

  for (genvar l = 0; l < 4; l++) begin : g_lane
    bytesub u_sb (.a(sb_in[l]), .y(sb_out[l]));
    shiftrows_ci #(.ROW(l)) u_ci (
      .clk(clk), .rst_n(rst_n), .clear(start),
      .in_valid(col_vld), .in_byte(sb_out[l]), .ready_nodep(ci_rdy_nodep[l]), .ready_dep(ci_rdy_dep[l]),
      .arrive(arrive),
      .out_valid(ci_out_valid[l]), .out_byte(sr_out[l]), .depart(depart)
    );
  end

  assign sr_g = eval ? sr_out : '0;

  mixcolumns_dr u_mc   (.col(sr_g), .res(mc_out));
  addkey        u_ark  (.col(mc_out), .key(kw_g), .res(ark_out));
  addkey        u_alk  (.col(sr_g),   .key(kw_g), .res(last_out));
  addkey        u_ak0  (.col(in_d),   .key(kw_g), .res(ak0_out));

  // ---------------- channels ----------------
  dr_rx u_rx (
    .clk(clk), .rst_n(rst_n), .d(in_d), .ack(in_ack),
    .avail(rx_avail), .take(load)
  );

  dr_tx u_tx (
    .clk(clk), .rst_n(rst_n), .send(depart && last_round), .data(last_out),
    .idle(tx_idle), .d(out_d), .ack(out_ack)
  );

  // ---------------- control ----------------
  // Departure: all four Ci have their byte (rendezvous), a key word is
  // available, col_reg is free for the result, and in the last round the
  // output channel is idle.
  assign depart = busy && eval && (&ci_out_valid) && kw_valid &&
                  (dep_cnt < {nr, 2'b00}) &&
                  (!col_vld || (&ci_rdy_dep)) &&
                  (!last_round || tx_idle);
  assign arrive = busy && eval && col_vld &&
                  (depart ? (&ci_rdy_dep) : (&ci_rdy_nodep));
  assign load   = busy && eval && rx_avail && kw_valid && (loaded < 3'd4) &&
                  (!col_vld || arrive);
  assign kw_next = load || depart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      eval    <= 1'b0;
      loaded  <= '0;
      dep_cnt <= '0;
      sent    <= '0;
      col_reg <= '0;
      col_vld <= 1'b0;
    end else if (start) begin
      busy    <= 1'b1;
      eval    <= 1'b0;
      loaded  <= '0;
      dep_cnt <= '0;
      sent    <= '0;
      col_vld <= 1'b0;
    end else if (busy) begin
      eval <= !eval;
      if (load) begin
        col_reg <= ak0_out;
        col_vld <= 1'b1;
        loaded  <= loaded + 3'd1;
      end else if (depart && !last_round) begin
        col_reg <= ark_out;
        col_vld <= 1'b1;
      end else if (arrive) begin
        col_vld <= 1'b0;
      end
      if (depart) dep_cnt <= dep_cnt + 6'd1;
      // Done: the data path rests at the spacer until the next start.
      if (tx_idle && sent == 3'd4) begin
        busy <= 1'b0;
        eval <= 1'b0;
      end
      if (out_ack && out_d != '0) sent <= sent + 3'd1;
    end
  end

  // Four-phase discipline of the data path: results are complete code words
  // in the evaluate phase and all-spacer in the return-to-zero phase.
  always_ff @(posedge clk) begin
    if (busy && !eval) begin
      assert (sb_out == '0 && mc_out == '0)
        else $error("aes_core: data path not returned to zero");
    end
    if (depart) begin
      assert (dr_word_valid(last_round ? last_out : ark_out))
        else $error("aes_core: incomplete result at departure");
    end
  end

endmodule
