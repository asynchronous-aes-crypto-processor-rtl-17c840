// async_sync_if: asynchronous-to-synchronous interface. It receives
// N_WORDS dual-rail tokens from a four-phase channel, converts each to
// binary and writes it into the register file (wr_en, wr_idx, wr_data).
// done pulses for one clock when the last word has been written.
// The acknowledge rises in the clock after a complete token is seen and
// falls in the clock after the channel has returned to the spacer.
//
// Dual-rail-to-binary conversion follows the reference design; the receiver and
// the word counting are this design's choices.
module async_sync_if
  import aes_async_pkg::*;
#(
  parameter int unsigned N_WORDS = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  dr_word_t                     ch_d,
  output logic                         ch_ack,
  output logic                         wr_en,
  output logic [$clog2(N_WORDS)-1:0]   wr_idx,
  output bin_word_t                    wr_data,
  output logic                         done
);

  logic                         avail;
  logic [$clog2(N_WORDS+1)-1:0] cnt;

  dr_rx u_rx (
    .clk(clk), .rst_n(rst_n), .d(ch_d), .ack(ch_ack),
    .avail(avail), .take(avail)
  );

  assign wr_en   = avail;
  assign wr_idx  = $clog2(N_WORDS)'(cnt);
  assign wr_data = dr_dec_word(ch_d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) cnt <= '0;
      else if (avail) begin
        cnt <= cnt + 1'b1;
        if (int'(cnt) == N_WORDS - 1) done <= 1'b1;
      end
    end
  end

endmodule
