// reg_file: synchronous register file through which a host processor loads
// the crypto-processor and reads back the result.
//
//   address 0        Mode register, 4 bits:
//                      [1:0] key length (0: 128, 1: 192, 2: 256 bits)
//                      [2]   start: writing 1 starts a cipher; reads as 0
//                      [3]   done flag: set when the ciphertext is ready,
//                            cleared by a new start; read-only
//   addresses 1..8   plaintext,  8 x 16 bits
//   addresses 9..24  key,       16 x 16 bits
//   addresses 25..32 ciphertext, 8 x 16 bits (read-only for the host,
//                    written by the asynchronous-to-synchronous interface)
// Byte order: 16-bit register r of a field holds byte 2r in bits [7:0] and
// byte 2r+1 in bits [15:8]; byte 4c+i is row i of state column c.
// Bus: one write per clock (wr, addr, wdata); rdata is combinational.
// start is a one-clock pulse in the clock after the host writes the bit.
//
// The register sizes follow the reference design; the bit layout of the Mode
// register, the address map and the byte order are this design's choices.
module reg_file
  import aes_async_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [5:0]      addr,
  input  logic            wr,
  input  logic [15:0]     wdata,
  output logic [15:0]     rdata,
  output logic            start,
  output keylen_e         keylen,
  output bin_word_t [3:0] plain,
  output bin_word_t [7:0] key,
  input  logic            ct_we,
  input  logic [1:0]      ct_idx,
  input  bin_word_t       ct_data,
  input  logic            set_done
);

  localparam int unsigned A_MODE = 0;
  localparam int unsigned A_PT   = 1;
  localparam int unsigned A_KEY  = 9;
  localparam int unsigned A_CT   = 25;
  localparam int unsigned A_END  = 33;

  logic [15:0] pt_r [8];
  logic [15:0] key_r[16];
  logic [15:0] ct_r [8];
  logic [1:0]  kl_r;
  logic        done_r;

  assign keylen = keylen_e'(kl_r);

  for (genvar c = 0; c < 4; c++) begin : g_pt
    assign plain[c] = {pt_r[2*c+1], pt_r[2*c]};
  end
  for (genvar c = 0; c < 8; c++) begin : g_key
    assign key[c] = {key_r[2*c+1], key_r[2*c]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kl_r   <= '0;
      done_r <= 1'b0;
      start  <= 1'b0;
      for (int i = 0; i < 8; i++)  begin pt_r[i] <= '0; ct_r[i] <= '0; end
      for (int i = 0; i < 16; i++) key_r[i] <= '0;
    end else begin
      start <= 1'b0;
      if (wr) begin
        if (int'(addr) == A_MODE) begin
          kl_r <= (wdata[1:0] == 2'd3) ? 2'd0 : wdata[1:0];
          if (wdata[2]) begin
            start  <= 1'b1;
            done_r <= 1'b0;
          end
        end else if (int'(addr) < A_KEY) begin
          pt_r[3'(int'(addr) - A_PT)] <= wdata;
        end else if (int'(addr) < A_CT) begin
          key_r[4'(int'(addr) - A_KEY)] <= wdata;
        end
      end
      if (ct_we) begin
        ct_r[{ct_idx, 1'b0}] <= ct_data[1:0];
        ct_r[{ct_idx, 1'b1}] <= ct_data[3:2];
      end
      if (set_done) done_r <= 1'b1;
    end
  end

  always_comb begin
    rdata = '0;
    if (int'(addr) == A_MODE)     rdata = {12'd0, done_r, 1'b0, kl_r};
    else if (int'(addr) < A_KEY)  rdata = pt_r[3'(int'(addr) - A_PT)];
    else if (int'(addr) < A_CT)   rdata = key_r[4'(int'(addr) - A_KEY)];
    else if (int'(addr) < A_END)  rdata = ct_r[3'(int'(addr) - A_CT)];
  end

endmodule
