// key_fifo: storage of the key schedule: the last Nk key words, w[j] at the
// head (entry 0) up to w[j+Nk-1] at the tail (entry Nk-1), as dual-rail
// words.
//
// load writes the next of the Nk words of the cipher key (entry count,
// count+1, ...). shift moves every word one place towards the head and
// writes the newly computed word w[j+Nk] at the tail, so one key word leaves
// and one enters per step, as in a chain of buffer stages. DEPTH is the
// largest Nk (8, for 256-bit keys); nk selects the active length.
//
// A FIFO of key words follows the reference key schedule, which chains
// self-timed half-buffers; here the stages are clocked registers.
module key_fifo
  import aes_async_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic [$clog2(DEPTH+1)-1:0] nk,
  input  logic                       load,
  input  logic                       shift,
  input  dr_word_t                   wr_d,
  output dr_word_t                   head,
  output dr_word_t                   tail,
  output logic                       full
);

  dr_word_t                   mem [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [$clog2(DEPTH)-1:0]   tail_idx;

  assign tail_idx = $clog2(DEPTH)'(nk - 1'b1);

  assign head = mem[0];
  assign tail = mem[tail_idx];
  assign full = (count == nk);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (load && !full) begin
      mem[$clog2(DEPTH)'(count)] <= wr_d;
      count      <= count + 1'b1;
    end else if (shift) begin
      for (int i = 0; i < DEPTH - 1; i++)
        if (i < int'(nk) - 1) mem[i] <= mem[i + 1];
      mem[tail_idx] <= wr_d;
    end
  end

endmodule
