// tb_async_sync_if: the testbench sends four random dual-rail words as a
// four-phase sender; the interface must acknowledge each, write it in
// binary to the right register-file slot, and pulse done once after the
// fourth. Repeated for three blocks.
module tb_async_sync_if;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  logic       start, ch_ack, wr_en, done;
  logic [1:0] wr_idx;
  bin_word_t  wr_data;
  dr_word_t   ch_d;
  logic [31:0] got[4];
  int          n_done = 0;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  async_sync_if #(.N_WORDS(4)) dut (.*);
  always @(posedge clk) begin
    if (rst_n && wr_en) got[wr_idx] <= wr_data;
    if (rst_n && done) n_done <= n_done + 1;
  end
  initial begin
    logic [31:0] v[4];
    start = 0; ch_d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 3; b++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < 4; i++) begin
        v[i] = $urandom;
        ch_d = dr32(v[i]);
        while (!ch_ack) @(negedge clk);
        ch_d = '0;
        while (ch_ack) @(negedge clk);
      end
      repeat (3) @(negedge clk);
      for (int i = 0; i < 4; i++) check(got[i] == v[i], $sformatf("block %0d word %0d", b, i));
      check(n_done == b + 1, $sformatf("done pulses %0d", n_done));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
