// tb_sync_async_if: sends 8 and then 4 random binary words through the
// synchronous-to-asynchronous interface; the testbench is the four-phase
// receiver, with a random acknowledge delay. Every token must be a complete
// dual-rail code of the right word, in order, and busy must fall after the
// last one.
module tb_sync_async_if;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  logic            go, ch_ack, busy;
  logic [3:0]      n_words;
  bin_word_t [7:0] words;
  dr_word_t        ch_d;
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
  sync_async_if #(.N_MAX(8)) dut (.*);
  task automatic xfer(input int n);
    for (int i = 0; i < 8; i++) words[i] = bin_word_t'($urandom);
    @(negedge clk); n_words = 4'(n); go = 1;
    @(negedge clk); go = 0;
    for (int i = 0; i < n; i++) begin
      while (!dr_word_valid(ch_d)) @(negedge clk);
      check(ch_d == dr32(words[i]), $sformatf("word %0d of %0d", i, n));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      ch_ack = 1;
      while (ch_d != '0) @(negedge clk);
      ch_ack = 0;
    end
    repeat (20) @(negedge clk);
    check(!busy, "busy falls after the transfer");
    check(ch_d == '0, "channel idle at spacer");
  endtask
  initial begin
    go = 0; ch_ack = 0; n_words = 0; words = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    xfer(8);
    xfer(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
