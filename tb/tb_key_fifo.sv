// tb_key_fifo: loads Nk = 4, 6 and 8 words into the key FIFO, checks head,
// tail and full, then shifts in new words and checks that the FIFO behaves
// as a window of the last Nk words.
module tb_key_fifo;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  logic       clear, load, shift, full;
  logic [3:0] nk;
  dr_word_t   wr_d, head, tail;
  logic [31:0] model[$];
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  key_fifo #(.DEPTH(8)) dut (.*);
  initial begin
    clear = 0; load = 0; shift = 0; wr_d = '0; nk = 4;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      nk = 4'(4 + 2*k); clear = 1; model = {};
      @(negedge clk); clear = 0;
      for (int i = 0; i < int'(nk); i++) begin
        logic [31:0] v;
        check(!full, "not full while loading");
        v = $urandom; model.push_back(v);
        wr_d = dr32(v); load = 1;
        @(negedge clk); load = 0;
      end
      check(full, "full after Nk loads");
      for (int i = 0; i < 20; i++) begin
        logic [31:0] v;
        check(head == dr32(model[0]) && tail == dr32(model[$]), $sformatf("nk %0d shift %0d", nk, i));
        v = $urandom;
        wr_d = dr32(v); shift = 1;
        @(negedge clk); shift = 0;
        void'(model.pop_front()); model.push_back(v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
