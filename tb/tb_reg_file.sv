// tb_reg_file: writes random values to the plaintext and key registers and
// reads them back over the bus and on the word outputs; checks the Mode
// register (key length, self-clearing start pulse, done flag set by the
// interface and cleared by a new start) and the ciphertext registers written
// through the interface port, which the host cannot overwrite.
module tb_reg_file;
  import aes_async_pkg::*;
  logic [5:0]      addr;
  logic            wr, start, ct_we, set_done;
  logic [15:0]     wdata, rdata;
  keylen_e         keylen;
  bin_word_t [3:0] plain;
  bin_word_t [7:0] key;
  logic [1:0]      ct_idx;
  bin_word_t       ct_data;
  logic [15:0]     pt_m[8], key_m[16];
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
  reg_file dut (.*);
  task automatic wr16(input int a, input logic [15:0] d);
    @(negedge clk); addr = 6'(a); wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask
  initial begin
    int starts;
    wr = 0; addr = 0; wdata = 0; ct_we = 0; set_done = 0; ct_idx = 0; ct_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++)  begin pt_m[i]  = 16'($urandom); wr16(1 + i, pt_m[i]); end
    for (int i = 0; i < 16; i++) begin key_m[i] = 16'($urandom); wr16(9 + i, key_m[i]); end
    for (int i = 0; i < 8; i++)  begin addr = 6'(1 + i); #1 check(rdata == pt_m[i], "plaintext readback"); end
    for (int i = 0; i < 16; i++) begin addr = 6'(9 + i); #1 check(rdata == key_m[i], "key readback"); end
    for (int c = 0; c < 4; c++) check(plain[c] == {pt_m[2*c+1], pt_m[2*c]}, "plaintext word");
    for (int c = 0; c < 8; c++) check(key[c] == {key_m[2*c+1], key_m[2*c]}, "key word");
    // Start with a 256-bit key: one start pulse.
    starts = 0;
    fork
      repeat (6) begin @(posedge clk); #1 if (start) starts++; end
      wr16(0, 16'h0006);
    join
    check(starts == 1, $sformatf("start pulses %0d", starts));
    check(keylen == KEY256, "key length");
    addr = 0; #1 check(rdata == 16'h0002, $sformatf("mode readback %h", rdata));
    // Ciphertext written by the interface, done flag.
    for (int c = 0; c < 4; c++) begin
      @(negedge clk); ct_we = 1; ct_idx = 2'(c); ct_data = bin_word_t'(32'hA5000000 + c * 32'h00010203);
      @(negedge clk); ct_we = 0;
    end
    @(negedge clk); set_done = 1; @(negedge clk); set_done = 0;
    addr = 0; #1 check(rdata[3], "done flag set");
    wr16(25, 16'hFFFF);
    for (int c = 0; c < 4; c++) begin
      logic [31:0] v;
      v = 32'hA5000000 + c * 32'h00010203;
      addr = 6'(25 + 2*c); #1 check(rdata == v[15:0], "ciphertext low half");
      addr = 6'(26 + 2*c); #1 check(rdata == v[31:16], "ciphertext high half");
    end
    wr16(0, 16'h0004);
    addr = 0; #1 check(rdata == 16'h0000, "new start clears flag, 128-bit key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
