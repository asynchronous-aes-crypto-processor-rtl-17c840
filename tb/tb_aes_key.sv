// tb_aes_key: sends random 128, 192 and 256-bit keys (and the FIPS-197
// 128-bit example key) to the key scheduler over its four-phase channel,
// then consumes all 4*(Nr+1) round-key words, one per two-clock step with
// the evaluate phase, and compares each with a behavioural key expansion.
module tb_aes_key;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  logic     start, key_in_ack, eval, kw_valid, kw_next;
  keylen_e  keylen;
  dr_word_t key_in_d, kw_d;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  aes_key dut (.*);
  task automatic one(input int kl, input logic [7:0] key[32]);
    logic [7:0] w[240];
    int nk, nw;
    nk = 4 + 2*kl; nw = 4*(nk + 7);
    expand(key, nk, w);
    @(negedge clk); keylen = keylen_e'(kl); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < nk; i++) begin
      key_in_d = {dr8(key[4*i+3]), dr8(key[4*i+2]), dr8(key[4*i+1]), dr8(key[4*i])};
      while (!key_in_ack) @(negedge clk);
      key_in_d = '0;
      while (key_in_ack) @(negedge clk);
    end
    while (!kw_valid) @(negedge clk);
    for (int i = 0; i < nw; i++) begin
      eval = 1;
      check(kw_d == {dr8(w[4*i+3]), dr8(w[4*i+2]), dr8(w[4*i+1]), dr8(w[4*i])},
            $sformatf("key %0d bits word %0d", 128 + 64*kl, i));
      kw_next = 1;
      @(negedge clk); kw_next = 0; eval = 0;
      @(negedge clk);
    end
  endtask
  initial begin
    logic [7:0] key[32];
    start = 0; eval = 0; kw_next = 0; key_in_d = '0; keylen = KEY128;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) key[i] = 8'(i);
    one(0, key);
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < 32; i++) key[i] = 8'($urandom);
      one(t % 3, key);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
