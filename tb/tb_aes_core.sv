// tb_aes_core: drives the cipher block directly: the testbench plays the
// key scheduler (offering behaviourally expanded key words) and both
// four-phase channels, with a random acknowledge delay on the ciphertext
// side. It checks the FIPS-197 example and random blocks for all three key
// lengths, that exactly 4*Nr loop iterations are made, and that in steady
// state a round takes four steps of two clocks (8 clocks).
module tb_aes_core;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  logic       start, in_ack, out_ack, kw_valid, kw_next, eval, busy;
  keylen_e    keylen;
  dr_word_t   in_d, out_d, kw_d;
  logic [5:0] iterations;
  logic [7:0] w[240];
  int         kidx, nk;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  aes_core dut (.*);
  assign kw_valid = 1'b1;
  always_comb kw_d = {dr8(w[4*kidx+3]), dr8(w[4*kidx+2]), dr8(w[4*kidx+1]), dr8(w[4*kidx])};
  always @(posedge clk) if (kw_next) kidx <= kidx + 1;
  int t_first, t_last, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.depart && iterations == 0) t_first = cyc;
    if (dut.depart) t_last = cyc;
  end
  task automatic one(input int kl, input logic [7:0] pt[16], input logic [7:0] key[32]);
    logic [7:0] ref_ct[16], got[16];
    logic ok;
    nk = 4 + 2*kl;
    expand(key, nk, w);
    cipher(pt, key, nk, ref_ct);
    kidx = 0;
    @(negedge clk); keylen = keylen_e'(kl); start = 1;
    @(negedge clk); start = 0;
    fork
      for (int c = 0; c < 4; c++) begin
        in_d = {dr8(pt[4*c+3]), dr8(pt[4*c+2]), dr8(pt[4*c+1]), dr8(pt[4*c])};
        while (!in_ack) @(negedge clk);
        in_d = '0;
        while (in_ack) @(negedge clk);
      end
      for (int c = 0; c < 4; c++) begin
        while (out_d == '0) @(negedge clk);
        for (int r = 0; r < 4; r++) got[4*c+r] = undr8(out_d[r], ok);
        repeat ($urandom_range(0, 4)) @(negedge clk);
        out_ack = 1;
        while (out_d != '0) @(negedge clk);
        out_ack = 0;
      end
    join
    while (busy) @(negedge clk);
    check(got == ref_ct, $sformatf("key %0d bits ciphertext", 128 + 64*kl));
    check(iterations == 6'(4*(nk+6)), $sformatf("iterations %0d", iterations));
    check(kidx == 4*(nk+7), $sformatf("key words consumed %0d", kidx));
    // Rounds 1..Nr-1 run without stall: 4*(Nr-1) departures 2 clocks apart.
    check(t_last - t_first >= 2*(4*(nk+6)-1) && t_last - t_first <= 2*(4*(nk+6)-1) + 20,
          $sformatf("loop took %0d clocks", t_last - t_first));
  endtask
  initial begin
    logic [7:0] pt[16], key[32];
    start = 0; in_d = '0; out_ack = 0; keylen = KEY128; kidx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) pt[i] = 8'(i * 8'h11);
    for (int i = 0; i < 32; i++) key[i] = 8'(i);
    one(0, pt, key);
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < 16; i++) pt[i] = 8'($urandom);
      for (int i = 0; i < 32; i++) key[i] = 8'($urandom);
      one(t % 3, pt, key);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
