// tb_aes_top: end-to-end test of the crypto-processor through its host
// register bus. It ciphers the three FIPS-197 appendix C examples (128, 192
// and 256-bit keys) and random blocks with random keys of every length,
// compares the ciphertext read back from the register file with a
// behavioural AES model, checks the loop iteration count (4*Nr) and
// reports the ciphering time in clocks from the start write to the flag.
// It also checks, during the run, that the S-box inputs and outputs carry
// complete code words of constant weight in every evaluate phase and all
// spacers in every return-to-zero phase, and counts the mechanisms of the
// design: each key length, the row-3 ShiftRows bypass, the key-schedule
// SubWord-only step of 256-bit keys and Rcon steps. Finally it counts the
// rail transitions of the cipher and key data paths (S-box inputs/outputs,
// one 1-of-16 node, ShiftRows, MixColumns, AddRoundKey, key S-boxes and key
// sum) over each block: for a given key length the count must be the same
// for every plaintext and key, which is the balance property the design is
// built for.
module tb_aes_top;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [5:0]  addr;
  logic        wr;
  logic [15:0] wdata, rdata;
  logic        busy, io_busy, done_flag;
  logic [5:0]  iterations;
  int          checks = 0, failures = 0;
  int          n_kl[3] = '{0, 0, 0};
  int          n_bypass = 0, n_subword = 0, n_rcon = 0, n_rtz = 0, n_eval = 0;
  // Rail transitions in the cipher and key data paths during one block.
  longint      toggles = 0;
  longint      toggles_ref[3] = '{-1, -1, -1};
  dr_word_t    p_sb, p_mc, p_ark, p_sr, p_ksb, p_knew;
  logic [15:0] p_d0;

  aes_top u_top (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Four-phase and balance observation on the cipher data path.
  always @(posedge clk) begin
    if (u_top.u_core.busy) begin
      if (!u_top.u_core.eval) begin
        n_rtz++;
        if (u_top.u_core.sb_out != '0 || u_top.u_core.mc_out != '0) begin
          failures++;
          $display("data path not at spacer in return-to-zero phase");
        end
      end else if (u_top.u_core.col_vld) begin
        n_eval++;
        if (dr_word_weight(u_top.u_core.sb_in) != 32 || dr_word_weight(u_top.u_core.sb_out) != 32
            || !dr_word_valid(u_top.u_core.sb_out)) begin
          failures++;
          $display("S-box code words not complete / not constant weight");
        end
      end
      if (u_top.u_core.depart && u_top.u_core.g_lane[3].u_ci.byp) n_bypass++;
      toggles += $countones(u_top.u_core.sb_out ^ p_sb) + $countones(u_top.u_core.mc_out ^ p_mc)
               + $countones(u_top.u_core.ark_out ^ p_ark) + $countones(u_top.u_core.sr_g ^ p_sr)
               + $countones(u_top.u_key.sw ^ p_ksb) + $countones(u_top.u_key.new_w ^ p_knew)
               + $countones(u_top.u_core.g_lane[0].u_sb.d ^ p_d0);
    end
    p_sb  = u_top.u_core.sb_out;  p_mc   = u_top.u_core.mc_out; p_ark = u_top.u_core.ark_out;
    p_sr  = u_top.u_core.sr_g;    p_ksb  = u_top.u_key.sw;      p_knew = u_top.u_key.new_w;
    p_d0  = u_top.u_core.g_lane[0].u_sb.d;
    if (u_top.u_key.kw_next && u_top.u_key.full) begin
      if (u_top.u_key.jm == 0) n_rcon++;
      if (u_top.u_key.nk == 8 && u_top.u_key.jm == 4) n_subword++;
    end
  end

  task automatic bus_write(input int a, input logic [15:0] d);
    @(negedge clk);
    addr = 6'(a); wdata = d; wr = 1;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic bus_read(input int a, output logic [15:0] d);
    @(negedge clk);
    addr = 6'(a); wr = 0;
    #1 d = rdata;
  endtask

  task automatic run(input logic [7:0] pt[16], input logic [7:0] key[32], input int kl,
                     input logic has_expect, input logic [7:0] expect_ct[16]);
    logic [7:0] ref_ct[16], got[16];
    logic [15:0] d;
    int nk, cycles;
    nk = 4 + 2*kl;
    cipher(pt, key, nk, ref_ct);
    if (has_expect) begin
      checks++;
      if (ref_ct != expect_ct) begin failures++; $display("reference model disagrees with FIPS-197"); end
    end
    for (int r = 0; r < 8; r++)  bus_write(1 + r, {pt[2*r+1], pt[2*r]});
    for (int r = 0; r < 16; r++) bus_write(9 + r, {key[2*r+1], key[2*r]});
    bus_write(0, 16'(kl) | 16'h4);
    cycles = 0;
    toggles = 0;
    // The flag from the previous block is cleared by the start pulse.
    while (done_flag) begin @(posedge clk); cycles++; end
    while (!done_flag) begin @(posedge clk); cycles++; end
    bus_read(0, d);
    checks++;
    if (d[3] !== 1'b1 || d[1:0] !== 2'(kl)) begin failures++; $display("mode register readback %h", d); end
    for (int r = 0; r < 8; r++) begin
      bus_read(25 + r, d);
      got[2*r] = d[7:0]; got[2*r+1] = d[15:8];
    end
    checks++;
    if (got != ref_ct) begin
      failures++;
      $display("key %0d bits: ciphertext mismatch", 128 + 64*kl);
      for (int i = 0; i < 16; i++) $display("  byte %0d got %h expected %h", i, got[i], ref_ct[i]);
    end
    checks++;
    if (iterations != 6'(4*(nk+6))) begin
      failures++; $display("iterations %0d, expected %0d", iterations, 4*(nk+6));
    end
    n_kl[kl]++;
    // Balance: the number of rail transitions of a block must not depend on
    // the plaintext or the key, only on the key length.
    checks++;
    if (toggles_ref[kl] < 0) toggles_ref[kl] = toggles;
    else if (toggles != toggles_ref[kl]) begin
      failures++;
      $display("key %0d bits: %0d rail transitions, first block had %0d", 128 + 64*kl, toggles, toggles_ref[kl]);
    end
    $display("key %0d bits: %0d clocks from start to flag, %0d loop iterations, %0d rail transitions",
             128 + 64*kl, cycles, iterations, toggles);
  endtask

  initial begin
    logic [7:0] pt[16], key[32], ct[16];
    logic [127:0] fips_ct[3];
    int n_random;
    fips_ct[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    fips_ct[1] = 128'hdda97ca4864cdfe06eaf70a0ec0d7191;
    fips_ct[2] = 128'h8ea2b7ca516745bfeafc49904b496089;
    addr = 0; wr = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int kl = 0; kl < 3; kl++) begin
      for (int i = 0; i < 16; i++) pt[i] = 8'(i * 8'h11);
      for (int i = 0; i < 32; i++) key[i] = (i < 16 + 8*kl) ? 8'(i) : 8'h00;
      for (int i = 0; i < 16; i++) ct[i] = fips_ct[kl][127 - 8*i -: 8];
      run(pt, key, kl, 1'b1, ct);
    end
    if (!$value$plusargs("RANDOM=%d", n_random)) n_random = 30;
    for (int t = 0; t < n_random; t++) begin
      for (int i = 0; i < 16; i++) pt[i] = 8'($urandom);
      for (int i = 0; i < 32; i++) key[i] = 8'($urandom);
      run(pt, key, t % 3, 1'b0, ct);
    end
    // Every mechanism must have happened.
    checks++;
    if (n_kl[0] == 0 || n_kl[1] == 0 || n_kl[2] == 0) begin failures++; $display("a key length never ran"); end
    checks++;
    if (n_bypass == 0) begin failures++; $display("ShiftRows bypass never happened"); end
    checks++;
    if (n_subword == 0) begin failures++; $display("SubWord-only key step never happened"); end
    checks++;
    if (n_rcon == 0 || n_rtz == 0 || n_eval == 0) begin failures++; $display("Rcon / phases never seen"); end
    $display("mechanisms: 128=%0d 192=%0d 256=%0d bypass=%0d subword=%0d rcon=%0d rtz=%0d eval=%0d",
             n_kl[0], n_kl[1], n_kl[2], n_bypass, n_subword, n_rcon, n_rtz, n_eval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
