// tb_shiftrows_ci: the four ShiftRows blocks C0..C3 fed with a stream of
// states, one column per step, and driven like the cipher does: a
// departure when all four have their byte, an arrival when all four have
// room. The output columns of each state must be the ShiftRows of its input
// columns, and in steady state one column must leave per step (a round
// every four steps).
module tb_shiftrows_ci;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  localparam int NSTATES = 12;
  logic       clear, in_valid, arrive, depart;
  dr_word_t   in_col, out_col;
  logic [3:0] rdy_nodep, rdy_dep, out_valid;
  logic [7:0] st [NSTATES][16];
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
  for (genvar r = 0; r < 4; r++) begin : g_ci
    shiftrows_ci #(.ROW(r)) dut (
      .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid), .in_byte(in_col[r]),
      .ready_nodep(rdy_nodep[r]), .ready_dep(rdy_dep[r]), .arrive(arrive),
      .out_valid(out_valid[r]), .out_byte(out_col[r]), .depart(depart));
  end
  int na = 0, nd = 0, first_dep = -1, last_dep = 0, step = 0;
  always_comb begin
    in_valid = (na < 4*NSTATES);
    in_col   = '0;
    if (in_valid)
      for (int r = 0; r < 4; r++) in_col[r] = dr8(st[na/4][4*(na%4)+r]);
    depart = (&out_valid);
    arrive = in_valid && (depart ? (&rdy_dep) : (&rdy_nodep));
  end
  always @(posedge clk) if (rst_n && !clear) begin
    step++;
    if (depart) begin
      logic ok;
      for (int r = 0; r < 4; r++)
        check(undr8(out_col[r], ok) == st[nd/4][4*(((nd%4)+r)%4)+r] && ok,
              $sformatf("state %0d column %0d row %0d", nd/4, nd%4, r));
      if (first_dep < 0) first_dep = step;
      last_dep = step;
      nd <= nd + 1;
    end
    if (arrive) na <= na + 1;
  end
  initial begin
    for (int s = 0; s < NSTATES; s++) for (int i = 0; i < 16; i++) st[s][i] = 8'($urandom);
    clear = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 0;
    while (nd < 4*NSTATES) @(posedge clk);
    #1;
    check(first_dep == 4, $sformatf("first column leaves with the 4th arrival (step %0d)", first_dep));
    check(last_dep - first_dep == 4*NSTATES - 1, $sformatf("one column per step: %0d steps", last_dep - first_dep));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
