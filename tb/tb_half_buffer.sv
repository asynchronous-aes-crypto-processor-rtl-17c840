// tb_half_buffer: passes 100 random dual-rail tokens through a 32-bit
// half-buffer. The testbench is the four-phase sender on the input side and
// a receiver on the output side that delays its acknowledge by a random
// number of clocks. It checks that tokens arrive complete and in order,
// that the output returns to the spacer between tokens, that a token is
// held while it is not acknowledged, and that the input acknowledge follows
// the output completion.
module tb_half_buffer;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_t [31:0] in_d, out_d;
  logic       in_ack, out_ack;
  logic [31:0] sent_q[$];
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
  half_buffer #(.W(32)) dut (.*);
  // Sender.
  initial begin
    in_d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      logic [31:0] v;
      v = $urandom;
      @(negedge clk);
      in_d = dr32(v);
      sent_q.push_back(v);
      while (!in_ack) @(negedge clk);
      in_d = '0;
      while (in_ack) @(negedge clk);
    end
  end
  // Receiver.
  initial begin
    logic [31:0] exp_v, got;
    int n = 0, held = 0;
    out_ack = 0;
    @(posedge rst_n);
    while (n < 100) begin
      @(negedge clk);
      if (out_d != '0 && !out_ack) begin
        logic ok0, ok1, ok2, ok3;
        got = {undr8(out_d[31:24], ok3), undr8(out_d[23:16], ok2), undr8(out_d[15:8], ok1), undr8(out_d[7:0], ok0)};
        if (ok0 && ok1 && ok2 && ok3) begin
          exp_v = sent_q.pop_front();
          check(got == exp_v, $sformatf("token %0d got %h expected %h", n, got, exp_v));
          repeat ($urandom_range(0, 3)) begin
            @(negedge clk);
            if (out_d == dr32(exp_v)) held++;
          end
          out_ack = 1;
          while (out_d != '0) @(negedge clk);
          out_ack = 0;
          n++;
        end
      end
    end
    check(held > 0, "token held while not acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
