// tb_c_element: drives a three-input C-element through random input
// patterns and compares its output, one clock later, with a model of the
// rendezvous rule (rise when all high, fall when all low, else hold).
module tb_c_element;
  logic [2:0] in;
  logic       out;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  c_element #(.N(3)) dut (.*);
  initial begin
    logic model;
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    check(out == 1'b0, "reset value");
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in = (t % 5 == 0) ? 3'b111 : (t % 7 == 0) ? 3'b000 : 3'($urandom);
      if (&in) model = 1; else if (~|in) model = 0;
      @(posedge clk); #1;
      check(out == model, $sformatf("in %b out %b expected %b", in, out, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
