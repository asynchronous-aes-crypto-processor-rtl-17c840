// tb_fonc_inv_map: checks the GF((2^4)^2) -> GF(2^8) map: it is one-to-one,
// maps 1 to 1, and turns composite-field products into AES products for
// random operand pairs.
module tb_fonc_inv_map;
  import aes_async_pkg::*;
  import aes_ref_pkg::*;
  dr_nib_t  ah, al;
  dr_byte_t a;
  fonc_inv_map dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic inv_of(input logic [7:0] x, output logic [7:0] r);
    logic ok;
    {ah, al} = dr8(x); #1;
    r = undr8(a, ok);
    if (!ok) failures++;
  endtask
  initial begin
    logic [7:0] img[256]; logic seen[256];
    for (int x = 0; x < 256; x++) seen[x] = 0;
    for (int x = 0; x < 256; x++) begin inv_of(8'(x), img[x]); seen[img[x]] = 1; end
    for (int x = 0; x < 256; x++) check(seen[x], $sformatf("%h not reached", x));
    check(img[1] == 8'h01, "inv_map(1) = 1");
    for (int t = 0; t < 300; t++) begin
      logic [7:0] p, q;
      p = 8'($urandom); q = 8'($urandom);
      check(img[cmul(p, q)] == gmul(img[p], img[q]), $sformatf("product %h*%h", p, q));
    end
    {ah, al} = '0; #1; check(a == '0, "spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
