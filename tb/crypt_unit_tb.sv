// Self-checking testbench of crypt_unit: decrypts words encrypted with the
// reference keystream, round-trips, shows that the address tweak changes the
// ciphertext, and checks the one-cycle latency.
module crypt_unit_tb;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, iv = 1'b0, ov;
  logic [63:0] key = '0;
  logic [31:0] tweak = '0, din = '0, dout;
  int checks = 0, failures = 0;
  crypt_unit dut (.clk, .rst_n, .in_valid(iv), .key, .tweak, .din, .out_valid(ov), .dout);
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [31:0] pt, c1;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      pt = $urandom; key = {$urandom, $urandom}; tweak = $urandom;
      @(negedge clk); iv = 1'b1; din = pt ^ ref_ks(key, tweak);
      @(posedge clk); #1 chk(ov && dout == pt, "decrypts reference ciphertext in one cycle");
      @(negedge clk); din = pt;
      @(posedge clk); #1 c1 = dout; chk(c1 == (pt ^ ref_ks(key, tweak)), "encrypt direction");
      @(negedge clk); tweak = tweak + 1;
      @(posedge clk); #1 chk(dout != c1, "next address encrypts differently");
      @(negedge clk); iv = 1'b0;
      @(posedge clk); #1 chk(!ov, "no valid without input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
