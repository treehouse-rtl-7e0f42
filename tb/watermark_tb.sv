// Self-checking testbench of watermark: responses to random challenges
// against the reference mixing function, one-cycle latency, hold between
// challenges.
module watermark_tb;
  import tb_ref_pkg::*;
  localparam logic [63:0] SEC = 64'hAAAA_5555_1234_4321;
  logic clk = 1'b0, rst_n = 1'b1, cv = 1'b0;
  logic [31:0] ch = '0, resp; logic rv;
  int checks = 0, failures = 0;
  watermark #(.WM_SECRET(SEC)) dut (.clk, .rst_n, .chal_valid(cv), .challenge(ch), .resp_valid(rv), .response(resp));
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [63:0] z;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); cv = 1'b1; ch = $urandom;
      @(posedge clk); #1;
      z = ref_mix(SEC, ch);
      chk(rv && resp == z[31:0], "response one cycle after the challenge");
      @(negedge clk); cv = 1'b0; ch = $urandom;
      @(posedge clk); #1 chk(!rv && resp == z[31:0], "response held, no valid without a challenge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
