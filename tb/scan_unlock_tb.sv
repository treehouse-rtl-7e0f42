// Self-checking testbench of scan_unlock: scan-out stays zero under wrong,
// partial and disabled key sequences and opens exactly one cycle after the
// sixteenth correct key; the count tracks correct keys.
module scan_unlock_tb;
  import tb_ref_pkg::*;
  localparam logic [63:0] SEED = 64'hFACE_B00C_0000_0042;
  logic clk = 1'b0, rst_n = 1'b1, enable = 1'b0, key_valid = 1'b0;
  logic [31:0] key = '0;
  logic [15:0] chain_so = '0, scan_out;
  logic unlocked; logic [4:0] count;
  int checks = 0, failures = 0;

  scan_unlock #(.LOCK_SEED(SEED)) dut (.clk, .rst_n, .enable, .key_valid, .key, .chain_so, .scan_out, .unlocked, .count);
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero
  always @(negedge clk) chain_so <= 16'($urandom);

  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic put(input logic [31:0] k);
    @(negedge clk); key_valid = 1'b1; key = k;
    @(negedge clk); key_valid = 1'b0;
  endtask
  function automatic logic [31:0] good(int i); return ref_key_word(SEED, i, 1, 0); endfunction

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    // Correct keys while the operation is not enabled are ignored.
    for (int i = 0; i < 16; i++) put(good(i));
    chk(!unlocked && count == 0, "keys ignored when not enabled");
    enable = 1'b1;
    // "0xbad1dea" and other wrong keys keep everything locked.
    put(32'h0bad1dea);
    chk(count == 0 && scan_out == 0, "wrong key keeps scan-out at zero");
    // 15 of 16 correct keys: still locked.
    for (int i = 0; i < 15; i++) put(good(i));
    chk(count == 15 && !unlocked, "15 keys leave the scan ports locked");
    repeat (4) begin @(negedge clk); chk(scan_out == 16'd0, "scan-out gated while locked"); end
    // A wrong 16th key resets the counter.
    put(good(15) ^ 32'h1);
    chk(count == 0 && !unlocked, "wrong key resets the counter");
    // Out-of-order keys do not count.
    put(good(1));
    chk(count == 0, "out-of-order key not counted");
    for (int i = 0; i < 15; i++) put(good(i));
    @(negedge clk); key_valid = 1'b1; key = good(15);
    #1 chk(!unlocked, "not open before the clock edge");
    @(posedge clk); #1 chk(unlocked && count == 16, "opens one cycle after the last key");
    @(negedge clk); key_valid = 1'b0;
    repeat (8) begin @(posedge clk); #1 chk(scan_out == chain_so, "scan-out follows the chains once open"); end
    // Stays open when the operation ends, and through further keys.
    enable = 1'b0; put(32'h0);
    chk(unlocked, "stays open after the operation ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
