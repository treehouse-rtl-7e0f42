// Self-checking testbench of func_lock at the GPS size (66 patterns of 60
// bits) and, with parameters overridden, at a wide-key size (8 patterns of
// 352 bits, the AES key width): outputs corrupted until the full sequence,
// reset on a wrong pattern, one-cycle unlock latency.
module func_lock_tb;
  import tb_ref_pkg::*;
  localparam logic [63:0] SEED = 64'h0DD5_EED5_0000_1111;
  logic clk = 1'b0, rst_n = 1'b1, enable = 1'b0, kv = 1'b0;
  logic [59:0]  key = '0;
  logic [351:0] wkey = '0;
  logic kv2 = 1'b0;
  logic [31:0] func_in = '0, func_out, func_out2;
  logic unlocked, unlocked2; logic [6:0] step; logic [3:0] step2;
  int checks = 0, failures = 0;

  func_lock #(.N_KEYS(66), .KEY_W(60), .LOCK_SEED(SEED)) dut (
    .clk, .rst_n, .enable, .key_valid(kv), .key, .func_in, .func_out, .unlocked, .step);
  func_lock #(.N_KEYS(8), .KEY_W(352), .LOCK_SEED(~SEED)) dut2 (
    .clk, .rst_n, .enable, .key_valid(kv2), .key(wkey), .func_in, .func_out(func_out2),
    .unlocked(unlocked2), .step(step2));
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero

  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic logic [59:0] good(int i);
    return {ref_key_word(SEED, i, 1, 1), ref_key_word(SEED, i, 1, 0)} & 64'h0FFF_FFFF_FFFF_FFFF;
  endfunction
  function automatic logic [351:0] wgood(int i);
    logic [351:0] v;
    for (int w = 0; w < 11; w++) v[32*w +: 32] = ref_key_word(~SEED, i, 6, w);
    return v;
  endfunction
  task automatic put(input logic [59:0] k);
    @(negedge clk); kv = 1'b1; key = k; @(negedge clk); kv = 1'b0;
  endtask

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    func_in = 32'h1234_5678;
    @(negedge clk);
    chk(func_out != func_in, "outputs corrupted while locked");
    for (int i = 0; i < 66; i++) put(good(i));
    chk(!unlocked, "patterns ignored while not enabled");
    enable = 1'b1;
    for (int i = 0; i < 40; i++) put(good(i));
    chk(step == 40, "40 correct patterns counted");
    put(good(40) ^ 60'h800_0000_0000_0000);
    chk(step == 0 && !unlocked, "wrong pattern returns to the first state");
    for (int i = 0; i < 65; i++) put(good(i));
    chk(!unlocked && func_out != func_in, "65 of 66 patterns leave it locked");
    @(negedge clk); kv = 1'b1; key = good(65);
    @(posedge clk); #1 chk(unlocked, "unlocks one cycle after the 66th pattern");
    @(negedge clk); kv = 1'b0;
    for (int i = 0; i < 10; i++) begin
      func_in = $urandom; #1 chk(func_out == func_in, "outputs correct once unlocked");
      @(negedge clk);
    end
    // Wide keys.
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); kv2 = 1'b1; wkey = (i == 3) ? wgood(i) ^ (352'd1 << 351) : wgood(i);
    end
    @(negedge clk); kv2 = 1'b0;
    chk(!unlocked2 && func_out2 != func_in, "wide key with a wrong top bit stays locked");
    for (int i = 0; i < 8; i++) begin @(negedge clk); kv2 = 1'b1; wkey = wgood(i); end
    @(negedge clk); kv2 = 1'b0;
    chk(unlocked2 && func_out2 == func_in, "wide 352-bit key sequence unlocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
