// Self-checking testbench of hsm_memory at its full 128 KB: random writes
// across the whole address range, read back with one-cycle latency against a
// scoreboard, and a read during a write cycle leaves rdata unchanged.
module hsm_memory_tb;
  logic clk = 1'b0, we = 1'b0;
  logic [14:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] sb [int];
  int checks = 0, failures = 0;
  hsm_memory dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int a[$];
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk); we = 1'b1; addr = 15'($urandom); wdata = $urandom;
      sb[int'(addr)] = wdata;
    end
    // First and last word too.
    @(negedge clk); addr = 15'd0; wdata = 32'hCAFE0000; sb[0] = wdata;
    @(negedge clk); addr = 15'h7FFF; wdata = 32'hCAFE7FFF; sb[32767] = wdata;
    @(negedge clk); we = 1'b0;
    foreach (sb[k]) a.push_back(k);
    a.shuffle();
    foreach (a[i]) begin
      @(negedge clk); addr = 15'(a[i]);
      @(posedge clk); #1 chk(rdata == sb[a[i]], $sformatf("read back word %0d", a[i]));
    end
    // rdata holds during a write.
    @(negedge clk); addr = 15'd0;
    @(posedge clk); #1;
    @(negedge clk); we = 1'b1; addr = 15'd5; wdata = 32'h1;
    @(posedge clk); #1 chk(rdata == 32'hCAFE0000, "rdata held during a write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
