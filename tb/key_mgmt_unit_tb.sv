// Self-checking testbench of key_mgmt_unit: entries written by slot are
// found by IP ID, unknown or invalidated IDs miss, rewriting a slot replaces
// its entry, and duplicate IDs return the lowest slot.
module key_mgmt_unit_tb;
  import treehouse_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, wr_en = 1'b0;
  logic [2:0] wr_idx = '0;
  kmu_entry_t wr_entry = '0, entry;
  logic [7:0] lookup_id = '0;
  logic hit;
  kmu_entry_t ref_tab [8];
  int checks = 0, failures = 0;
  key_mgmt_unit dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_entry, .lookup_id, .hit, .entry);
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input int s, input kmu_entry_t e);
    @(negedge clk); wr_en = 1'b1; wr_idx = 3'(s); wr_entry = e; ref_tab[s] = e;
    @(negedge clk); wr_en = 1'b0;
  endtask
  function automatic kmu_entry_t mk(int id, bit v);
    kmu_entry_t e;
    e = kmu_entry_t'({$urandom, $urandom});
    e.valid = v; e.id = 8'(id);
    return e;
  endfunction
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int id = 0; id < 256; id += 17) begin lookup_id = 8'(id); #1 chk(!hit, "empty table misses"); end
    for (int s = 0; s < 8; s++) wr(s, mk(10 + 3 * s, 1'b1));
    for (int s = 0; s < 8; s++) begin
      lookup_id = 8'(10 + 3 * s); #1 chk(hit && entry == ref_tab[s], $sformatf("lookup of slot %0d", s));
    end
    lookup_id = 8'd11; #1 chk(!hit, "unknown ID misses");
    wr(4, mk(22, 1'b0));
    lookup_id = 8'd22; #1 chk(!hit, "invalidated entry misses");
    wr(4, mk(200, 1'b1));
    lookup_id = 8'd200; #1 chk(hit && entry == ref_tab[4], "rewritten slot");
    wr(6, mk(13, 1'b1));
    lookup_id = 8'd13; #1 chk(hit && entry == ref_tab[1], "duplicate ID returns the lowest slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
