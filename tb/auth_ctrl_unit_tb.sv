// Self-checking testbench of auth_ctrl_unit: CAM lookup by IP ID, and the
// comparison logic accepting responses within MAX_HD masked bit flips and
// rejecting those beyond, with unmasked bits ignored.
module auth_ctrl_unit_tb;
  import treehouse_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, wr_en = 1'b0;
  logic [2:0] wr_idx = '0;
  acu_entry_t wr_entry = '0, entry;
  logic [7:0] lookup_id = '0;
  logic hit, cmp_match;
  logic [127:0] a = '0, b = '0, mask = '1;
  acu_entry_t ref_tab [8];
  int checks = 0, failures = 0;
  auth_ctrl_unit dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_entry, .lookup_id, .hit, .entry,
                      .cmp_a(a), .cmp_b(b), .cmp_mask(mask), .cmp_match);
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic logic [127:0] r128(); return {$urandom, $urandom, $urandom, $urandom}; endfunction
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int s = 0; s < 8; s++) begin
      acu_entry_t e;
      e.valid = 1'b1; e.id = 8'(s * 5 + 1); e.sa_chal = $urandom; e.sa_golden = r128();
      e.sa_mask = r128(); e.hsc_chal = $urandom; e.hsc_golden = $urandom;
      ref_tab[s] = e;
      @(negedge clk); wr_en = 1'b1; wr_idx = 3'(s); wr_entry = e;
    end
    @(negedge clk); wr_en = 1'b0;
    for (int s = 0; s < 8; s++) begin
      lookup_id = 8'(s * 5 + 1); #1 chk(hit && entry == ref_tab[s], "lookup by ID");
    end
    lookup_id = 8'd3; #1 chk(!hit, "unknown ID misses");
    // Hamming-distance tolerance.
    for (int t = 0; t < 200; t++) begin
      int nflip;
      logic [127:0] f;
      nflip = (t < 2) ? 8 + t : $urandom_range(16);   // the boundary first
      f = '0;
      a = r128(); mask = '1;
      while ($countones(f) < nflip) f[$urandom_range(127)] = 1'b1;
      b = a ^ f;
      #1 chk(cmp_match == (nflip <= 8), $sformatf("%0d flipped bits", nflip));
    end
    // Masked-off bits never count.
    a = r128(); mask = {64'd0, {64{1'b1}}}; b = a ^ {64'hFFFF_FFFF_FFFF_FFFF, 64'h3};
    #1 chk(cmp_match, "unmasked differences ignored");
    b = a ^ {64'd0, 64'h1FF};
    #1 chk(!cmp_match, "nine masked differences rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
