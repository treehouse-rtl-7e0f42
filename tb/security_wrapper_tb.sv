// Self-checking testbench of security_wrapper, driven through its register
// port the way the design house drives a layer during pre-bond testing:
// mode decode, the rejected key write of an unenabled operation, scan unlock
// and scan-out gating, scan authentication, functional unlock with 60-bit
// keys sent as two 32-bit chunks, watermark, read rules and test mode, and a
// brute-force run of random mode vectors each followed by a scan key write. A
// second instance checks the IP PUF port.
module security_wrapper_tb;
  import treehouse_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned SEQ = 12;
  localparam logic [63:0] MS = 64'h1111_2222_3333_4444, SS = 64'h5555_6666_7777_8888,
                          FS = 64'h9999_AAAA_BBBB_CCCC, WS = 64'hDDDD_EEEE_FFFF_0000;
  logic clk = 1'b0, rst_n = 1'b1, tmr = 1'b0, wrstn = 1'b0, wr_en = 1'b0;
  logic [4:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data, rd2;
  wmode_e wmode, wmode2;
  logic [15:0] chain_so = '0, scan_out, scan_out2, cap_bits;
  logic sh, la, cr, cv, pcv, pcv2;
  logic [2:0] ps;
  logic [31:0] func_in = '0, func_out, func_out2, pch, pch2;
  int unsigned launches, shift_errors, expect_shift = 3;
  int checks = 0, failures = 0;

  security_wrapper #(.SEQ_LEN(SEQ), .MEV_SEED(MS), .SUL_SEED(SS), .SA_CHAIN_LEN(64), .HAS_FLOCK(1'b1),
    .FK_N(5), .FK_W(60), .FL_SEED(FS), .HAS_WM(1'b1), .WM_SEED(WS), .HAS_PUF(1'b0)) dut (
    .clk, .rst_n, .tree_mode_reset(tmr), .wrstn, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data, .wmode,
    .chain_so, .scan_out, .sa_shift_en(sh), .sa_launch(la), .sa_phase_sel(ps), .sa_cap_req(cr),
    .sa_cap_valid(cv), .sa_cap_bits(cap_bits), .func_in, .func_out,
    .puf_chal_valid(pcv), .puf_chal(pch), .puf_resp(32'h0));

  // PUF-carrying variant without functional lock or watermark.
  security_wrapper #(.SEQ_LEN(SEQ), .MEV_SEED(MS), .SUL_SEED(SS), .SA_CHAIN_LEN(64), .HAS_FLOCK(1'b0),
    .HAS_WM(1'b0), .HAS_PUF(1'b1)) dut2 (
    .clk, .rst_n, .tree_mode_reset(tmr), .wrstn, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data(rd2),
    .wmode(wmode2), .chain_so, .scan_out(scan_out2), .sa_shift_en(), .sa_launch(), .sa_phase_sel(),
    .sa_cap_req(), .sa_cap_valid(1'b0), .sa_cap_bits(16'h0), .func_in, .func_out(func_out2),
    .puf_chal_valid(pcv2), .puf_chal(pch2), .puf_resp(~pch2));

  scanpuf_delay_model #(.CHIP_SEED(64'h0000_1111_2222_3333)) chip (
    .clk, .shift_en(sh), .launch(la), .phase_sel(ps), .cap_req(cr), .expect_shift, .cap_valid(cv),
    .cap_bits, .launches, .shift_errors);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero
  always @(negedge clk) chain_so <= 16'($urandom) | 16'h1;

  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); wr_en = 1'b1; wr_addr = 5'(a); wr_data = d;
    @(negedge clk); wr_en = 1'b0;
  endtask
  logic [31:0] rv;
  task automatic rdt(input int a);
    rd_addr = 5'(a); #1 rv = rd_data;
  endtask
  task automatic mevs(input int o);
    for (int s = 0; s < SEQ; s++) wr(REG_MODE, 32'(ref_mev(MS, o, s)));
  endtask

  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [127:0] sig, ideal;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    {tmr, wrstn} = 2'b01; #1;
    rdt(REG_MODE);
    chk(wmode == WM_TEST && rv == 32'h10, "test mode in Mode Register");
    rdt(REG_SUL_STS);
    chk(rv == 0, "status hidden outside TREE mode");
    {tmr, wrstn} = 2'b10;
    // Fig. 10(a): the key is not written without the scan unlock mode.
    for (int i = 0; i < 16; i++) wr(REG_SUL_DATA, ref_key_word(SS, i, 1, 0));
    rdt(REG_SUL_STS);
    chk(rv == 0, "key writes rejected without the operation enabled");
    // Brute force: random Mode Enable Vectors, each followed by a key write.
    for (int i = 0; i < 2000; i++) begin
      wr(REG_MODE, $urandom);
      wr(REG_SUL_DATA, (i % 2 == 0) ? 32'h0BAD_1DEA : ref_key_word(SS, 0, 1, 0));
    end
    rdt(REG_SUL_STS);
    chk(rv == 0, "random mode vectors never open the scan key register");
    rdt(REG_MODE);
    chk(rv[1:0] == 2'b00, "KL_CTL/KL_STS stay clear under random vectors");
    mevs(1);   // scan authentication enabled, not scan unlock
    for (int i = 0; i < 16; i++) wr(REG_SUL_DATA, ref_key_word(SS, i, 1, 0));
    rdt(REG_SUL_STS);
    chk(rv == 0, "key writes rejected in another operation");
    wr(REG_WM_CHAL, 32'h0000_BEEF);
    wr(REG_PUF_CHAL, 32'h55);
    @(negedge clk);
    rdt(REG_WM_RESP);
    chk(rv == 0, "watermark challenge rejected in another operation");
    chk(pcv2 == 1'b0 && pch2 == 32'h0, "PUF challenge rejected in another operation");
    mevs(3);   // HSC authentication enabled: the scan signature must not start
    wr(REG_SA_CHAL, 32'd3);
    rdt(REG_SA_STS);
    chk(rv == 0 && launches == 0, "scan-auth challenge rejected in another operation");
    // Fig. 10(b): scan unlock mode, then the keys.
    mevs(0);
    rdt(REG_MODE);
    chk(rv == 32'h23, "Mode Register: TREE, scan unlock, KL_CTL=KL_STS=1");
    @(negedge clk); chk(scan_out == 0, "scan-out gated before unlock");
    for (int i = 0; i < 16; i++) wr(REG_SUL_DATA, ref_key_word(SS, i, 1, 0));
    rdt(REG_SUL_STS);
    chk(rv == {1'b1, 26'd0, 5'd16}, "scan unlocked after 16 keys");
    @(negedge clk); #1 chk(scan_out == chain_so && scan_out != 0, "scan-out open");
    rdt(REG_SUL_DATA);
    chk(rv == 0, "key register reads as zero");
    // Scan authentication.
    mevs(1);
    wr(REG_SA_CHAL, 32'd3);
    rdt(REG_SA_STS);
    while (!rv[1]) begin @(negedge clk); rdt(REG_SA_STS); end
    for (int w = 0; w < 4; w++) begin rdt(REG_SA_SIG0 + w); sig[32*w +: 32] = rv; end
    for (int p = 0; p < 16; p++) for (int k = 0; k < 8; k++) ideal[p*8 + k] = chip.ideal_bit(p, k, 3);
    chk(sig == ideal, "128-bit signature through the register file");
    chk(shift_errors == 0 && launches == 256, "256 trials with the challenge shift");
    // Functional unlock: 5 keys of 60 bits, two chunks each.
    func_in = 32'hA5A5_0F0F; #1 chk(func_out != func_in, "functional output locked");
    mevs(2);
    for (int i = 0; i < 5; i++) begin
      wr(REG_FUL_DATA, ref_key_word(FS, i, 1, 0));
      wr(REG_FUL_DATA, ref_key_word(FS, i, 1, 1));
    end
    @(negedge clk);
    rdt(REG_FUL_STS);
    chk(rv == {1'b1, 15'd0, 16'd5}, "functional lock opened");
    chk(func_out == func_in, "functional output correct");
    // Watermark.
    mevs(3);
    wr(REG_WM_CHAL, 32'h0000_BEEF);
    begin
      logic [63:0] z = ref_mix(WS, 32'h0000_BEEF);
      rdt(REG_WM_RESP);
      chk(rv == z[31:0], "watermark response");
    end
    chk(pcv2 == 1'b0, "no PUF challenge without its chain in the PUF wrapper");
    // General registers: written and read only while an operation is enabled.
    wr(20, 32'h1234_ABCD);
    rdt(20);
    chk(rv == 32'h1234_ABCD, "HSM buffer register");
    // The PUF variant: its FSM saw the same MEVs (same seed), so op 3 is enabled there too.
    rd_addr = 5'(REG_PUF_CHAL);
    @(negedge clk); wr_en = 1'b1; wr_addr = 5'(REG_PUF_CHAL); wr_data = 32'h77;
    @(posedge clk); #1 chk(pcv2 && pch2 == 32'h77, "PUF challenge driven one cycle after the write");
    @(negedge clk); wr_en = 1'b0;
    rd_addr = 5'(REG_PUF_RESP); #1 chk(rd2 == ~32'h77, "PUF response readable");
    // Test mode: operation dropped, unlocks kept.
    {tmr, wrstn} = 2'b01;
    @(negedge clk);
    rdt(REG_MODE);
    chk(rv == 32'h10, "test mode, no operation");
    chk(func_out == func_in && scan_out == chain_so, "unlocks kept in test mode");
    wr(REG_MODE, 32'(ref_mev(MS, 0, 0)));
    rdt(REG_MODE);
    chk(rv == 32'h10, "MEVs ignored in test mode");
    {tmr, wrstn} = 2'b11; #1 chk(wmode == WM_ATSPEED, "at-speed test mode");
    {tmr, wrstn} = 2'b00; #1 chk(wmode == WM_FUNCTIONAL, "functional mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
