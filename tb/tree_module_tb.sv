// Self-checking testbench of tree_module (and its policy controller) with one
// security wrapper (GPS-like: 6 functional keys of 60 bits, watermark) and a
// scan-path delay model. Each scenario starts from reset: a clean pass, then
// one failure at each protocol step (unknown IP, scan unlock keys, scan
// signature, functional keys, watermark, wrong layer key, out-of-range ID).
// Checks the failure code, the disabled layer and its mode, host writes
// ignored while busy, and the provisioning cycle count.
module tree_module_tb;
  import treehouse_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned SEQ = 12, FKN = 6, POS = 2;
  localparam logic [63:0] MS = 64'h0A0A_0B0B_0C0C_0D0D, SS = 64'h1A1A_1B1B_1C1C_1D1D,
                          FS = 64'h2A2A_2B2B_2C2C_2D2D, WS = 64'h3A3A_3B3B_3C3C_3D3D;
  localparam logic [63:0] DK = 64'hDEC0_DE00_1234_5678;
  logic clk = 1'b0, rst_n = 1'b1;
  logic host_mem_we = 1'b0, host_kmu_we = 1'b0, host_acu_we = 1'b0, prov_start = 1'b0;
  logic [14:0] host_mem_addr = '0;
  logic [31:0] host_mem_wdata = '0;
  logic [2:0] host_kmu_idx = '0, host_acu_idx = '0;
  kmu_entry_t host_kmu_entry = '0;
  acu_entry_t host_acu_entry = '0;
  logic [7:0] prov_id = '0;
  logic [63:0] prov_key = DK;
  logic prov_busy, prov_done, prov_pass;
  logic [3:0] prov_fail_step;
  logic [0:0] layer_disabled;
  logic [127:0] puf_r = 128'h1234, host_puf_resp, ideal;
  logic w_tmr [1], w_wrstn [1], w_wr_en [1];
  logic [4:0] w_wr_addr, w_rd_addr;
  logic [31:0] w_wr_data, w_rd_data [1];
  wmode_e wmode;
  logic [15:0] chain_so = 16'hFFFF, scan_out, cap_bits;
  logic sh, la, cr, cv, pcv;
  logic [2:0] ps;
  logic [31:0] func_in = 32'h0BAD_F00D, func_out, pch;
  int unsigned launches, shift_errors;
  int checks = 0, failures = 0;

  tree_module #(.N_IPS(1)) dut (
    .clk, .rst_n, .host_mem_we, .host_mem_addr, .host_mem_wdata, .host_kmu_we, .host_kmu_idx,
    .host_kmu_entry, .host_acu_we, .host_acu_idx, .host_acu_entry, .prov_start, .prov_id, .prov_key,
    .prov_busy, .prov_done, .prov_pass, .prov_fail_step, .layer_disabled, .tree_puf_resp(puf_r),
    .host_puf_resp, .w_tmr, .w_wrstn, .w_wr_en, .w_wr_addr, .w_wr_data, .w_rd_addr, .w_rd_data);

  security_wrapper #(.SEQ_LEN(SEQ), .MEV_SEED(MS), .SUL_SEED(SS), .SA_CHAIN_LEN(16), .HAS_FLOCK(1'b1),
    .FK_N(FKN), .FK_W(60), .FL_SEED(FS), .HAS_WM(1'b1), .WM_SEED(WS), .HAS_PUF(1'b0)) u_w (
    .clk, .rst_n, .tree_mode_reset(w_tmr[0]), .wrstn(w_wrstn[0]), .wr_en(w_wr_en[0]), .wr_addr(w_wr_addr),
    .wr_data(w_wr_data), .rd_addr(w_rd_addr), .rd_data(w_rd_data[0]), .wmode, .chain_so, .scan_out,
    .sa_shift_en(sh), .sa_launch(la), .sa_phase_sel(ps), .sa_cap_req(cr), .sa_cap_valid(cv),
    .sa_cap_bits(cap_bits), .func_in, .func_out, .puf_chal_valid(pcv), .puf_chal(pch), .puf_resp(32'h0));

  scanpuf_delay_model #(.CHIP_SEED(64'h5151_5151_0000_0001)) chip (
    .clk, .shift_en(sh), .launch(la), .phase_sel(ps), .cap_req(cr), .expect_shift(POS), .cap_valid(cv),
    .cap_bits, .launches, .shift_errors);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  typedef enum {C_NONE, C_NOKMU, C_SULKEY, C_GOLD, C_FKEY, C_WMGOLD} corrupt_e;

  function automatic logic [31:0] aenc(int k, logic [31:0] d);
    return d ^ ref_ks(DK, {8'hAC, 8'h00, 8'h00, 5'd0, 3'(k)});
  endfunction

  task automatic mw(input int a, input logic [31:0] d);
    @(negedge clk); host_mem_we = 1'b1; host_mem_addr = 15'(a); host_mem_wdata = d ^ ref_ks(DK, a);
  endtask

  task automatic setup(input corrupt_e c);
    kmu_entry_t k;
    acu_entry_t e;
    logic [63:0] z;
    int a = 100;
    rst_n = 1'b0; repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int o = 0; o < 4; o++) for (int s = 0; s < SEQ; s++) begin mw(a, 32'(ref_mev(MS, o, s))); a++; end
    for (int i = 0; i < 16; i++) begin
      mw(a, ref_key_word(SS, i, 1, 0) ^ ((c == C_SULKEY && i == 9) ? 32'h10 : 32'h0)); a++;
    end
    for (int i = 0; i < FKN; i++) for (int w = 0; w < 2; w++) begin
      mw(a, ref_key_word(FS, i, 1, w) ^ ((c == C_FKEY && i == 5 && w == 0) ? 32'h1 : 32'h0)); a++;
    end
    @(negedge clk); host_mem_we = 1'b0;
    k = '0; k.valid = 1'b1; k.id = (c == C_NOKMU) ? 8'd9 : 8'd0; k.base = 15'd100; k.n_ul_keys = 5'd16;
    k.n_fk_words = 16'(2 * FKN); k.seq_lock = 1'b1; k.has_wm = 1'b1;
    @(negedge clk); host_kmu_we = 1'b1; host_kmu_idx = 3'd2; host_kmu_entry = k;
    @(negedge clk); host_kmu_we = 1'b0;
    e = '0; e.valid = 1'b1; e.id = 8'd0; e.sa_mask = '1;
    e.sa_chal = aenc(0, POS);
    for (int w = 0; w < 4; w++) e.sa_golden[32*w +: 32] = aenc(1 + w, ideal[32*w +: 32] ^ ((c == C_GOLD) ? 32'h1FF : 32'h0));
    e.hsc_chal = aenc(5, 32'hC0DE);
    z = ref_mix(WS, 32'hC0DE);
    e.hsc_golden = aenc(6, z[31:0] ^ ((c == C_WMGOLD) ? 32'h8000_0000 : 32'h0));
    @(negedge clk); host_acu_we = 1'b1; host_acu_idx = 3'd5; host_acu_entry = e;
    @(negedge clk); host_acu_we = 1'b0;
  endtask

  task automatic provision(input logic [7:0] id, input logic [63:0] key, output int cycles);
    @(negedge clk); prov_start = 1'b1; prov_id = id; prov_key = key;
    @(negedge clk); prov_start = 1'b0;
    cycles = 1;
    while (!prov_done) begin
      // Host writes during a command must not reach the memory.
      host_mem_we = 1'b1; host_mem_addr = 15'(100 + cycles % 200); host_mem_wdata = 32'hBADBAD;
      @(negedge clk); cycles++;
    end
    host_mem_we = 1'b0;
  endtask

  task automatic expect_fail(input corrupt_e c, input logic [7:0] id, input logic [63:0] key,
                             input int code, input string what);
    int cyc;
    setup(c);
    provision(id, key, cyc);
    chk(!prov_pass && prov_fail_step == 4'(code), $sformatf("%s: fail code %0d (got %0d)", what, code, prov_fail_step));
    @(negedge clk);
    if (code != 7) chk(layer_disabled[0] && wmode == WM_FUNCTIONAL, {what, ": layer disabled, functional mode"});
    chk(func_out != func_in || c == C_WMGOLD, {what, ": IP still locked"});
  endtask

  initial begin #20_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int cyc, exp_cyc;
    for (int p = 0; p < 16; p++) for (int k = 0; k < 8; k++) ideal[p*8 + k] = chip.ideal_bit(p, k, POS);
    setup(C_NONE);
    chk(host_puf_resp == puf_r, "TREE fingerprint readable by the host");
    provision(8'd0, DK, cyc);
    chk(prov_pass && prov_fail_step == 0, "clean provisioning passes");
    @(negedge clk);
    chk(wmode == WM_TEST && !layer_disabled[0], "IP left in test mode");
    chk(scan_out == chain_so && func_out == func_in, "scan and functional unlock done");
    chk(shift_errors == 0 && launches == 256, $sformatf("scan authentication ran 256 trials (%0d, %0d)", launches, shift_errors));
    // Cycle budget: 7 ACU words, 4 MEV chains, 16 scan keys, 12 key words, the
    // 256 scan trials of POS+3 cycles and fixed per-step overheads.
    exp_cyc = 4 * SEQ + 16 + 2 * FKN + 256 * (POS + 3);
    $display("provisioning took %0d cycles (%0d streamed words and trial cycles)", cyc, exp_cyc);
    chk(cyc >= exp_cyc && cyc <= exp_cyc + 60, "provisioning cycle count");
    expect_fail(C_NOKMU, 8'd0, DK, 1, "unknown IP");
    expect_fail(C_SULKEY, 8'd0, DK, 3, "bad scan unlock key");
    expect_fail(C_GOLD, 8'd0, DK, 4, "tampered golden signature");
    expect_fail(C_FKEY, 8'd0, DK, 5, "bad functional key");
    expect_fail(C_WMGOLD, 8'd0, DK, 6, "bad watermark response");
    expect_fail(C_NONE, 8'd0, ~DK, 2, "wrong layer key");
    provision(8'd0, DK, cyc);
    chk(!prov_pass && prov_fail_step == 7, "disabled layer refused until reset");
    expect_fail(C_NONE, 8'd3, DK, 7, "out-of-range IP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
