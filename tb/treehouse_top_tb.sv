// End-to-end testbench of treehouse_top at its default parameters (AES lock
// of 1334 x 352-bit patterns, GPS lock of 66 x 60-bit patterns, 12-vector
// MEV chains, 460-flop scan chains, 128 KB HSM memory).
//
// Phase 1, pre-bond: the design house drives each layer's test pins, tries a
// scan key without the mode (rejected), enables scan unlock by its MEVs,
// unlocks the scan ports, runs scan authentication and records the 128-bit
// signature as the golden response. The challenge is the last flop of the
// 460-flop chains, so every trial shifts the full chain length.
// Phase 2, post-bond (after a reset): the design house checks the TREE's PUF
// fingerprint, loads the encrypted HSM data (memory, KMU, ACU) and has the
// TREE provision all three IPs; each must end in test mode, scan-open and
// functionally unlocked. Then the failure paths: a tampered golden
// signature, a wrong layer decrypt key, and a command for a disabled layer.
// Each mechanism is counted; one that never happens is a failure.
module treehouse_top_tb;
  import treehouse_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned N = 3, SEQ = 12, SA_POS = 459;
  localparam logic [63:0] SEED_BASE = 64'h7EE4_0C5E_3D1C_2023;
  localparam int unsigned FK_N [N] = '{1334, 66, 0};
  localparam int unsigned FK_NW [N] = '{6, 1, 1};      // 64-bit words per key
  localparam int unsigned FK_NCH [N] = '{11, 2, 0};    // 32-bit chunks per key
  localparam int unsigned BASE [N] = '{0, 16384, 20000};

  logic clk = 1'b0, rst_n = 1'b1;
  logic host_mem_we = 1'b0, host_kmu_we = 1'b0, host_acu_we = 1'b0, prov_start = 1'b0;
  logic [14:0] host_mem_addr = '0;
  logic [31:0] host_mem_wdata = '0;
  logic [2:0] host_kmu_idx = '0, host_acu_idx = '0;
  kmu_entry_t host_kmu_entry = '0;
  acu_entry_t host_acu_entry = '0;
  logic [7:0] prov_id = '0;
  logic [63:0] prov_key = '0;
  logic prov_busy, prov_done, prov_pass;
  logic [3:0] prov_fail_step;
  logic [N-1:0] layer_disabled;
  logic [127:0] tree_puf_resp = 128'hFEED_5EED_0123_4567_89AB_CDEF_0F1E_2D3C, host_puf_resp;
  logic ext_sel [N], ext_tmr [N], ext_wrstn [N], ext_wr_en [N];
  logic [4:0] ext_wr_addr [N], ext_rd_addr [N];
  logic [31:0] ext_wr_data [N], ext_rd_data [N];
  wmode_e wmode [N];
  logic [15:0] chain_so [N], scan_out [N], sa_cap_bits [N];
  logic sa_shift_en [N], sa_launch [N], sa_cap_req [N], sa_cap_valid [N];
  logic [2:0] sa_phase_sel [N];
  logic [31:0] func_in [N], func_out [N], puf_chal [N], puf_resp [N];
  logic puf_chal_valid [N];
  int unsigned launches [N], shift_errors [N];
  logic [63:0] dk [N];
  logic [127:0] golden [N];
  int checks = 0, failures = 0;
  // mechanism counters
  int n_rejected = 0, n_gated = 0, n_prebond_unlock = 0, n_sa = 0, n_fl = 0, n_wm = 0, n_puf = 0,
      n_pass = 0, n_fail_sa = 0, n_fail_mode = 0, n_refused = 0, n_test = 0, n_tree_puf = 0;

  treehouse_top dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_chip
    scanpuf_delay_model #(.CHIP_SEED(64'hC41B_0000 + 64'(i) * 64'h1_0000_0001)) m (
      .clk, .shift_en(sa_shift_en[i]), .launch(sa_launch[i]), .phase_sel(sa_phase_sel[i]),
      .cap_req(sa_cap_req[i]), .expect_shift(SA_POS), .cap_valid(sa_cap_valid[i]),
      .cap_bits(sa_cap_bits[i]), .launches(launches[i]), .shift_errors(shift_errors[i]));
  end

  // FIR PUF stand-in: response registered one cycle after the challenge.
  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) if (puf_chal_valid[i]) puf_resp[i] <= fir_puf(puf_chal[i]);
  end
  function automatic logic [31:0] fir_puf(logic [31:0] c);
    logic [63:0] z = ref_mix(64'hF1B0_F1B0_F1B0_F1B0, c);
    return z[31:0];
  endfunction

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero
  always @(negedge clk) for (int i = 0; i < N; i++) chain_so[i] <= 16'($urandom) | 16'h8000;

  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic logic [63:0] seed(int ip, int k); return ref_mix(SEED_BASE, ip * 4 + k); endfunction

  // ---------------- pre-bond access through the layer's test pins ----------------
  task automatic pw(input int ip, input int a, input logic [31:0] d);
    @(negedge clk); ext_wr_en[ip] = 1'b1; ext_wr_addr[ip] = 5'(a); ext_wr_data[ip] = d;
    @(negedge clk); ext_wr_en[ip] = 1'b0;
  endtask
  logic [31:0] rv;
  task automatic pr(input int ip, input int a);
    ext_rd_addr[ip] = 5'(a); #1 rv = ext_rd_data[ip];
  endtask
  task automatic pmev(input int ip, input int o);
    for (int s = 0; s < SEQ; s++) pw(ip, REG_MODE, 32'(ref_mev(seed(ip, 0), o, s)));
  endtask

  task automatic prebond(input int ip);
    ext_sel[ip] = 1'b1; {ext_tmr[ip], ext_wrstn[ip]} = 2'b10;
    pw(ip, REG_SUL_DATA, 32'h0bad1dea);
    pr(ip, REG_SUL_STS);
    if (rv == 0) n_rejected++;
    @(negedge clk); if (scan_out[ip] == 0) n_gated++;
    pmev(ip, OP_SCAN_UNLOCK);
    for (int i = 0; i < 16; i++) pw(ip, REG_SUL_DATA, ref_key_word(seed(ip, 1), i, 1, 0));
    pr(ip, REG_SUL_STS);
    chk(rv[31], $sformatf("IP %0d: pre-bond scan unlock", ip));
    @(negedge clk); #1;
    if (rv[31] && scan_out[ip] == chain_so[ip]) n_prebond_unlock++;
    pmev(ip, OP_SCAN_AUTH);
    pw(ip, REG_SA_CHAL, SA_POS);
    pr(ip, REG_SA_STS);
    while (!rv[1]) begin @(negedge clk); pr(ip, REG_SA_STS); end
    for (int w = 0; w < 4; w++) begin pr(ip, REG_SA_SIG0 + w); golden[ip][32*w +: 32] = rv; end
    n_sa++;
    chk(golden[ip] != 0 && golden[ip] != '1, $sformatf("IP %0d: signature recorded", ip));
    // Layer-level test with the scan ports open.
    {ext_tmr[ip], ext_wrstn[ip]} = 2'b01;
    @(negedge clk); #1 chk(wmode[ip] == WM_TEST && scan_out[ip] == chain_so[ip], "pre-bond test mode");
    {ext_tmr[ip], ext_wrstn[ip]} = 2'b00;
    ext_sel[ip] = 1'b0;
  endtask

  // ---------------- post-bond provisioning data ----------------
  task automatic mem_wr(input int a, input logic [31:0] d);
    @(negedge clk); host_mem_we = 1'b1; host_mem_addr = 15'(a); host_mem_wdata = d;
  endtask
  function automatic logic [31:0] acu_enc(int ip, int k, logic [31:0] d);
    return d ^ ref_ks(dk[ip], {8'hAC, 8'h00, 8'(ip), 5'd0, 3'(k)});
  endfunction
  function automatic logic [31:0] hsc_golden(int ip, logic [31:0] c);
    logic [63:0] z = ref_mix(seed(ip, 3), c);
    return (ip == 2) ? fir_puf(c) : z[31:0];
  endfunction
  task automatic load_acu(input int ip, input logic [127:0] gold);
    acu_entry_t e;
    logic [31:0] hc = 32'h5000 + 32'(ip);
    e.valid = 1'b1; e.id = 8'(ip); e.sa_mask = '1;
    e.sa_chal = acu_enc(ip, 0, SA_POS);
    for (int w = 0; w < 4; w++) e.sa_golden[32*w +: 32] = acu_enc(ip, 1 + w, gold[32*w +: 32]);
    e.hsc_chal = acu_enc(ip, 5, hc);
    e.hsc_golden = acu_enc(ip, 6, hsc_golden(ip, hc));
    @(negedge clk); host_acu_we = 1'b1; host_acu_idx = 3'(ip); host_acu_entry = e;
    @(negedge clk); host_acu_we = 1'b0;
  endtask
  task automatic load_ip(input int ip);
    kmu_entry_t e;
    int a = BASE[ip];
    for (int o = 0; o < 4; o++)
      for (int s = 0; s < SEQ; s++) begin
        mem_wr(a, 32'(ref_mev(seed(ip, 0), o, s)) ^ ref_ks(dk[ip], a)); a++;
      end
    for (int i = 0; i < 16; i++) begin
      mem_wr(a, ref_key_word(seed(ip, 1), i, 1, 0) ^ ref_ks(dk[ip], a)); a++;
    end
    for (int i = 0; i < FK_N[ip]; i++)
      for (int c = 0; c < FK_NCH[ip]; c++) begin
        mem_wr(a, ref_key_word(seed(ip, 2), i, FK_NW[ip], c) ^ ref_ks(dk[ip], a)); a++;
      end
    @(negedge clk); host_mem_we = 1'b0;
    e = '0;
    e.valid = 1'b1; e.id = 8'(ip); e.base = 15'(BASE[ip]); e.n_ul_keys = 5'd16;
    e.n_fk_words = 16'(FK_N[ip] * FK_NCH[ip]); e.seq_lock = 1'b1;
    e.has_wm = (ip == 1); e.has_puf = (ip == 2);
    @(negedge clk); host_kmu_we = 1'b1; host_kmu_idx = 3'(ip); host_kmu_entry = e;
    @(negedge clk); host_kmu_we = 1'b0;
    load_acu(ip, golden[ip]);
  endtask

  task automatic provision(input int ip, input logic [63:0] key, output int cycles);
    @(negedge clk); prov_start = 1'b1; prov_id = 8'(ip); prov_key = key;
    @(negedge clk); prov_start = 1'b0;
    cycles = 1;
    while (!prov_done) begin @(negedge clk); cycles++; end
  endtask

  initial begin #50_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int cyc;
    for (int i = 0; i < N; i++) begin
      ext_sel[i] = 1'b0; ext_tmr[i] = 1'b0; ext_wrstn[i] = 1'b0; ext_wr_en[i] = 1'b0;
      ext_wr_addr[i] = '0; ext_rd_addr[i] = '0; ext_wr_data[i] = '0;
      func_in[i] = 32'hF00D_0000 + 32'(i); puf_resp[i] = '0;
      dk[i] = {$urandom, $urandom};
    end
    repeat (3) @(negedge clk); rst_n = 1'b1;
    // Phase 1: pre-bond.
    for (int ip = 0; ip < N; ip++) prebond(ip);
    // Phase 2: post-bond, after re-powering the bonded stack.
    rst_n = 1'b0; repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int ip = 0; ip < N; ip++) begin
      @(negedge clk);
      chk(scan_out[ip] == 0, "scan ports locked again after power-up");
      if (ip < 2) chk(func_out[ip] != func_in[ip], "IP functionally locked after power-up");
    end
    if (host_puf_resp == tree_puf_resp) n_tree_puf++;
    for (int ip = 0; ip < N; ip++) load_ip(ip);
    for (int ip = 0; ip < N; ip++) begin
      provision(ip, dk[ip], cyc);
      $display("IP %0d provisioned in %0d cycles, pass=%0d step=%0d", ip, cyc, prov_pass, prov_fail_step);
      chk(prov_pass && prov_fail_step == 0, $sformatf("IP %0d provisioning passes", ip));
      // Scan authentication, 256 trials of (challenge + 3) cycles, is the
      // longest step for the GPS and FIR IPs; AES adds its 14674 key words.
      chk(cyc > 256 * (SA_POS + 3) && cyc < 256 * (SA_POS + 3) + (ip == 0 ? 15200 : 600),
          "provisioning time dominated by scan authentication");
      if (prov_pass) n_pass++;
      @(negedge clk);
      chk(wmode[ip] == WM_TEST, "IP left in test mode");
      if (wmode[ip] == WM_TEST) n_test++;
      chk(scan_out[ip] == chain_so[ip], "scan ports open after provisioning");
      chk(func_out[ip] == func_in[ip], "IP functionally unlocked");
      if (FK_N[ip] != 0 && func_out[ip] == func_in[ip]) n_fl++;
      if (ip == 1 && prov_pass) n_wm++;
      if (ip == 2 && prov_pass) n_puf++;
      if (prov_pass) n_sa++;
      chk(shift_errors[ip] == 0, "scan authentication shifts");
    end
    // Tampered golden signature (20 bits): scan authentication fails, AES disabled.
    load_acu(0, golden[0] ^ 128'hFFFFF);
    provision(0, dk[0], cyc);
    chk(!prov_pass && prov_fail_step == 4 && layer_disabled[0], "tampered golden signature rejected");
    if (!prov_pass && prov_fail_step == 4) n_fail_sa++;
    @(negedge clk);
    chk(wmode[0] == WM_FUNCTIONAL, "disabled layer held in functional mode");
    // Wrong decrypt key for GPS: the decrypted MEVs do not enable anything.
    provision(1, ~dk[1], cyc);
    chk(!prov_pass && prov_fail_step == 2 && layer_disabled[1], "wrong decrypt key rejected");
    if (!prov_pass && prov_fail_step == 2) n_fail_mode++;
    // Further commands for a disabled layer are refused.
    provision(1, dk[1], cyc);
    chk(!prov_pass && prov_fail_step == 7 && cyc <= 2, "command for a disabled layer refused");
    if (prov_fail_step == 7) n_refused++;
    chk(layer_disabled == 3'b011, "only the failed layers are disabled");

    chk(n_rejected == 3, "key writes without mode rejected");
    chk(n_gated == 3, "scan-out gated while locked");
    chk(n_prebond_unlock == 3, "pre-bond scan unlocks");
    chk(n_sa == 6, "scan authentications");
    chk(n_fl == 2, "functional unlocks (AES, GPS)");
    chk(n_wm == 1, "watermark check");
    chk(n_puf == 1, "PUF check");
    chk(n_pass == 3, "provisioning passes");
    chk(n_test == 3, "test mode entries");
    chk(n_tree_puf == 1, "TREE fingerprint read");
    chk(n_fail_sa == 1 && n_fail_mode == 1 && n_refused == 1, "failure paths");
    $display("mechanisms: rejected=%0d gated=%0d prebond_unlock=%0d scan_auth=%0d func_unlock=%0d wm=%0d puf=%0d pass=%0d test=%0d fail_sa=%0d fail_mode=%0d refused=%0d",
             n_rejected, n_gated, n_prebond_unlock, n_sa, n_fl, n_wm, n_puf, n_pass, n_test, n_fail_sa, n_fail_mode, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
