// Testbench of scan_auth in the four scan-chain configurations of the GPS
// IP's 7351 scan flops: 1 chain of 7351 flops, 4 of 1838, 16 of 460 and
// 32 of 230. Every configuration produces a 128-bit signature:
//   1 chain:   1 path  x 8 phases x 16 target flops
//   4 chains:  4 paths x 8 phases x  4 target flops
//   16 chains: 16 paths x 8 phases x 1 target flop   (the built default)
//   32 chains: 32 paths x 4 phases x 1 target flop
// The chain counts and the 128-bit size come from the configuration study;
// the split into phases and target flops is this design's choice (32 paths
// with 8 phases would give 256 bits, so that row uses 4 phases).
//
// All four run side by side, each with its own chip model and the challenge
// at the last flop of its chains. For each one the testbench works out the
// target flops on its own (the first at the challenge, each next one
// CHAIN_LEN/N_TARGETS further, wrapping), and checks the signature against
// the noise-free Eq. 1 bits of those flops, the number of launches, and the
// exact run length 1 + N_PHASES*32*sum(pos_t + 3). Authentication time must
// fall as chains are added, as in the configuration study; the cycle ratios
// to the 16-chain case are printed.
module scan_auth_table6_tb;
  localparam int unsigned NCFG = 4;
  localparam int unsigned NP [NCFG] = '{1, 4, 16, 32};
  localparam int unsigned NF [NCFG] = '{8, 8, 8, 4};
  localparam int unsigned NT [NCFG] = '{16, 4, 1, 1};
  localparam int unsigned CL [NCFG] = '{7351, 1838, 460, 230};
  localparam int unsigned N_ITER = 32;

  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;
  int unsigned run_cycles [NCFG];
  bit finished [NCFG];

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero

  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin #400_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned FW = $clog2(NF[c]);
    logic start = 1'b0, shift_en, launch, cap_req, cap_valid, busy, done;
    logic [31:0] challenge = '0;
    logic [FW-1:0] phase_sel;
    logic [NP[c]-1:0] cap_bits;
    logic [127:0] signature;
    int unsigned launches, shift_errors;

    scan_auth #(.N_PATHS(NP[c]), .N_PHASES(NF[c]), .N_ITER(N_ITER), .CHAIN_LEN(CL[c]), .N_TARGETS(NT[c])) dut (
      .clk, .rst_n, .start, .challenge, .shift_en, .launch, .phase_sel, .cap_req, .cap_valid, .cap_bits,
      .busy, .done, .signature);

    scanpuf_delay_model #(.N_PATHS(NP[c]), .N_PHASES(NF[c]), .CHIP_SEED(64'h7AB1_E600_0000_0000 + 64'(c))) chip (
      .clk, .shift_en, .launch, .phase_sel(3'(phase_sel)), .cap_req, .expect_shift('1), .cap_valid, .cap_bits,
      .launches, .shift_errors);

    initial begin
      int unsigned pos [NT[c]];
      int unsigned exp_cycles, cyc;
      logic [127:0] ideal;
      // Target flops and expected run length.
      exp_cycles = 1;
      for (int t = 0; t < NT[c]; t++) begin
        pos[t] = (CL[c] - 1 + t * (CL[c] / NT[c])) % CL[c];
        exp_cycles += NF[c] * N_ITER * (pos[t] + 3);
      end
      for (int t = 0; t < NT[c]; t++)
        for (int p = 0; p < NP[c]; p++)
          for (int k = 0; k < NF[c]; k++)
            ideal[(t * NP[c] + p) * NF[c] + k] = chip.ideal_bit(p, k, pos[t]);
      @(posedge rst_n);
      @(negedge clk); start = 1'b1; challenge = CL[c] - 1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      run_cycles[c] = cyc;
      chk(signature == ideal, $sformatf("%0d chains: signature equals the Eq. 1 bits of the target flops", NP[c]));
      chk(signature != '0 && signature != '1, $sformatf("%0d chains: signature not constant", NP[c]));
      chk(launches == NT[c] * NF[c] * N_ITER, $sformatf("%0d chains: %0d trials", NP[c], launches));
      chk(cyc == exp_cycles, $sformatf("%0d chains: run length %0d cycles, expected %0d", NP[c], cyc, exp_cycles));
      finished[c] = 1'b1;
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    for (int c = 0; c < NCFG; c++)
      $display("%0d chains x %0d flops: %0d cycles, %0d.%02d x the 16-chain time", NP[c], CL[c], run_cycles[c],
               run_cycles[c] / run_cycles[2], (run_cycles[c] * 100 / run_cycles[2]) % 100);
    chk(run_cycles[0] > run_cycles[1] && run_cycles[1] > run_cycles[2] && run_cycles[2] > run_cycles[3],
        "authentication time falls as chains are added");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
