// Self-checking testbench of scan_auth (default 16 paths, 8 phases, one
// target flop) with the scan-path delay model: the 128-bit signature equals
// the noise-free Eq. 1 signature despite jitter, repeats on a second run,
// changes with the challenge flop, each trial shifts exactly the challenge
// distance, and the run takes 8 x 32 trials of (challenge + 3) cycles plus
// the start cycle.
module scan_auth_tb;
  localparam int unsigned CHAIN_LEN = 460;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [31:0] challenge = '0;
  logic shift_en, launch, cap_req, busy, done, cap_valid;
  logic [2:0] phase_sel;
  logic [15:0] cap_bits;
  logic [127:0] signature;
  int unsigned launches, shift_errors, expect_shift;
  int checks = 0, failures = 0;

  scan_auth #(.CHAIN_LEN(CHAIN_LEN)) dut (.clk, .rst_n, .start, .challenge, .shift_en, .launch, .phase_sel,
    .cap_req, .cap_valid, .cap_bits, .busy, .done, .signature);

  scanpuf_delay_model #(.CHIP_SEED(64'h0123_4567_89AB_CDEF)) chip_a (
    .clk, .shift_en, .launch, .phase_sel, .cap_req, .expect_shift, .cap_valid, .cap_bits,
    .launches, .shift_errors);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // reset edge after time zero
  task automatic chk(input bit c, input string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [127:0] ideal(input int unsigned pos);
    logic [127:0] s;
    for (int p = 0; p < 16; p++) for (int k = 0; k < 8; k++) s[p*8 + k] = chip_a.ideal_bit(p, k, pos);
    return s;
  endfunction

  task automatic run(input int unsigned pos, output int cycles);
    @(negedge clk); start = 1'b1; challenge = pos; expect_shift = (pos >= CHAIN_LEN) ? CHAIN_LEN - 1 : pos;
    @(negedge clk); start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin #40_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int cyc;
    logic [127:0] s1;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    chk(!busy && !done, "idle after reset");
    run(5, cyc);
    chk(signature == ideal(5), $sformatf("signature equals the noise-free Eq. 1 signature %h %h", signature, ideal(5)));
    chk(signature != '0 && signature != '1, "signature is not constant");
    chk(cyc == 256 * (5 + 3) + 1, $sformatf("run takes 8 x 32 trials of 8 cycles (%0d)", cyc));
    chk(launches == 256, "256 launches");
    chk(shift_errors == 0, "every trial shifts the challenge distance");
    s1 = signature;
    // Same chip, same challenge: the majority vote gives the same bits.
    run(5, cyc);
    chk(signature == s1, "repeatable signature");
    // Another challenge flop gives another response.
    run(0, cyc);
    chk(signature == ideal(0) && signature != s1, "challenge selects the response");
    chk(cyc == 256 * 3 + 1, "zero-shift challenge timing");
    // Challenge past the end of the chain is clamped to the last flop.
    run(1000, cyc);
    chk(cyc == 256 * (CHAIN_LEN - 1 + 3) + 1, "challenge clamped to the chain length");
    chk(shift_errors == 0, "clamped shift count");
    chk(signature == ideal(CHAIN_LEN - 1), "response of the last flop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
