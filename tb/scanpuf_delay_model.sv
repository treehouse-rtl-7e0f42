// Behavioural model of the scan-path delays and the phase-shifted capture
// clocks of one IP, used by testbenches in place of the analog delay
// measurement. Each (chip, path, target flop) has a fixed transition delay
// drawn from CHIP_SEED, the target flop being the number of shift cycles of
// the trial; capture phase k samples at (k+1) * STEP_PS. On a capture request
// it answers the next cycle with one bit per path: 1 if the delay (plus a
// random jitter on NOISE_PCT percent of trials) is within the phase interval.
// It also counts launch pulses and checks that each trial shifts exactly
// `expect_shift` cycles before capture (no check when expect_shift is all
// ones, for runs that visit several target flops).
module scanpuf_delay_model #(
  parameter int unsigned    N_PATHS   = 16,
  parameter int unsigned    N_PHASES  = 8,
  parameter int unsigned    STEP_PS   = 100,
  parameter int unsigned    NOISE_PCT = 15,
  parameter longint unsigned CHIP_SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic               clk,
  input  logic               shift_en,
  input  logic               launch,
  input  logic [2:0]         phase_sel,
  input  logic               cap_req,
  input  int unsigned        expect_shift,
  output logic               cap_valid,
  output logic [N_PATHS-1:0] cap_bits,
  output int unsigned        launches,
  output int unsigned        shift_errors
);
  import tb_ref_pkg::*;
  int unsigned shifts = 0;
  initial begin cap_valid = 1'b0; cap_bits = '0; launches = 0; shift_errors = 0; end

  // Delay to flop pos of path p in ps, between 0.5 and N_PHASES+0.5 steps.
  function automatic int unsigned delay_ps(int unsigned p, int unsigned pos);
    longint unsigned z = ref_mix(CHIP_SEED, pos * 64 + p);
    return STEP_PS / 2 + int'(z % (N_PHASES * STEP_PS));
  endfunction

  // Noise-free signature bit of path p, target flop pos, phase k (Eq. 1).
  function automatic bit ideal_bit(int unsigned p, int unsigned k, int unsigned pos);
    return delay_ps(p, pos) <= (k + 1) * STEP_PS;
  endfunction

  always @(posedge clk) begin
    cap_valid <= 1'b0;
    if (launch) begin launches <= launches + 1; shifts = 0; end
    if (shift_en) shifts++;
    if (cap_req && !cap_valid) begin
      if (expect_shift != '1 && shifts != expect_shift) begin
        shift_errors <= shift_errors + 1;
        $display("scan delay model: %0d shifts before capture, expected %0d (t=%0t)", shifts, expect_shift, $time);
      end
      for (int p = 0; p < N_PATHS; p++) begin
        int d;
        d = int'(delay_ps(p, shifts));
        if ($urandom_range(99) < NOISE_PCT) d = d + int'($urandom_range(2 * STEP_PS)) - int'(STEP_PS);
        cap_bits[p] <= (d <= int'((int'(phase_sel) + 1) * STEP_PS));
      end
      cap_valid <= 1'b1;
    end
  end
endmodule
