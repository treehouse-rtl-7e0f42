// Scan authentication (scan-chain delay PUF) controller of one IP.
//
// The signature has one bit per (target flop, scan path, capture phase):
// N_TARGETS x N_PATHS x N_PHASES bits, 1 x 16 x 8 = 128 at the defaults. For
// each target and capture phase the controller runs N_ITER trials. A trial
// launches a transition at the scan inputs, shifts it until it sits at the
// target flop of every path, then asks the clock generation logic to capture
// the path outputs with the selected phase-shifted clock. A captured 1 means
// the transition arrived inside the phase interval (t_challenge <=
// t_interval, Eq. 1 of the signature rule); a 0 means it was late. Each
// signature bit is the majority over the N_ITER trials, which filters out
// measurement noise. Bit (t*N_PATHS + p)*N_PHASES + k belongs to target t,
// path p, phase k.
//
// The challenge is the shift distance to the first target flop; target t
// sits t*CHAIN_LEN/N_TARGETS flops further on, wrapping at the end of the
// chain. Challenges beyond the chain are clamped to its last flop.
// N_TARGETS > 1 keeps the signature at 128 bits when there are fewer chains
// (4 chains: 4 targets; 1 chain: 16 targets).
//
// The 16 paths, 8 phases, 32 iterations and 128-bit signature follow the
// document, as do its other chain counts (1, 4 and 32). Combining the
// iterations by majority, the challenge as a shift distance, and the
// spreading of several targets along a chain are this design's reading. The
// delay measurement itself (phase-shifted clocks and capture flops) is
// outside this block, on cap_req / cap_valid / cap_bits.
//
// Timing: start is taken in one cycle; each trial then takes 1 launch cycle,
// pos_t shift cycles and 2 capture cycles (request, then cap_valid one cycle
// later from the capture logic). A run is
// 1 + N_PHASES*N_ITER*sum_t(pos_t + 3) cycles. done stays high until the
// next start.
module scan_auth #(
  parameter int unsigned N_PATHS   = 16,
  parameter int unsigned N_PHASES  = 8,
  parameter int unsigned N_ITER    = 32,
  parameter int unsigned CHAIN_LEN = 460,
  parameter int unsigned N_TARGETS = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [31:0]                   challenge,
  output logic                          shift_en,
  output logic                          launch,
  output logic [$clog2(N_PHASES)-1:0]   phase_sel,
  output logic                          cap_req,
  input  logic                          cap_valid,
  input  logic [N_PATHS-1:0]            cap_bits,
  output logic                          busy,
  output logic                          done,
  output logic [N_TARGETS*N_PATHS*N_PHASES-1:0] signature
);
  localparam int unsigned PW = $clog2(CHAIN_LEN);
  localparam int unsigned IW = $clog2(N_ITER + 1);
  localparam int unsigned FW = (N_PHASES > 1) ? $clog2(N_PHASES) : 1;
  localparam int unsigned TW = (N_TARGETS > 1) ? $clog2(N_TARGETS) : 1;
  localparam int unsigned STRIDE = CHAIN_LEN / N_TARGETS;

  typedef enum logic [2:0] {S_IDLE, S_LAUNCH, S_SHIFT, S_CAPTURE, S_DONE} sa_state_e;
  sa_state_e st_q;

  logic [PW-1:0]  pos_q, sh_q;
  logic [TW-1:0]  tgt_q;
  logic [IW-1:0]  iter_q;
  logic [FW-1:0]  phase_q;
  logic [IW-1:0]  ones_q [N_PATHS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S_IDLE;
      pos_q     <= '0;
      sh_q      <= '0;
      iter_q    <= '0;
      phase_q   <= '0;
      tgt_q     <= '0;
      signature <= '0;
      for (int p = 0; p < N_PATHS; p++) ones_q[p] <= '0;
    end else begin
      unique case (st_q)
        S_IDLE, S_DONE: if (start) begin
          // Challenge flops beyond the chain are clamped to its last flop.
          pos_q   <= (challenge >= 32'(CHAIN_LEN)) ? PW'(CHAIN_LEN - 1) : PW'(challenge);
          iter_q  <= '0;
          phase_q <= '0;
          tgt_q   <= '0;
          for (int p = 0; p < N_PATHS; p++) ones_q[p] <= '0;
          st_q    <= S_LAUNCH;
        end
        S_LAUNCH: begin
          sh_q <= pos_q;
          st_q <= (pos_q == '0) ? S_CAPTURE : S_SHIFT;
        end
        S_SHIFT: begin
          sh_q <= sh_q - 1'b1;
          if (sh_q == PW'(1)) st_q <= S_CAPTURE;
        end
        S_CAPTURE: if (cap_valid) begin
          if (iter_q == IW'(N_ITER - 1)) begin
            for (int p = 0; p < N_PATHS; p++) begin
              signature[(int'(tgt_q)*N_PATHS + p)*N_PHASES + int'(phase_q)] <=
                  (2 * (int'(ones_q[p]) + int'(cap_bits[p]))) > N_ITER;
              ones_q[p] <= '0;
            end
            iter_q <= '0;
            st_q   <= S_LAUNCH;
            if (phase_q != FW'(N_PHASES - 1)) begin
              phase_q <= phase_q + 1'b1;
            end else begin
              // Next target flop, STRIDE further along the chain.
              phase_q <= '0;
              tgt_q   <= tgt_q + 1'b1;
              pos_q   <= (32'(pos_q) + STRIDE >= CHAIN_LEN) ? PW'(32'(pos_q) + STRIDE - CHAIN_LEN)
                                                           : PW'(32'(pos_q) + STRIDE);
              if (tgt_q == TW'(N_TARGETS - 1)) st_q <= S_DONE;
            end
          end else begin
            for (int p = 0; p < N_PATHS; p++) ones_q[p] <= ones_q[p] + IW'(cap_bits[p]);
            iter_q <= iter_q + 1'b1;
            st_q   <= S_LAUNCH;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign launch    = (st_q == S_LAUNCH);
  assign shift_en  = (st_q == S_SHIFT);
  assign cap_req   = (st_q == S_CAPTURE);
  assign phase_sel = phase_q;
  assign busy      = (st_q != S_IDLE) && (st_q != S_DONE);
  assign done      = (st_q == S_DONE);
endmodule
