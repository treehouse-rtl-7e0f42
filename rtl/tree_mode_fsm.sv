// TREE MODE FSM of the security wrapper.
//
// Decodes the TREE_MODE_RESET / WRSTN pin pair into the four wrapper modes
// (00 functional, 01 test, 11 at-speed test, 10 TREE) and, in TREE mode,
// walks Mode Enable Vector (MEV) sequences. Each of the N_OPS security
// operations (scan unlock, scan authentication, functional unlock, watermark or
// IP PUF authentication)
// has its own secret chain of SEQ_LEN vectors of MEV_W bits; N_OPS*SEQ_LEN =
// 48 sequence states by default, the document's 48-state FSM. The first
// vector of each chain carries the operation number in its low two bits, so
// chains never overlap. A wrong vector sends the FSM back to idle; when a
// whole chain has been applied, the operation is enabled until another MEV is
// applied or TREE mode is left.
//
// Mode Register: bit 0 KL_CTL (an operation has been granted), bit 1 KL_STS
// (its key-load port is open), bits 3:2 the operation, bits 5:4 the wrapper
// mode. Progress inside a chain is never visible, so vectors cannot be
// guessed one at a time. KL_CTL/KL_STS = 11 enabling the operation follows the
// document; the exact bit meanings, the chain length and the expansion of the
// secret vectors from MEV_SEED are this design's choices.
//
// Timing: one MEV per cycle on mev_valid; op_active rises the cycle after the
// last vector of a chain.
module tree_mode_fsm
  import treehouse_pkg::*;
#(
  parameter int unsigned N_OPS    = 4,
  parameter int unsigned SEQ_LEN  = 12,
  parameter int unsigned MEV_W    = 16,
  parameter logic [63:0] MEV_SEED = 64'h5EC0_0DE5_1A7E_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tree_mode_reset,
  input  logic        wrstn,
  input  logic        mev_valid,
  input  logic [MEV_W-1:0] mev,
  output wmode_e      wmode,
  output logic        op_active,
  output sec_op_e     op,
  output logic [31:0] mode_reg
);
  localparam int unsigned SW = $clog2(SEQ_LEN + 1);

  // Expected vectors, fixed at elaboration.
  logic [MEV_W-1:0] mev_tab [N_OPS][SEQ_LEN];
  for (genvar o = 0; o < N_OPS; o++) begin : g_op
    for (genvar s = 0; s < SEQ_LEN; s++) begin : g_step
      logic [15:0] v;
      assign v = th_mev(MEV_SEED, o, s);
      assign mev_tab[o][s] = MEV_W'(v);
    end
  end

  typedef struct packed {
    logic          busy;  // inside a chain or granted
    logic [1:0]    op;
    logic [SW-1:0] step;  // vectors matched so far
  } fsm_state_t;

  fsm_state_t st_q, st_d;

  assign wmode = wmode_e'({tree_mode_reset, wrstn});

  always_comb begin
    st_d = st_q;
    if (wmode != WM_TREE) begin
      st_d = '0;
    end else if (mev_valid) begin
      if (st_q.busy && st_q.step != SW'(SEQ_LEN) &&
          mev == mev_tab[st_q.op][st_q.step[$clog2(SEQ_LEN)-1:0]]) begin
        st_d.step = st_q.step + 1'b1;
      end else begin
        // Start of a new chain (from idle, from a granted operation, or after a miss).
        st_d = '0;
        if (!(st_q.busy && st_q.step != SW'(SEQ_LEN))) begin
          for (int o = N_OPS - 1; o >= 0; o--) begin
            if (mev == mev_tab[o][0]) begin
              st_d.busy = 1'b1;
              st_d.op   = 2'(o);
              st_d.step = SW'(1);
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_q <= '0;
    else        st_q <= st_d;
  end

  logic kl_ctl, kl_sts;
  assign kl_ctl    = st_q.busy && st_q.step == SW'(SEQ_LEN);
  assign kl_sts    = kl_ctl && wmode == WM_TREE;
  assign op_active = kl_ctl && kl_sts;
  assign op        = sec_op_e'(st_q.op);
  assign mode_reg  = {26'd0, wmode, (kl_ctl ? st_q.op : 2'b00), kl_sts, kl_ctl};

  // An operation is only ever granted in TREE mode.
  a_grant_in_tree: assert property (@(posedge clk) disable iff (!rst_n)
                                    op_active |-> wmode == WM_TREE);
endmodule
