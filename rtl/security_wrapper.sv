// Security wrapper of one IP in an untrusted layer.
//
// Sits beside the IP's IEEE 1500 wrapper and gives the TREE module (post-bond)
// or the test pins (pre-bond) one uniform register port to every security
// countermeasure of the IP, whatever its protocol. It holds:
//   - the TREE MODE FSM, which decodes TREE_MODE_RESET / WRSTN and enables one
//     security operation after its Mode Enable Vector chain;
//   - 32 registers of 32 bits: register 0 is the Mode Register (writes to it
//     are Mode Enable Vectors), the rest carry keys, challenges, responses and
//     general HSM data (map in treehouse_pkg);
//   - scan unlock (AND-gates the 16 scan outputs) and scan authentication
//     (128-bit scan-delay signature), present in every IP;
//   - optionally a functional lock (HAS_FLOCK), a watermark (HAS_WM) and a
//     port to an IP PUF (HAS_PUF).
// A write to a countermeasure's register is dropped unless the FSM has
// enabled that countermeasure's operation, so random vectors cannot load a
// key. Status registers read as zero outside TREE mode; key registers always
// read as zero.
//
// The FSM, the 32-register file with a Mode Register, and the rule that key
// registers only load in the matching mode follow the document. The register
// map, the chunking of wide functional keys into 32-bit writes (lowest chunk
// first) and the read rules are this design's choices.
//
// Timing: one register write per cycle, no handshake; reads are
// combinational on rd_addr.
module security_wrapper
  import treehouse_pkg::*;
#(
  parameter int unsigned N_REGS     = 32,
  parameter int unsigned SEQ_LEN    = 12,
  parameter logic [63:0] MEV_SEED   = 64'h5EC0_0DE5_1A7E_0001,
  parameter logic [63:0] SUL_SEED   = 64'hC0FF_EE00_5CA1_AB1E,
  parameter int unsigned SA_CHAIN_LEN = 460,
  parameter bit          HAS_FLOCK  = 1'b1,
  parameter int unsigned FK_N       = 66,
  parameter int unsigned FK_W       = 60,
  parameter logic [63:0] FL_SEED    = 64'h0BF5_CA7E_D00D_F00D,
  parameter bit          HAS_WM     = 1'b1,
  parameter logic [63:0] WM_SEED    = 64'h3A7E_4A2C_0000_6B5D,
  parameter bit          HAS_PUF    = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // IEEE 1500 mode pins
  input  logic        tree_mode_reset,
  input  logic        wrstn,
  // register port
  input  logic        wr_en,
  input  logic [4:0]  wr_addr,
  input  logic [31:0] wr_data,
  input  logic [4:0]  rd_addr,
  output logic [31:0] rd_data,
  output wmode_e      wmode,
  // IP scan chains
  input  logic [15:0] chain_so,
  output logic [15:0] scan_out,
  output logic        sa_shift_en,
  output logic        sa_launch,
  output logic [2:0]  sa_phase_sel,
  output logic        sa_cap_req,
  input  logic        sa_cap_valid,
  input  logic [15:0] sa_cap_bits,
  // IP functional output through the functional lock
  input  logic [31:0] func_in,
  output logic [31:0] func_out,
  // IP PUF
  output logic        puf_chal_valid,
  output logic [31:0] puf_chal,
  input  logic [31:0] puf_resp
);
  localparam int unsigned NCH = (FK_W + 31) / 32;

  logic        op_active;
  sec_op_e     op;
  logic [31:0] mode_reg;
  logic        in_tree;

  tree_mode_fsm #(.SEQ_LEN(SEQ_LEN), .MEV_SEED(MEV_SEED)) u_fsm (
    .clk, .rst_n, .tree_mode_reset, .wrstn,
    .mev_valid(wr_en && wr_addr == 5'(REG_MODE)), .mev(wr_data[15:0]),
    .wmode, .op_active, .op, .mode_reg
  );
  assign in_tree = (wmode == WM_TREE);

  function automatic logic op_wr(input logic en, input logic [4:0] a, input int unsigned r,
                                 input logic act, input sec_op_e cur, input sec_op_e want);
    return en && a == 5'(r) && act && cur == want;
  endfunction

  // ---------------- scan unlock ----------------
  logic       sul_unlocked;
  logic [4:0] sul_count;
  scan_unlock #(.LOCK_SEED(SUL_SEED)) u_sul (
    .clk, .rst_n, .enable(op_active && op == OP_SCAN_UNLOCK),
    .key_valid(op_wr(wr_en, wr_addr, REG_SUL_DATA, op_active, op, OP_SCAN_UNLOCK)),
    .key(wr_data), .chain_so, .scan_out, .unlocked(sul_unlocked), .count(sul_count)
  );

  // ---------------- scan authentication ----------------
  logic         sa_busy, sa_done;
  logic [127:0] sa_sig;
  scan_auth #(.CHAIN_LEN(SA_CHAIN_LEN)) u_sa (
    .clk, .rst_n,
    .start(op_wr(wr_en, wr_addr, REG_SA_CHAL, op_active, op, OP_SCAN_AUTH)),
    .challenge(wr_data), .shift_en(sa_shift_en), .launch(sa_launch), .phase_sel(sa_phase_sel),
    .cap_req(sa_cap_req), .cap_valid(sa_cap_valid), .cap_bits(sa_cap_bits),
    .busy(sa_busy), .done(sa_done), .signature(sa_sig)
  );

  // ---------------- functional lock ----------------
  logic        fl_unlocked;
  logic [15:0] fl_step;
  if (HAS_FLOCK) begin : g_flock
    logic [NCH*32-1:0]        fk_buf;
    logic [$clog2(NCH+1)-1:0] ch_q;
    logic                     kv_q;
    logic [$clog2(FK_N+1)-1:0] step;
    logic                      fk_wr;
    assign fk_wr = op_wr(wr_en, wr_addr, REG_FUL_DATA, op_active, op, OP_FUNC_UNLOCK);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        fk_buf <= '0;
        ch_q   <= '0;
        kv_q   <= 1'b0;
      end else begin
        kv_q <= 1'b0;
        if (!(op_active && op == OP_FUNC_UNLOCK)) begin
          ch_q <= '0;
        end else if (fk_wr) begin
          fk_buf[32*int'(ch_q) +: 32] <= wr_data;
          if (ch_q == $bits(ch_q)'(NCH - 1)) begin
            ch_q <= '0;
            kv_q <= 1'b1;
          end else begin
            ch_q <= ch_q + 1'b1;
          end
        end
      end
    end
    func_lock #(.N_KEYS(FK_N), .KEY_W(FK_W), .DATA_W(32), .LOCK_SEED(FL_SEED)) u_fl (
      .clk, .rst_n, .enable(op_active && op == OP_FUNC_UNLOCK), .key_valid(kv_q),
      .key(fk_buf[FK_W-1:0]), .func_in, .func_out, .unlocked(fl_unlocked), .step
    );
    assign fl_step = 16'(step);
  end else begin : g_no_flock
    assign func_out    = func_in;
    assign fl_unlocked = 1'b1;
    assign fl_step     = '0;
  end

  // ---------------- watermark ----------------
  logic [31:0] wm_resp;
  if (HAS_WM) begin : g_wm
    logic wm_rv;
    watermark #(.W(32), .WM_SECRET(WM_SEED)) u_wm (
      .clk, .rst_n, .chal_valid(op_wr(wr_en, wr_addr, REG_WM_CHAL, op_active, op, OP_HSC_AUTH)),
      .challenge(wr_data), .resp_valid(wm_rv), .response(wm_resp)
    );
  end else begin : g_no_wm
    assign wm_resp = '0;
  end

  // ---------------- IP PUF port ----------------
  if (HAS_PUF) begin : g_puf
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        puf_chal_valid <= 1'b0;
        puf_chal       <= '0;
      end else begin
        puf_chal_valid <= op_wr(wr_en, wr_addr, REG_PUF_CHAL, op_active, op, OP_HSC_AUTH);
        if (op_wr(wr_en, wr_addr, REG_PUF_CHAL, op_active, op, OP_HSC_AUTH)) puf_chal <= wr_data;
      end
    end
  end else begin : g_no_puf
    assign puf_chal_valid = 1'b0;
    assign puf_chal       = '0;
  end

  // ---------------- general HSM buffer registers ----------------
  logic [31:0] gp_q [N_REGS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N_REGS; r++) gp_q[r] <= '0;
    end else if (wr_en && op_active && int'(wr_addr) >= REG_GP0) begin
      gp_q[wr_addr] <= wr_data;
    end
  end

  // ---------------- read port ----------------
  always_comb begin
    rd_data = '0;
    if (rd_addr == 5'(REG_MODE)) begin
      rd_data = mode_reg;
    end else if (in_tree) begin
      unique case (int'(rd_addr))
        REG_SUL_STS:     rd_data = {sul_unlocked, 26'd0, sul_count};
        REG_FUL_STS:     rd_data = {fl_unlocked, 15'd0, fl_step};
        REG_WM_RESP:     rd_data = wm_resp;
        REG_SA_STS:      rd_data = {30'd0, sa_done, sa_busy};
        REG_SA_SIG0:     rd_data = sa_sig[31:0];
        REG_SA_SIG0 + 1: rd_data = sa_sig[63:32];
        REG_SA_SIG0 + 2: rd_data = sa_sig[95:64];
        REG_SA_SIG0 + 3: rd_data = sa_sig[127:96];
        REG_PUF_RESP:    rd_data = HAS_PUF ? puf_resp : 32'd0;
        default:         rd_data = (op_active && int'(rd_addr) >= REG_GP0) ? gp_q[rd_addr] : 32'd0;
      endcase
    end
  end
endmodule
