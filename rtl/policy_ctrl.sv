// Policy controller of the TREE module.
//
// Runs the post-bond / post-packaging provisioning protocol for one IP per
// command. Given the IP's ID and the layer decrypt key from the design house,
// it:
//   1. looks the IP up in the Key Management Unit (where its encrypted HSM
//      data lives) and the Authentication Control Unit (its challenges and
//      golden responses), and decrypts the latter;
//   2. puts the IP's wrapper into TREE mode (TREE_MODE_RESET=1, WRSTN=0);
//   3. applies the decrypted scan-unlock Mode Enable Vectors, checks that the
//      Mode Register shows the operation enabled, applies the decrypted scan
//      unlock keys and checks that the scan ports opened;
//   4. applies the scan-authentication MEVs and challenge, waits for the
//      128-bit signature and compares it with the golden one;
//   5. if the IP has a functional lock: applies its MEVs and the decrypted
//      unlocking key sequence and checks that the IP is unlocked;
//   6. if the IP has a watermark or PUF: applies its MEVs and challenge and
//      compares the response with the golden one;
//   7. puts the wrapper into test mode (TREE_MODE_RESET=0, WRSTN=1).
// If any check fails, the layer is disabled: its wrapper is held in
// functional mode, still locked, and further commands for it are refused
// until reset (audit).
//
// Memory layout of an IP's record from its KMU base address (word offsets):
// operation o's SEQ_LEN MEV words at o*SEQ_LEN, then n_ul_keys scan unlock
// keys at 4*SEQ_LEN, then n_fk_words functional key words. Each memory word
// is decrypted with the address as tweak; ACU word k of IP id with tweak
// 0xAC00_0000 | id<<8 | k (k: 0 challenge, 1-4 golden signature, 5 HSC
// challenge, 6 HSC golden response).
//
// The protocol order follows the document, where it runs as firmware on the
// TREE's RISC-V core; here it is a hardware sequencer. The memory layout,
// the tweaks, the PUF wait and the scan-authentication timeout are this
// design's choices. The KMU's seq_lock and burst flags are carried but not
// acted on: functional keys always go word by word through FUL_DATA, and a
// combinational lock is simply an IP with a single key pattern.
//
// Timing: HSM words stream at one per cycle (memory read, decrypt, wrapper
// write pipelined); done pulses for one cycle with pass.
module policy_ctrl
  import treehouse_pkg::*;
#(
  parameter int unsigned N_IPS      = 3,
  parameter int unsigned SEQ_LEN    = 12,
  parameter int unsigned AW         = 15,
  parameter int unsigned PUF_WAIT   = 4,
  parameter int unsigned SA_TIMEOUT = 1 << 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 start,
  input  logic [7:0]           ip_id,
  input  logic [63:0]          dec_key,
  output logic                 busy,
  output logic                 done,
  output logic                 pass,
  output logic [3:0]           fail_step,
  output logic [N_IPS-1:0]     layer_disabled,
  // key management unit
  output logic [7:0]           kmu_id,
  input  logic                 kmu_hit,
  input  kmu_entry_t           kmu_entry,
  // authentication control unit
  output logic [7:0]           acu_id,
  input  logic                 acu_hit,
  input  acu_entry_t           acu_entry,
  output logic [127:0]         cmp_a,
  output logic [127:0]         cmp_b,
  output logic [127:0]         cmp_mask,
  input  logic                 cmp_match,
  // memory module (read side)
  output logic [AW-1:0]        mem_addr,
  input  logic [31:0]          mem_rdata,
  // encryption unit
  output logic                 cr_in_valid,
  output logic [63:0]          cr_key,
  output logic [31:0]          cr_tweak,
  output logic [31:0]          cr_din,
  input  logic                 cr_out_valid,
  input  logic [31:0]          cr_dout,
  // security wrapper port (shared bus, w_idx selects the IP)
  output logic [$clog2(N_IPS)-1:0] w_idx,
  output wmode_e               ip_mode [N_IPS],
  output logic                 w_wr_en,
  output logic [4:0]           w_wr_addr,
  output logic [31:0]          w_wr_data,
  output logic [4:0]           w_rd_addr,
  input  logic [31:0]          w_rd_data
);
  // Failure codes reported on fail_step.
  localparam logic [3:0] F_NONE = 4'd0, F_LOOKUP = 4'd1, F_MODE = 4'd2, F_SUL = 4'd3,
                         F_SA = 4'd4, F_FUL = 4'd5, F_HSC = 4'd6, F_REFUSED = 4'd7;

  typedef enum logic [4:0] {
    S_IDLE, S_LOOKUP, S_ACU_DEC, S_XFER, S_CHK_MODE, S_CHK_SUL, S_SA_START, S_SA_WAIT,
    S_SA_READ, S_SA_CMP, S_FL_MEV, S_FL_KEYS, S_CHK_FUL, S_HSC_MEV, S_HSC_CHAL, S_HSC_WAIT,
    S_HSC_CMP, S_SA_MEV, S_SUL_KEYS, S_FINISH, S_FAIL
  } pc_state_e;

  pc_state_e st_q, ret_q;
  logic [7:0]   id_q;
  logic [63:0]  key_q;
  kmu_entry_t   ke_q;
  acu_entry_t   ae_q;
  logic [31:0]  sa_chal_q, hsc_chal_q, hsc_gold_q;
  logic [127:0] sa_gold_q, sa_sig_q;
  logic [2:0]   k_iss_q, k_got_q;
  sec_op_e      chk_op_q;
  // transfer engine
  logic [AW-1:0] x_addr_q, a1_q;
  logic [15:0]   x_left_q;
  logic [4:0]    x_dst_q;
  logic          rd_v1_q;
  logic [20:0]   wait_q;
  logic [1:0]    sig_w_q;

  logic [$clog2(N_IPS)-1:0] idx;
  assign idx = $bits(idx)'(id_q);

  assign busy   = (st_q != S_IDLE);
  assign kmu_id = id_q;
  assign acu_id = id_q;
  assign w_idx  = idx;
  assign cr_key = key_q;

  // ACU words in tweak order.
  logic [31:0] acu_word;
  always_comb begin
    unique case (k_iss_q)
      3'd0:    acu_word = ae_q.sa_chal;
      3'd1:    acu_word = ae_q.sa_golden[31:0];
      3'd2:    acu_word = ae_q.sa_golden[63:32];
      3'd3:    acu_word = ae_q.sa_golden[95:64];
      3'd4:    acu_word = ae_q.sa_golden[127:96];
      3'd5:    acu_word = ae_q.hsc_chal;
      default: acu_word = ae_q.hsc_golden;
    endcase
  end

  // Encryption unit input: ACU words during S_ACU_DEC, memory words otherwise.
  always_comb begin
    if (st_q == S_ACU_DEC) begin
      cr_in_valid = (k_iss_q < 3'd7);
      cr_tweak    = {8'hAC, 8'h00, id_q, 5'd0, k_iss_q};
      cr_din      = acu_word;
    end else begin
      cr_in_valid = rd_v1_q;
      cr_tweak    = 32'(a1_q);
      cr_din      = mem_rdata;
    end
  end

  assign mem_addr = x_addr_q;

  // Wrapper writes: decrypted words during a transfer, single writes otherwise.
  always_comb begin
    w_wr_en   = 1'b0;
    w_wr_addr = x_dst_q;
    w_wr_data = cr_dout;
    w_rd_addr = 5'(REG_MODE);
    unique case (st_q)
      S_XFER:     w_wr_en = cr_out_valid;
      S_SA_START: begin w_wr_en = 1'b1; w_wr_addr = 5'(REG_SA_CHAL); w_wr_data = sa_chal_q; end
      S_HSC_CHAL: begin
        w_wr_en   = 1'b1;
        w_wr_addr = ke_q.has_puf ? 5'(REG_PUF_CHAL) : 5'(REG_WM_CHAL);
        w_wr_data = hsc_chal_q;
      end
      S_CHK_MODE: w_rd_addr = 5'(REG_MODE);
      S_CHK_SUL:  w_rd_addr = 5'(REG_SUL_STS);
      S_CHK_FUL:  w_rd_addr = 5'(REG_FUL_STS);
      S_SA_WAIT:  w_rd_addr = 5'(REG_SA_STS);
      S_SA_READ:  w_rd_addr = 5'(REG_SA_SIG0) + 5'(sig_w_q);
      S_HSC_CMP:  w_rd_addr = ke_q.has_puf ? 5'(REG_PUF_RESP) : 5'(REG_WM_RESP);
      default: ;
    endcase
  end

  assign cmp_a    = sa_sig_q;
  assign cmp_b    = sa_gold_q;
  assign cmp_mask = ae_q.sa_mask;

  localparam int unsigned MEV_BASE_UL = 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; ret_q <= S_IDLE;
      id_q <= '0; key_q <= '0; ke_q <= '0; ae_q <= '0;
      sa_chal_q <= '0; hsc_chal_q <= '0; hsc_gold_q <= '0; sa_gold_q <= '0; sa_sig_q <= '0;
      x_addr_q <= '0; a1_q <= '0; x_left_q <= '0; x_dst_q <= '0; rd_v1_q <= 1'b0;
      wait_q <= '0; sig_w_q <= '0;
      done <= 1'b0; pass <= 1'b0; fail_step <= F_NONE;
      layer_disabled <= '0;
      for (int i = 0; i < N_IPS; i++) ip_mode[i] <= WM_FUNCTIONAL;
    end else begin
      done <= 1'b0;
      rd_v1_q <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          id_q  <= ip_id;
          key_q <= dec_key;
          pass  <= 1'b0;
          fail_step <= F_NONE;
          if (32'(ip_id) >= N_IPS || layer_disabled[$bits(idx)'(ip_id)]) begin
            done      <= 1'b1;
            fail_step <= F_REFUSED;
          end else begin
            st_q <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          ke_q <= kmu_entry;
          ae_q <= acu_entry;
          k_iss_q <= '0;
          k_got_q <= '0;
          if (kmu_hit && acu_hit) st_q <= S_ACU_DEC;
          else begin fail_step <= F_LOOKUP; st_q <= S_FAIL; end
        end
        S_ACU_DEC: begin
          if (k_iss_q < 3'd7) k_iss_q <= k_iss_q + 1'b1;
          if (cr_out_valid) begin
            k_got_q <= k_got_q + 1'b1;
            unique case (k_got_q)
              3'd0: sa_chal_q <= cr_dout;
              3'd1: sa_gold_q[31:0]   <= cr_dout;
              3'd2: sa_gold_q[63:32]  <= cr_dout;
              3'd3: sa_gold_q[95:64]  <= cr_dout;
              3'd4: sa_gold_q[127:96] <= cr_dout;
              3'd5: hsc_chal_q <= cr_dout;
              default: hsc_gold_q <= cr_dout;
            endcase
            if (k_got_q == 3'd6) begin
              // Step 6: TREE mode, then the scan unlock MEVs.
              ip_mode[idx] <= WM_TREE;
              x_addr_q <= ke_q.base + AW'(MEV_BASE_UL);
              x_left_q <= 16'(SEQ_LEN);
              x_dst_q  <= 5'(REG_MODE);
              chk_op_q <= OP_SCAN_UNLOCK;
              ret_q    <= S_SUL_KEYS;
              st_q     <= S_XFER;
            end
          end
        end
        S_XFER: begin
          if (x_left_q != '0) begin
            x_addr_q <= x_addr_q + 1'b1;
            x_left_q <= x_left_q - 1'b1;
            rd_v1_q  <= 1'b1;
            a1_q     <= x_addr_q;
          end else if (!rd_v1_q && !cr_out_valid) begin
            st_q <= (x_dst_q == 5'(REG_MODE)) ? S_CHK_MODE : ret_q;
          end
        end
        S_CHK_MODE: begin
          if (w_rd_data[1:0] == 2'b11 && w_rd_data[3:2] == chk_op_q) st_q <= ret_q;
          else begin fail_step <= F_MODE; st_q <= S_FAIL; end
        end
        S_SUL_KEYS: begin
          // Steps 9-10: decrypted scan unlock keys.
          x_addr_q <= ke_q.base + AW'(4 * SEQ_LEN);
          x_left_q <= 16'(ke_q.n_ul_keys);
          x_dst_q  <= 5'(REG_SUL_DATA);
          ret_q    <= S_CHK_SUL;
          st_q     <= S_XFER;
        end
        S_CHK_SUL: begin
          if (w_rd_data[31]) st_q <= S_SA_MEV;
          else begin fail_step <= F_SUL; st_q <= S_FAIL; end
        end
        S_SA_MEV: begin
          // Steps 11-12: scan authentication mode.
          x_addr_q <= ke_q.base + AW'(SEQ_LEN);
          x_left_q <= 16'(SEQ_LEN);
          x_dst_q  <= 5'(REG_MODE);
          chk_op_q <= OP_SCAN_AUTH;
          ret_q    <= S_SA_START;
          st_q     <= S_XFER;
        end
        S_SA_START: begin
          wait_q <= '0;
          st_q   <= S_SA_WAIT;
        end
        S_SA_WAIT: begin
          wait_q <= wait_q + 1'b1;
          if (w_rd_data[1]) begin
            sig_w_q <= '0;
            st_q    <= S_SA_READ;
          end else if (32'(wait_q) >= SA_TIMEOUT) begin
            fail_step <= F_SA;
            st_q      <= S_FAIL;
          end
        end
        S_SA_READ: begin
          sa_sig_q[32*int'(sig_w_q) +: 32] <= w_rd_data;
          sig_w_q <= sig_w_q + 1'b1;
          if (sig_w_q == 2'd3) st_q <= S_SA_CMP;
        end
        S_SA_CMP: begin
          // Steps 13-14: signature against the golden response.
          if (!cmp_match) begin fail_step <= F_SA; st_q <= S_FAIL; end
          else if (ke_q.n_fk_words != '0) st_q <= S_FL_MEV;
          else if (ke_q.has_wm || ke_q.has_puf) st_q <= S_HSC_MEV;
          else st_q <= S_FINISH;
        end
        S_FL_MEV: begin
          // Steps 15-17: functional unlocking.
          x_addr_q <= ke_q.base + AW'(2 * SEQ_LEN);
          x_left_q <= 16'(SEQ_LEN);
          x_dst_q  <= 5'(REG_MODE);
          chk_op_q <= OP_FUNC_UNLOCK;
          ret_q    <= S_FL_KEYS;
          st_q     <= S_XFER;
        end
        S_FL_KEYS: begin
          x_addr_q <= ke_q.base + AW'(4 * SEQ_LEN) + AW'(ke_q.n_ul_keys);
          x_left_q <= ke_q.n_fk_words;
          x_dst_q  <= 5'(REG_FUL_DATA);
          ret_q    <= S_CHK_FUL;
          st_q     <= S_XFER;
        end
        S_CHK_FUL: begin
          if (!w_rd_data[31]) begin fail_step <= F_FUL; st_q <= S_FAIL; end
          else if (ke_q.has_wm || ke_q.has_puf) st_q <= S_HSC_MEV;
          else st_q <= S_FINISH;
        end
        S_HSC_MEV: begin
          // Step 18: watermark / PUF response.
          x_addr_q <= ke_q.base + AW'(3 * SEQ_LEN);
          x_left_q <= 16'(SEQ_LEN);
          x_dst_q  <= 5'(REG_MODE);
          chk_op_q <= OP_HSC_AUTH;
          ret_q    <= S_HSC_CHAL;
          st_q     <= S_XFER;
        end
        S_HSC_CHAL: begin
          wait_q <= '0;
          st_q   <= S_HSC_WAIT;
        end
        S_HSC_WAIT: begin
          wait_q <= wait_q + 1'b1;
          if (32'(wait_q) >= (ke_q.has_puf ? PUF_WAIT : 1)) st_q <= S_HSC_CMP;
        end
        S_HSC_CMP: begin
          if (w_rd_data == hsc_gold_q) st_q <= S_FINISH;
          else begin fail_step <= F_HSC; st_q <= S_FAIL; end
        end
        S_FINISH: begin
          ip_mode[idx] <= WM_TEST;
          pass <= 1'b1;
          done <= 1'b1;
          st_q <= S_IDLE;
        end
        S_FAIL: begin
          ip_mode[idx]        <= WM_FUNCTIONAL;
          layer_disabled[idx] <= 1'b1;
          done <= 1'b1;
          st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // A transfer never writes a register other than a data or mode register.
  a_xfer_dst: assert property (@(posedge clk) disable iff (!rst_n)
    (st_q == S_XFER && w_wr_en) |-> (w_wr_addr inside {5'(REG_MODE), 5'(REG_SUL_DATA), 5'(REG_FUL_DATA)}));
endmodule
