// TREEHOUSE on an example three-layer 3DIC.
//
// The trusted TREE layer holds the TREE module; the untrusted layers hold
// three IPs, each behind its own security wrapper:
//   IP 0  AES, functional lock of 1334 key patterns x 352 bits;
//   IP 1  GPS, functional lock of 66 patterns x 60 bits, and a watermark;
//   IP 2  FIR, with a PUF (the PUF itself is outside, on the puf_* ports).
// Every IP has scan unlock (16 chains, 16 keys x 32 bits) and scan
// authentication (16 paths x 8 phases, 32 trials). The IPs, their scan chains
// and the delay-measuring capture logic are outside; their signals are ports.
//
// Each wrapper is driven either by its layer's own test pins (ext_*, used for
// pre-bond testing by the design house) or by the TREE module (post-bond and
// post-packaging), chosen per IP by ext_sel. Each IP's secrets (MEV chains,
// scan lock, functional lock, watermark) are expanded from distinct seeds
// derived from SEED_BASE.
//
// The IP mix and the lock sizes follow the document's example design; the
// pin mux and the seed derivation are this design's choices.
module treehouse_top
  import treehouse_pkg::*;
#(
  parameter int unsigned SEQ_LEN      = 12,
  parameter int unsigned SA_CHAIN_LEN = 460,
  parameter int unsigned AES_FK_N     = 1334,
  parameter int unsigned AES_FK_W     = 352,
  parameter int unsigned GPS_FK_N     = 66,
  parameter int unsigned GPS_FK_W     = 60,
  parameter logic [63:0] SEED_BASE    = 64'h7EE4_0C5E_3D1C_2023,
  localparam int unsigned N_IPS = 3,
  localparam int unsigned AW    = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  // host port of the TREE module
  input  logic             host_mem_we,
  input  logic [AW-1:0]    host_mem_addr,
  input  logic [31:0]      host_mem_wdata,
  input  logic             host_kmu_we,
  input  logic [2:0]       host_kmu_idx,
  input  kmu_entry_t       host_kmu_entry,
  input  logic             host_acu_we,
  input  logic [2:0]       host_acu_idx,
  input  acu_entry_t       host_acu_entry,
  input  logic             prov_start,
  input  logic [7:0]       prov_id,
  input  logic [63:0]      prov_key,
  output logic             prov_busy,
  output logic             prov_done,
  output logic             prov_pass,
  output logic [3:0]       prov_fail_step,
  output logic [N_IPS-1:0] layer_disabled,
  input  logic [127:0]     tree_puf_resp,
  output logic [127:0]     host_puf_resp,
  // per-IP pre-bond test pins
  input  logic             ext_sel       [N_IPS],
  input  logic             ext_tmr       [N_IPS],
  input  logic             ext_wrstn     [N_IPS],
  input  logic             ext_wr_en     [N_IPS],
  input  logic [4:0]       ext_wr_addr   [N_IPS],
  input  logic [31:0]      ext_wr_data   [N_IPS],
  input  logic [4:0]       ext_rd_addr   [N_IPS],
  output logic [31:0]      ext_rd_data   [N_IPS],
  output wmode_e           wmode         [N_IPS],
  // per-IP scan chains and delay capture
  input  logic [15:0]      chain_so      [N_IPS],
  output logic [15:0]      scan_out      [N_IPS],
  output logic             sa_shift_en   [N_IPS],
  output logic             sa_launch     [N_IPS],
  output logic [2:0]       sa_phase_sel  [N_IPS],
  output logic             sa_cap_req    [N_IPS],
  input  logic             sa_cap_valid  [N_IPS],
  input  logic [15:0]      sa_cap_bits   [N_IPS],
  // per-IP functional outputs through the locks, and IP PUF ports
  input  logic [31:0]      func_in       [N_IPS],
  output logic [31:0]      func_out      [N_IPS],
  output logic             puf_chal_valid[N_IPS],
  output logic [31:0]      puf_chal      [N_IPS],
  input  logic [31:0]      puf_resp      [N_IPS]
);
  logic        t_tmr   [N_IPS];
  logic        t_wrstn [N_IPS];
  logic        t_wr_en [N_IPS];
  logic [4:0]  t_wr_addr, t_rd_addr;
  logic [31:0] t_wr_data;
  logic [31:0] rd_data [N_IPS];

  tree_module #(.N_IPS(N_IPS), .SEQ_LEN(SEQ_LEN)) u_tree (
    .clk, .rst_n,
    .host_mem_we, .host_mem_addr, .host_mem_wdata,
    .host_kmu_we, .host_kmu_idx, .host_kmu_entry,
    .host_acu_we, .host_acu_idx, .host_acu_entry,
    .prov_start, .prov_id, .prov_key, .prov_busy, .prov_done, .prov_pass, .prov_fail_step,
    .layer_disabled, .tree_puf_resp, .host_puf_resp,
    .w_tmr(t_tmr), .w_wrstn(t_wrstn), .w_wr_en(t_wr_en), .w_wr_addr(t_wr_addr),
    .w_wr_data(t_wr_data), .w_rd_addr(t_rd_addr), .w_rd_data(rd_data)
  );

  // Wrapper port of each IP: layer test pins or TREE.
  logic        m_tmr [N_IPS], m_wrstn [N_IPS], m_wr_en [N_IPS];
  logic [4:0]  m_wr_addr [N_IPS], m_rd_addr [N_IPS];
  logic [31:0] m_wr_data [N_IPS];
  for (genvar i = 0; i < N_IPS; i++) begin : g_mux
    assign m_tmr[i]     = ext_sel[i] ? ext_tmr[i]     : t_tmr[i];
    assign m_wrstn[i]   = ext_sel[i] ? ext_wrstn[i]   : t_wrstn[i];
    assign m_wr_en[i]   = ext_sel[i] ? ext_wr_en[i]   : t_wr_en[i];
    assign m_wr_addr[i] = ext_sel[i] ? ext_wr_addr[i] : t_wr_addr;
    assign m_wr_data[i] = ext_sel[i] ? ext_wr_data[i] : t_wr_data;
    assign m_rd_addr[i] = ext_sel[i] ? ext_rd_addr[i] : t_rd_addr;
    assign ext_rd_data[i] = ext_sel[i] ? rd_data[i] : 32'd0;
  end

  // Secrets of IP i: MEV seed, scan lock seed, functional lock seed, watermark seed.
  function automatic logic [63:0] seed(input int unsigned ip, input int unsigned k);
    return th_mix(SEED_BASE, 32'(ip * 4 + k));
  endfunction

  security_wrapper #(
    .SEQ_LEN(SEQ_LEN), .MEV_SEED(seed(0, 0)), .SUL_SEED(seed(0, 1)), .SA_CHAIN_LEN(SA_CHAIN_LEN),
    .HAS_FLOCK(1'b1), .FK_N(AES_FK_N), .FK_W(AES_FK_W), .FL_SEED(seed(0, 2)),
    .HAS_WM(1'b0), .WM_SEED(seed(0, 3)), .HAS_PUF(1'b0)
  ) u_aes (
    .clk, .rst_n, .tree_mode_reset(m_tmr[0]), .wrstn(m_wrstn[0]),
    .wr_en(m_wr_en[0]), .wr_addr(m_wr_addr[0]), .wr_data(m_wr_data[0]),
    .rd_addr(m_rd_addr[0]), .rd_data(rd_data[0]), .wmode(wmode[0]),
    .chain_so(chain_so[0]), .scan_out(scan_out[0]), .sa_shift_en(sa_shift_en[0]),
    .sa_launch(sa_launch[0]), .sa_phase_sel(sa_phase_sel[0]), .sa_cap_req(sa_cap_req[0]),
    .sa_cap_valid(sa_cap_valid[0]), .sa_cap_bits(sa_cap_bits[0]),
    .func_in(func_in[0]), .func_out(func_out[0]),
    .puf_chal_valid(puf_chal_valid[0]), .puf_chal(puf_chal[0]), .puf_resp(puf_resp[0])
  );

  security_wrapper #(
    .SEQ_LEN(SEQ_LEN), .MEV_SEED(seed(1, 0)), .SUL_SEED(seed(1, 1)), .SA_CHAIN_LEN(SA_CHAIN_LEN),
    .HAS_FLOCK(1'b1), .FK_N(GPS_FK_N), .FK_W(GPS_FK_W), .FL_SEED(seed(1, 2)),
    .HAS_WM(1'b1), .WM_SEED(seed(1, 3)), .HAS_PUF(1'b0)
  ) u_gps (
    .clk, .rst_n, .tree_mode_reset(m_tmr[1]), .wrstn(m_wrstn[1]),
    .wr_en(m_wr_en[1]), .wr_addr(m_wr_addr[1]), .wr_data(m_wr_data[1]),
    .rd_addr(m_rd_addr[1]), .rd_data(rd_data[1]), .wmode(wmode[1]),
    .chain_so(chain_so[1]), .scan_out(scan_out[1]), .sa_shift_en(sa_shift_en[1]),
    .sa_launch(sa_launch[1]), .sa_phase_sel(sa_phase_sel[1]), .sa_cap_req(sa_cap_req[1]),
    .sa_cap_valid(sa_cap_valid[1]), .sa_cap_bits(sa_cap_bits[1]),
    .func_in(func_in[1]), .func_out(func_out[1]),
    .puf_chal_valid(puf_chal_valid[1]), .puf_chal(puf_chal[1]), .puf_resp(puf_resp[1])
  );

  security_wrapper #(
    .SEQ_LEN(SEQ_LEN), .MEV_SEED(seed(2, 0)), .SUL_SEED(seed(2, 1)), .SA_CHAIN_LEN(SA_CHAIN_LEN),
    .HAS_FLOCK(1'b0), .FK_N(1), .FK_W(32), .FL_SEED(seed(2, 2)),
    .HAS_WM(1'b0), .WM_SEED(seed(2, 3)), .HAS_PUF(1'b1)
  ) u_fir (
    .clk, .rst_n, .tree_mode_reset(m_tmr[2]), .wrstn(m_wrstn[2]),
    .wr_en(m_wr_en[2]), .wr_addr(m_wr_addr[2]), .wr_data(m_wr_data[2]),
    .rd_addr(m_rd_addr[2]), .rd_data(rd_data[2]), .wmode(wmode[2]),
    .chain_so(chain_so[2]), .scan_out(scan_out[2]), .sa_shift_en(sa_shift_en[2]),
    .sa_launch(sa_launch[2]), .sa_phase_sel(sa_phase_sel[2]), .sa_cap_req(sa_cap_req[2]),
    .sa_cap_valid(sa_cap_valid[2]), .sa_cap_bits(sa_cap_bits[2]),
    .func_in(func_in[2]), .func_out(func_out[2]),
    .puf_chal_valid(puf_chal_valid[2]), .puf_chal(puf_chal[2]), .puf_resp(puf_resp[2])
  );
endmodule
