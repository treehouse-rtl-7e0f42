// TREE (Trust Enforcing Entity) module, in the trusted layer of the 3DIC.
//
// Groups the memory module (128 KB of encrypted HSM data), the Key
// Management Unit, the Authentication Control Unit with its comparison logic,
// the Encryption Unit and the policy controller that runs the provisioning
// protocol over the security wrappers of the untrusted layers. The design
// house reaches it through the host port: it reads the TREE's own PUF
// fingerprint to check that the TREE is genuine, loads encrypted HSM records
// into the memory and the two CAMs, and issues one provisioning command per
// IP with that layer's decrypt key. While a command runs the policy
// controller owns the memory port; host writes are ignored then.
//
// The partition into these units follows the document. In the document the
// TREE is a RISC-V microcontroller with an Ethernet link; here the protocol
// runs in the hardware policy controller and the Ethernet link is replaced
// by the plain host port.
//
// Wrapper side: w_idx selects one IP; mode pins for every IP; the register
// port is shared and only the selected IP's write enable rises.
module tree_module
  import treehouse_pkg::*;
#(
  parameter int unsigned N_IPS     = 3,
  parameter int unsigned SEQ_LEN   = 12,
  parameter int unsigned MEM_BYTES = 131072,
  parameter int unsigned N_ENTRIES = 8,
  parameter int unsigned MAX_HD    = 8,
  localparam int unsigned AW = $clog2(MEM_BYTES / 4),
  localparam int unsigned EW = $clog2(N_ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host port (stands in for the secure Ethernet link)
  input  logic             host_mem_we,
  input  logic [AW-1:0]    host_mem_addr,
  input  logic [31:0]      host_mem_wdata,
  input  logic             host_kmu_we,
  input  logic [EW-1:0]    host_kmu_idx,
  input  kmu_entry_t       host_kmu_entry,
  input  logic             host_acu_we,
  input  logic [EW-1:0]    host_acu_idx,
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
  // security wrapper side
  output logic             w_tmr   [N_IPS],
  output logic             w_wrstn [N_IPS],
  output logic             w_wr_en [N_IPS],
  output logic [4:0]       w_wr_addr,
  output logic [31:0]      w_wr_data,
  output logic [4:0]       w_rd_addr,
  input  logic [31:0]      w_rd_data [N_IPS]
);
  // TREE fingerprint, read by the design house before provisioning.
  assign host_puf_resp = tree_puf_resp;

  logic [AW-1:0] pc_mem_addr;
  logic [31:0]   mem_rdata;
  hsm_memory #(.BYTES(MEM_BYTES)) u_mem (
    .clk, .we(host_mem_we && !prov_busy), .addr(prov_busy ? pc_mem_addr : host_mem_addr),
    .wdata(host_mem_wdata), .rdata(mem_rdata)
  );

  logic [7:0]  kmu_id, acu_id;
  logic        kmu_hit, acu_hit, cmp_match;
  kmu_entry_t  kmu_entry;
  acu_entry_t  acu_entry;
  logic [127:0] cmp_a, cmp_b, cmp_mask;

  key_mgmt_unit #(.N_ENTRIES(N_ENTRIES)) u_kmu (
    .clk, .rst_n, .wr_en(host_kmu_we), .wr_idx(host_kmu_idx), .wr_entry(host_kmu_entry),
    .lookup_id(kmu_id), .hit(kmu_hit), .entry(kmu_entry)
  );

  auth_ctrl_unit #(.N_ENTRIES(N_ENTRIES), .MAX_HD(MAX_HD)) u_acu (
    .clk, .rst_n, .wr_en(host_acu_we), .wr_idx(host_acu_idx), .wr_entry(host_acu_entry),
    .lookup_id(acu_id), .hit(acu_hit), .entry(acu_entry),
    .cmp_a, .cmp_b, .cmp_mask, .cmp_match
  );

  logic        cr_in_valid, cr_out_valid;
  logic [63:0] cr_key;
  logic [31:0] cr_tweak, cr_din, cr_dout;
  crypt_unit u_crypt (
    .clk, .rst_n, .in_valid(cr_in_valid), .key(cr_key), .tweak(cr_tweak), .din(cr_din),
    .out_valid(cr_out_valid), .dout(cr_dout)
  );

  logic [$clog2(N_IPS)-1:0] w_idx;
  wmode_e                   ip_mode [N_IPS];
  logic                     pc_wr_en;

  policy_ctrl #(.N_IPS(N_IPS), .SEQ_LEN(SEQ_LEN), .AW(AW)) u_pc (
    .clk, .rst_n, .start(prov_start), .ip_id(prov_id), .dec_key(prov_key),
    .busy(prov_busy), .done(prov_done), .pass(prov_pass), .fail_step(prov_fail_step),
    .layer_disabled,
    .kmu_id, .kmu_hit, .kmu_entry, .acu_id, .acu_hit, .acu_entry,
    .cmp_a, .cmp_b, .cmp_mask, .cmp_match,
    .mem_addr(pc_mem_addr), .mem_rdata,
    .cr_in_valid, .cr_key, .cr_tweak, .cr_din, .cr_out_valid, .cr_dout,
    .w_idx, .ip_mode, .w_wr_en(pc_wr_en), .w_wr_addr, .w_wr_data, .w_rd_addr,
    .w_rd_data(w_rd_data[w_idx])
  );

  for (genvar i = 0; i < N_IPS; i++) begin : g_ip
    assign w_tmr[i]   = ip_mode[i][1];
    assign w_wrstn[i] = ip_mode[i][0];
    assign w_wr_en[i] = pc_wr_en && w_idx == $bits(w_idx)'(i);
  end
endmodule
