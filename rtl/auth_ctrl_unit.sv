// Authentication Control Unit of the TREE.
//
// A content-addressable table of N_ENTRIES records, searched by IP ID, that
// holds each IP's scan-authentication challenge and golden 128-bit signature
// and the challenge and golden response of its watermark or PUF, all
// encrypted. Beside it sits the comparison logic: a generated response
// matches the (decrypted) golden one when at most MAX_HD of the bits selected
// by cmp_mask differ, which tolerates the noise of a delay PUF.
//
// The CAM of challenges and golden responses and the comparison logic follow
// the document; the entry format and the Hamming-distance tolerance are this
// design's choices. Writes go to the slot given by wr_idx; lookup and compare
// are combinational.
module auth_ctrl_unit
  import treehouse_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 8,
  parameter int unsigned SIG_W     = 128,
  parameter int unsigned MAX_HD    = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [$clog2(N_ENTRIES)-1:0] wr_idx,
  input  acu_entry_t                   wr_entry,
  input  logic [7:0]                   lookup_id,
  output logic                         hit,
  output acu_entry_t                   entry,
  input  logic [SIG_W-1:0]             cmp_a,
  input  logic [SIG_W-1:0]             cmp_b,
  input  logic [SIG_W-1:0]             cmp_mask,
  output logic                         cmp_match
);
  acu_entry_t tab_q [N_ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < N_ENTRIES; i++) tab_q[i] <= '0;
    else if (wr_en) tab_q[wr_idx] <= wr_entry;
  end

  always_comb begin
    hit   = 1'b0;
    entry = '0;
    for (int i = N_ENTRIES - 1; i >= 0; i--) begin
      if (tab_q[i].valid && tab_q[i].id == lookup_id) begin
        hit   = 1'b1;
        entry = tab_q[i];
      end
    end
  end

  logic [$clog2(SIG_W+1)-1:0] hd;
  always_comb begin
    hd = '0;
    for (int b = 0; b < SIG_W; b++)
      if ((cmp_a[b] ^ cmp_b[b]) && cmp_mask[b]) hd = hd + 1'b1;
  end
  assign cmp_match = (32'(hd) <= MAX_HD);
endmodule
