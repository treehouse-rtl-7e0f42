// Key Management Unit of the TREE.
//
// A content-addressable table of N_ENTRIES records searched by IP/layer ID.
// A hit returns where that IP's encrypted unlocking keys and Mode Enable
// Vectors are held in the memory module and the metadata of its protocol:
// key counts, sequential or combinational lock, burst or word transfer, and
// whether the IP carries a watermark or PUF. The keys themselves stay
// encrypted in the memory module until the policy controller decrypts them
// on their way to the layer.
//
// The ID-indexed CAM follows the document; the entry format (kmu_entry_t) is
// this design's choice. Entries are written by slot; lookup is
// combinational and the lowest matching slot wins.
module key_mgmt_unit
  import treehouse_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [$clog2(N_ENTRIES)-1:0] wr_idx,
  input  kmu_entry_t                   wr_entry,
  input  logic [7:0]                   lookup_id,
  output logic                         hit,
  output kmu_entry_t                   entry
);
  kmu_entry_t tab_q [N_ENTRIES];

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
endmodule
