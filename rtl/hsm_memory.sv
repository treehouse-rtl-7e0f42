// Memory module of the TREE: single-port synchronous RAM.
//
// Holds the encrypted HSM data provisioned by the design house (Mode Enable
// Vectors, scan unlock keys and functional unlock keys of every IP). BYTES
// bytes organised as 32-bit words, 128 KB by default as in the document.
// One access per cycle: a write when we is high, otherwise a read whose data
// appears on rdata the next cycle. The port protocol is this design's choice.
module hsm_memory #(
  parameter int unsigned BYTES = 131072,
  parameter int unsigned W     = 32,
  localparam int unsigned DEPTH = BYTES / (W / 8),
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end
endmodule
