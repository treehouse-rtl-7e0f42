// Functional (sequential) lock of one IP.
//
// Models an IP locked by an obfuscation FSM: until the correct sequence of
// N_KEYS unlocking patterns, each KEY_W bits wide, has been applied over the
// unlocking flops, the IP's DATA_W-bit output is corrupted. The FSM state is
// the number of consecutive correct patterns; a wrong pattern returns it to
// the first obfuscation state. The expected pattern for each state is
// expanded from the embedded secret LOCK_SEED by a small key expansion, so
// long sequences (1334 x 352 bits for AES) need no stored table. Patterns are
// only accepted while the TREE MODE FSM has enabled functional unlocking.
//
// The key counts and widths (66 x 60 for GPS, 1334 x 352 for AES) follow the
// document. The lock of the document's benchmark IPs is not given, so the
// corruption (XOR with a fixed mask) and the key expansion are this design's
// own.
//
// Timing: one pattern per cycle; unlocked rises the cycle after the last one.
module func_lock
  import treehouse_pkg::*;
#(
  parameter int unsigned N_KEYS    = 66,
  parameter int unsigned KEY_W     = 60,
  parameter int unsigned DATA_W    = 32,
  parameter logic [63:0] LOCK_SEED = 64'h0BF5_CA7E_D00D_F00D
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              key_valid,
  input  logic [KEY_W-1:0]  key,
  input  logic [DATA_W-1:0] func_in,
  output logic [DATA_W-1:0] func_out,
  output logic              unlocked,
  output logic [$clog2(N_KEYS+1)-1:0] step
);
  localparam int unsigned SW = $clog2(N_KEYS + 1);
  localparam int unsigned NW = (KEY_W + 63) / 64;
  localparam logic [63:0] OBF_MASK = th_mix(LOCK_SEED, 32'hFFFF_FFFF);

  logic [SW-1:0]      step_q;
  logic [NW*64-1:0]   exp_w;

  // Expected pattern for the current obfuscation state.
  always_comb begin
    for (int j = 0; j < NW; j++)
      exp_w[j*64 +: 64] = th_mix(LOCK_SEED, 32'(step_q) * 32'(NW) + 32'(j));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q <= '0;
    end else if (enable && key_valid && step_q != SW'(N_KEYS)) begin
      if (key == exp_w[KEY_W-1:0]) step_q <= step_q + 1'b1;
      else                         step_q <= '0;
    end
  end

  assign unlocked = (step_q == SW'(N_KEYS));
  assign step     = step_q;
  assign func_out = unlocked ? func_in : func_in ^ DATA_W'(OBF_MASK);
endmodule
