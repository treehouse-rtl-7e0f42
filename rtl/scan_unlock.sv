// Scan unlock (scan lock) of one IP.
//
// The IP's scan-out ports are held at zero by an AND gate until a complete
// sequence of N_KEYS correct KEY_W-bit unlocking vectors has been applied.
// A counter counts consecutive correct vectors; a wrong vector sends it back
// to zero, so a wrong key or a wrong number of keys never opens the scan
// outputs. The expected vectors come from a key expansion of the embedded
// secret LOCK_SEED. Vectors are only accepted while the TREE MODE FSM has
// enabled the scan unlock operation (enable). Once open, the scan outputs stay
// open until reset so that test mode can follow.
//
// The counter-and-AND-gate structure, 16 vectors of 32 bits and 16 scan
// chains follow the document; the reset-to-zero on a wrong vector and the
// key expansion are this design's choices. The 16 gated scan-out bits are the
// response vector observed for each unlocking vector.
//
// Timing: one vector per cycle; unlocked rises the cycle after the last one.
module scan_unlock
  import treehouse_pkg::*;
#(
  parameter int unsigned N_KEYS    = 16,
  parameter int unsigned KEY_W     = 32,
  parameter int unsigned N_CHAINS  = 16,
  parameter logic [63:0] LOCK_SEED = 64'hC0FF_EE00_5CA1_AB1E
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic                  key_valid,
  input  logic [KEY_W-1:0]      key,
  input  logic [N_CHAINS-1:0]   chain_so,
  output logic [N_CHAINS-1:0]   scan_out,
  output logic                  unlocked,
  output logic [$clog2(N_KEYS+1)-1:0] count
);
  localparam int unsigned CW = $clog2(N_KEYS + 1);
  localparam int unsigned NW = (KEY_W + 63) / 64;

  // Key expansion: vector i is NW mixed words of LOCK_SEED.
  logic [KEY_W-1:0] key_tab [N_KEYS];
  for (genvar i = 0; i < N_KEYS; i++) begin : g_key
    logic [NW*64-1:0] w;
    for (genvar j = 0; j < NW; j++) begin : g_w
      assign w[j*64 +: 64] = th_mix(LOCK_SEED, i * NW + j);
    end
    assign key_tab[i] = w[KEY_W-1:0];
  end

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
    end else if (enable && key_valid && cnt_q != CW'(N_KEYS)) begin
      if (key == key_tab[cnt_q[$clog2(N_KEYS)-1:0]]) cnt_q <= cnt_q + 1'b1;
      else                                           cnt_q <= '0;
    end
  end

  assign unlocked = (cnt_q == CW'(N_KEYS));
  assign count    = cnt_q;
  assign scan_out = chain_so & {N_CHAINS{unlocked}};
endmodule
