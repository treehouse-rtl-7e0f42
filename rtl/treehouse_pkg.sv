// Shared definitions for the TREEHOUSE 3DIC security infrastructure.
//
// Holds the wrapper modes selected by the TREE_MODE_RESET / WRSTN pin pair,
// the four security operations a security wrapper can enable, the register
// map of the 32-register security wrapper, the entry formats of the TREE's
// key-management and authentication CAMs, and th_mix(), the keyed mixing
// function from which every embedded secret vector is expanded.
//
// The four pin-selected modes follow the document. The register map, the CAM
// entry formats and the mixing function (a splitmix64-style finaliser) are
// this design's own choices: the document does not give them.
package treehouse_pkg;

  // Wrapper modes, encoded as {TREE_MODE_RESET, WRSTN}.
  typedef enum logic [1:0] {
    WM_FUNCTIONAL = 2'b00,
    WM_TEST       = 2'b01,
    WM_TREE       = 2'b10,
    WM_ATSPEED    = 2'b11
  } wmode_e;

  // Security operations enabled by Mode Enable Vector sequences.
  typedef enum logic [1:0] {
    OP_SCAN_UNLOCK = 2'd0,
    OP_SCAN_AUTH   = 2'd1,
    OP_FUNC_UNLOCK = 2'd2,
    OP_HSC_AUTH    = 2'd3   // watermark or IP PUF check
  } sec_op_e;

  // Security wrapper register map (32 x 32-bit registers).
  localparam int unsigned REG_MODE      = 0;   // RO: Mode Register; writes are Mode Enable Vectors
  localparam int unsigned REG_SUL_DATA  = 1;   // WO: scan unlock key vector
  localparam int unsigned REG_SUL_STS   = 2;   // RO: {unlocked, count}
  localparam int unsigned REG_FUL_DATA  = 3;   // WO: functional key, 32-bit chunks, LSB chunk first
  localparam int unsigned REG_FUL_STS   = 4;   // RO: {unlocked, step}
  localparam int unsigned REG_WM_CHAL   = 5;   // WO: watermark challenge
  localparam int unsigned REG_WM_RESP   = 6;   // RO: watermark response
  localparam int unsigned REG_SA_CHAL   = 7;   // WO: scan authentication challenge (starts it)
  localparam int unsigned REG_SA_STS    = 8;   // RO: {done, busy}
  localparam int unsigned REG_SA_SIG0   = 9;   // RO: signature bits 31:0 .. REG_SA_SIG0+3: 127:96
  localparam int unsigned REG_PUF_CHAL  = 13;  // WO: IP PUF challenge
  localparam int unsigned REG_PUF_RESP  = 14;  // RO: IP PUF response
  localparam int unsigned REG_GP0       = 15;  // RW general HSM buffer registers 15..31

  // Mode Register fields.
  localparam int unsigned MODE_KL_CTL = 0;
  localparam int unsigned MODE_KL_STS = 1;

  // Key Management Unit entry: where an IP's encrypted HSM data lives.
  typedef struct packed {
    logic        valid;
    logic [7:0]  id;
    logic [14:0] base;        // word address of the IP's record in the memory module
    logic [4:0]  n_ul_keys;   // scan unlock key vectors
    logic [15:0] n_fk_words;  // functional key words (0: no functional lock)
    logic        seq_lock;    // unlocking protocol: 1 sequential, 0 combinational
    logic        burst;       // transfer: 1 burst, 0 word
    logic        has_wm;      // IP carries a watermark
    logic        has_puf;     // IP carries a PUF
  } kmu_entry_t;

  // Authentication Control Unit entry (challenge/golden fields encrypted).
  typedef struct packed {
    logic         valid;
    logic [7:0]   id;
    logic [31:0]  sa_chal;     // scan authentication challenge
    logic [127:0] sa_golden;   // golden scan signature
    logic [127:0] sa_mask;     // signature bits that are compared (plaintext)
    logic [31:0]  hsc_chal;    // watermark / PUF challenge
    logic [31:0]  hsc_golden;  // golden watermark / PUF response
  } acu_entry_t;

  // Keyed 64-bit mixing function (splitmix64 finaliser on seed + (idx+1)*phi).
  function automatic logic [63:0] th_mix(input logic [63:0] seed, input logic [31:0] idx);
    logic [63:0] z;
    z = seed + 64'(idx + 32'd1) * 64'h9E37_79B9_7F4A_7C15;
    z = (z ^ (z >> 30)) * 64'hBF58_476D_1CE4_E5B9;
    z = (z ^ (z >> 27)) * 64'h94D0_49BB_1331_11EB;
    return z ^ (z >> 31);
  endfunction

  // Expected Mode Enable Vector number `step` of the chain for operation `op`.
  // The first vector of each chain carries the operation in its two low bits,
  // so the four chains never start with the same vector.
  function automatic logic [15:0] th_mev(input logic [63:0] seed, input int unsigned op,
                                         input int unsigned step);
    logic [63:0] z;
    z = th_mix(seed, 32'(op * 256 + step));
    if (step == 0) return {z[15:2], 2'(op)};
    return z[15:0];
  endfunction

endpackage
