// Encryption Unit of the TREE.
//
// Decrypts (and, being symmetric, encrypts) 32-bit HSM words with the
// layer's 64-bit decrypt key. Each word is XORed with a keystream word
// th_mix(key, tweak), where the tweak is the word's address, so equal
// plaintexts at different addresses encrypt differently. This counter-mode
// keystream is this design's choice: the document does not name its cipher,
// and the mixing function is a placeholder, not a vetted cipher; a block
// cipher core can replace it behind the same port.
//
// Timing: dout / out_valid one cycle after din / in_valid.
module crypt_unit
  import treehouse_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] key,
  input  logic [31:0] tweak,
  input  logic [31:0] din,
  output logic        out_valid,
  output logic [31:0] dout
);
  logic [63:0] ks;
  assign ks = th_mix(key, tweak);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) dout <= din ^ ks[31:0] ^ ks[63:32];
    end
  end
endmodule
