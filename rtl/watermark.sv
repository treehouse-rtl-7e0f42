// Challenge-response watermark of one IP.
//
// The watermark is combinational logic embedded in the IP: the response is a
// keyed mixing of the challenge with the secret WM_SECRET. The response is
// registered, so verification takes one clock cycle as in the document. The
// mixing function is this design's choice; the document's watermarking scheme
// is not given.
//
// Timing: response and resp_valid one cycle after chal_valid.
module watermark
  import treehouse_pkg::*;
#(
  parameter int unsigned W         = 32,
  parameter logic [63:0] WM_SECRET = 64'h3A7E_4A2C_0000_6B5D
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         chal_valid,
  input  logic [W-1:0] challenge,
  output logic         resp_valid,
  output logic [W-1:0] response
);
  logic [63:0] mixed;
  assign mixed = th_mix(WM_SECRET, 32'(challenge));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      response   <= '0;
    end else begin
      resp_valid <= chal_valid;
      if (chal_valid) response <= W'(mixed);
    end
  end
endmodule
