// Multiple-input signature register (MISR).
//
// Compacts the N scan-chain outputs into a W-bit signature, one slice per
// enabled clock. The register is a modular LFSR with characteristic polynomial
// TAPS (bit k = coefficient of x^k, x^W implied); the input slice is XORed into
// the stages after the shift, input i into stage i mod W. The default is the
// primitive polynomial x^32 + x^22 + x^2 + x + 1.
//
// Interface and timing: 'clear' (synchronous, priority over 'en') zeroes the
// signature; in each cycle with en = 1 the signature becomes
// step(signature) ^ din. The signature is a registered output.
//
// The document names the MISR as the response compactor; width, polynomial and
// input folding are this design's choices.
module misr #(
  parameter int unsigned    W    = 32,
  parameter int unsigned    N    = 8,
  parameter logic [W-1:0]   TAPS = 32'h0040_0007
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [N-1:0] din,
  output logic [W-1:0] signature
);

  logic [W-1:0] stepped;
  logic [W-1:0] folded;

  always_comb begin
    stepped = {signature[W-2:0], 1'b0} ^ (TAPS & {W{signature[W-1]}});
    folded  = '0;
    for (int unsigned i = 0; i < N; i++) folded[i % W] ^= din[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= '0;
    else if (clear) signature <= '0;
    else if (en)    signature <= stepped ^ folded;
  end

endmodule
