// Linear phase shifter between the separate LFSR and the scan chains.
//
// Purely combinational XOR network: scan-chain input i is the XOR of
// lfsr_reseed_pkg::PS_XOR_INPUTS (three) LFSR stages,
//   out[i] = XOR over j of lfsr[(i*STRIDE + j*(R/3)) mod R],
// so an R-bit LFSR of any size can feed N chains and neighbouring chains do not
// receive shifted copies of one stage sequence.
//
// The document calls for a linear phase shifter of a known synthesis method
// without designing one; the tap formula is this design's own choice.
module phase_shifter #(
  parameter int unsigned R      = 28,
  parameter int unsigned N      = 8,
  parameter int unsigned STRIDE = 5
) (
  input  logic [R-1:0] lfsr,
  output logic [N-1:0] out
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      out[i] = 1'b0;
      for (int unsigned j = 0; j < lfsr_reseed_pkg::PS_XOR_INPUTS; j++)
        out[i] ^= lfsr[lfsr_reseed_pkg::ps_tap(i, j, R, STRIDE)];
    end
  end

  initial assert (R >= 3) else $error("phase_shifter needs R >= 3");

endmodule
