// Scan chains with an integrated LFSR.
//
// N scan chains of M cells each. In decompression mode the first Q cells of
// every chain are joined into one modular (internal-XOR) LFSR of N*Q bits, so no
// separate LFSR is needed: the seed is shifted into those cells, the LFSR runs
// autonomously, and the remaining M-Q cells of each chain keep shifting, fed
// from the last LFSR cell of their own chain (a tap point of the LFSR).
//
// LFSR stage numbering: stage k = c*Q + j is cell j of chain c (cell 0 is the
// scan-input end, cell M-1 the scan-output end). Each step moves stage k-1 into
// stage k; the last stage (chain N-1, cell Q-1) is the feedback bit, which
// enters stage 0 and is XORed into every stage k whose TAPS bit is set. TAPS
// bit k is the coefficient of x^k of the characteristic polynomial (bit 0 = 1,
// x^(N*Q) implied). The default is x^40 + x^38 + x^21 + x^19 + 1, a primitive
// polynomial for the 40-bit LFSR.
//
// Modes (input 'mode', acting only in cycles with en = 1; otherwise all cells hold):
//   MODE_SCAN   : every chain shifts one cell, scan_in[c] enters cell 0
//   MODE_SYSTEM : capture, every cell loads capture_in (the circuit response)
//   MODE_DECOMP : the LFSR steps once and the chains' other cells shift once
// cells drives the circuit under test; scan_out[c] = cell M-1 of chain c.
//
// The three modes, the Q cells per chain, the N*Q-bit length and the tap-point
// feeding of the remaining cells follow the document. The chain order of the
// LFSR, the polynomial, the hold enable and the reset to zero are this design's
// choices.
module integrated_scan_lfsr
  import lfsr_reseed_pkg::*;
#(
  parameter int unsigned     N    = 8,    // scan chains
  parameter int unsigned     M    = 27,   // cells per chain
  parameter int unsigned     Q    = 5,    // LFSR cells per chain
  parameter logic [N*Q-1:0]  TAPS = 40'h40_0028_0001
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  scan_mode_e            mode,
  input  logic                  en,
  input  logic [N-1:0]          scan_in,
  input  logic [N-1:0][M-1:0]   capture_in,
  output logic [N-1:0][M-1:0]   cells,
  output logic [N-1:0]          scan_out
);

  localparam int unsigned L = N * Q;

  logic [N-1:0][M-1:0] shift_next;
  logic [N-1:0][M-1:0] decomp_next;
  logic                fb;

  assign fb = cells[N-1][Q-1];

  always_comb begin
    for (int unsigned c = 0; c < N; c++) begin
      shift_next[c] = {cells[c][M-2:0], scan_in[c]};
      for (int unsigned j = 0; j < M; j++) begin
        if (j >= Q) begin
          decomp_next[c][j] = cells[c][j-1];
        end else if (c == 0 && j == 0) begin
          decomp_next[c][j] = fb;
        end else if (j == 0) begin
          decomp_next[c][j] = cells[c-1][Q-1] ^ (TAPS[c*Q] & fb);
        end else begin
          decomp_next[c][j] = cells[c][j-1] ^ (TAPS[c*Q+j] & fb);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells <= '0;
    end else if (en) begin
      unique case (mode)
        MODE_SCAN:   cells <= shift_next;
        MODE_SYSTEM: cells <= capture_in;
        MODE_DECOMP: cells <= decomp_next;
        default:     cells <= cells;
      endcase
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < N; c++) scan_out[c] = cells[c][M-1];
  end

  initial begin
    assert (Q >= 1 && M > Q) else $error("integrated_scan_lfsr needs 1 <= Q < M");
    assert (L >= 2 && TAPS[0]) else $error("integrated_scan_lfsr: TAPS bit 0 must be set");
  end

endmodule
