// Shared types and helper functions for the LFSR-reseeding test decompressors.
//
// The decompressors expand compressed LFSR seeds into scan test vectors. A seed
// is sent by the tester as a stream of Huffman codewords, one codeword per b-bit
// block of the seed. This package holds what several modules of that datapath
// share: the operating mode of a scan architecture, the entry format of the
// Huffman decoder's code table, and the formula that places the XOR taps of the
// phase shifter. Nothing here has timing of its own.
//
// The three scan modes (scan, system, decompression) follow the integrated-LFSR
// architecture; the tap formula of the phase shifter is this design's choice,
// since the phase shifter is taken as given and not designed.
package lfsr_reseed_pkg;

  // Operating mode of a scan architecture.
  //   MODE_SCAN   : every scan chain shifts by one cell, fed from its scan input
  //   MODE_SYSTEM : capture cycle, all scan cells load the circuit response
  //   MODE_DECOMP : the LFSR part runs autonomously and feeds the rest of the chains
  typedef enum logic [1:0] {
    MODE_SCAN   = 2'd0,
    MODE_SYSTEM = 2'd1,
    MODE_DECOMP = 2'd2
  } scan_mode_e;

  // Number of XOR inputs per phase-shifter output.
  localparam int unsigned PS_XOR_INPUTS = 3;

  // LFSR stage feeding input j (0..PS_XOR_INPUTS-1) of phase-shifter output i.
  // The three stages of one output are r/3 apart, so they are always distinct
  // when r >= 3; successive outputs start 'stride' stages apart.
  function automatic int unsigned ps_tap(int unsigned i, int unsigned j,
                                         int unsigned r, int unsigned stride);
    return (i * stride + j * (r / 3)) % r;
  endfunction

  // LFSR flip-flop written by bit 'slot' of the seed's block sequence
  // (slot = block_index * b + bit_in_block). The slots are interleaved by a
  // multiplier that must be coprime with the slot count; 1 keeps blocks contiguous.
  function automatic int unsigned block_slot_to_ff(int unsigned slot, int unsigned mul,
                                                   int unsigned nslots);
    return (slot * mul) % nslots;
  endfunction

endpackage
