// LFSR reseeding with seed compression: both decompressor architectures.
//
// Test cubes are stored on the tester as LFSR seeds, and the seeds themselves
// are Huffman-coded in b-bit blocks, so a tester bit stream is decoded into
// blocks, the blocks form seeds, and the seeds are expanded by an LFSR into
// full scan vectors. Two architectures of that scheme are instantiated side by
// side, each with its own tester stream, session control and scan chains:
//
//   int_* : integrated LFSR. The first Q cells of each of N scan chains form a
//           single N*Q-bit LFSR (default 8 chains x 5 cells = 40 bits, 27-cell
//           chains, 4-bit blocks), sized for a 214-cell circuit.
//   sep_* : separate LFSR with scan windows. A 28-bit LFSR and a phase shifter
//           fill 8 chains of 27 cells in 2 windows of 14 bit-slices; the first
//           sep_num_prpg patterns are pseudo-random (mixed-mode BIST).
//
// The circuit under test is outside this module: *_cells are its scan-cell
// values (the applied test vector) and *_capture_in its response, loaded in
// the capture cycle. Each side compacts responses in a 32-bit MISR whose
// signature is brought out. See integrated_decompressor and
// separate_decompressor for the sequencing and timing.
//
// The default sizes (40-bit integrated LFSR, 28-bit separate LFSR, 4-bit
// blocks, 214 scan cells) are the document's figures for its first benchmark
// circuit; the split into 8 chains, the chain length 27 and the window width
// 14 are this design's choices.
module lfsr_reseed_top
  import lfsr_reseed_pkg::*;
#(
  parameter int unsigned B      = 4,
  parameter int unsigned N      = 8,
  parameter int unsigned M      = 27,
  parameter int unsigned Q      = 5,
  parameter int unsigned R      = 28,
  parameter int unsigned W      = 14,
  parameter int unsigned NUM_WIN = 2,
  parameter logic [N*Q-1:0] INT_TAPS = 40'h40_0028_0001,
  parameter logic [R-1:0]   SEP_TAPS = 28'h200_0001,
  parameter int unsigned MAP_MUL   = 1,
  parameter int unsigned PS_STRIDE = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  // ---- integrated-LFSR side
  input  logic                int_cfg_we,
  input  logic [B-1:0]        int_cfg_node,
  input  logic                int_cfg_bit,
  input  logic                int_cfg_leaf,
  input  logic [B-1:0]        int_cfg_value,
  input  logic                int_in_valid,
  input  logic                int_in_bit,
  output logic                int_in_ready,
  input  logic                int_start,
  input  logic [15:0]         int_num_patterns,
  output logic                int_busy,
  output logic                int_done,
  output logic [15:0]         int_patterns_applied,
  output logic [N-1:0][M-1:0] int_cells,
  input  logic [N-1:0][M-1:0] int_capture_in,
  output logic [31:0]         int_signature,
  output scan_mode_e          int_mode,
  output logic                int_scan_en,
  output logic                int_slice_shift,
  // ---- separate-LFSR side
  input  logic                sep_cfg_we,
  input  logic [B-1:0]        sep_cfg_node,
  input  logic                sep_cfg_bit,
  input  logic                sep_cfg_leaf,
  input  logic [B-1:0]        sep_cfg_value,
  input  logic                sep_in_valid,
  input  logic                sep_in_bit,
  output logic                sep_in_ready,
  input  logic                sep_start,
  input  logic [15:0]         sep_num_prpg,
  input  logic [15:0]         sep_num_patterns,
  output logic                sep_busy,
  output logic                sep_done,
  output logic [15:0]         sep_patterns_applied,
  output logic [N-1:0][M-1:0] sep_cells,
  input  logic [N-1:0][M-1:0] sep_capture_in,
  output logic [31:0]         sep_signature,
  output logic                sep_seed_load,
  output logic                sep_lfsr_run,
  output logic                sep_prpg_mode,
  output logic                sep_capture
);

  integrated_decompressor #(.N(N), .M(M), .Q(Q), .B(B), .TAPS(INT_TAPS)) u_int (
    .clk, .rst_n,
    .cfg_we(int_cfg_we), .cfg_node(int_cfg_node), .cfg_bit(int_cfg_bit),
    .cfg_leaf(int_cfg_leaf), .cfg_value(int_cfg_value),
    .in_valid(int_in_valid), .in_bit(int_in_bit), .in_ready(int_in_ready),
    .start(int_start), .num_patterns(int_num_patterns),
    .busy(int_busy), .done(int_done), .patterns_applied(int_patterns_applied),
    .cells(int_cells), .capture_in(int_capture_in), .signature(int_signature),
    .mode(int_mode), .scan_en(int_scan_en), .slice_shift(int_slice_shift)
  );

  separate_decompressor #(.N(N), .M(M), .R(R), .B(B), .W(W), .NUM_WIN(NUM_WIN),
                          .TAPS(SEP_TAPS), .PS_STRIDE(PS_STRIDE), .MAP_MUL(MAP_MUL)) u_sep (
    .clk, .rst_n,
    .cfg_we(sep_cfg_we), .cfg_node(sep_cfg_node), .cfg_bit(sep_cfg_bit),
    .cfg_leaf(sep_cfg_leaf), .cfg_value(sep_cfg_value),
    .in_valid(sep_in_valid), .in_bit(sep_in_bit), .in_ready(sep_in_ready),
    .start(sep_start), .num_prpg(sep_num_prpg), .num_patterns(sep_num_patterns),
    .busy(sep_busy), .done(sep_done), .patterns_applied(sep_patterns_applied),
    .cells(sep_cells), .capture_in(sep_capture_in), .signature(sep_signature),
    .seed_load(sep_seed_load), .lfsr_run(sep_lfsr_run), .prpg_mode(sep_prpg_mode),
    .capture(sep_capture)
  );

endmodule
