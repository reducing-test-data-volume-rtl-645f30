// Test-vector decompressor with a separate LFSR and scan windows.
//
// The scan chains are left untouched. An R-bit LFSR drives them through a
// phase shifter. Because R would otherwise have to grow with the number of
// specified bits of a whole test cube, the chains are split conceptually into
// NUM_WIN scan windows of W bit-slices each, and one seed fills one window:
//   SEED    : K = ceil(R/B) Huffman-decoded blocks are written into the LFSR
//             one block per decoded codeword (parallel load).
//   RUN     : W cycles, the LFSR steps and every chain shifts in its phase
//             shifter output.
// After NUM_WIN windows the chains hold a complete test cube and CAPTURE
// applies one system clock. If NUM_WIN*W exceeds the chain length M, the first
// bits shifted are padding (don't-cares) and leave the far end of the chains.
//
// Mixed-mode BIST: the first num_prpg patterns of a session are pseudo-random.
// The LFSR starts from a fixed seed and simply runs NUM_WIN*W cycles per pattern
// (PR_RUN) without reseeding; only the remaining num_patterns deterministic
// patterns consume seeds from the tester.
//
// Captured responses shift out into the MISR while the next pattern shifts in;
// after the last pattern FLUSH shifts M cycles of zeros and 'done' rises.
//
// Interface: cfg_* writes the Huffman code table; in_valid/in_bit/in_ready is
// the tester bit stream; a 'start' pulse begins a session of num_prpg
// pseudo-random then num_patterns deterministic patterns (at least one in
// total); cells/capture_in connect the circuit under test; signature is the
// MISR. Timing per window: K codewords (one bit per cycle, plus one cycle per
// block) then W shift cycles; per pattern add one capture cycle.
//
// Scan windows, per-window reseeding with w autonomous cycles, the phase
// shifter, block-wise parallel loading and the mixed-mode option follow the
// document. The sequencing FSM, the flush, the fixed pseudo-random start seed
// and the handshakes are this design's choices.
module separate_decompressor
  import lfsr_reseed_pkg::*;
#(
  parameter int unsigned    N         = 8,    // scan chains
  parameter int unsigned    M         = 27,   // cells per chain
  parameter int unsigned    R         = 28,   // LFSR length
  parameter int unsigned    B         = 4,    // block size
  parameter int unsigned    W         = 14,   // scan window width in bit-slices
  parameter int unsigned    NUM_WIN   = 2,    // scan windows per test cube
  parameter logic [R-1:0]   TAPS      = 28'h200_0001,
  parameter int unsigned    PS_STRIDE = 5,
  parameter int unsigned    MAP_MUL   = 1,
  parameter int unsigned    MISR_W    = 32,
  parameter logic [MISR_W-1:0] MISR_TAPS = 32'h0040_0007
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_we,
  input  logic [B-1:0]        cfg_node,
  input  logic                cfg_bit,
  input  logic                cfg_leaf,
  input  logic [B-1:0]        cfg_value,
  input  logic                in_valid,
  input  logic                in_bit,
  output logic                in_ready,
  input  logic                start,
  input  logic [15:0]         num_prpg,
  input  logic [15:0]         num_patterns,
  output logic                busy,
  output logic                done,
  output logic [15:0]         patterns_applied,
  output logic [N-1:0][M-1:0] cells,
  input  logic [N-1:0][M-1:0] capture_in,
  output logic [MISR_W-1:0]   signature,
  // observation
  output logic                seed_load,    // a block is written into the LFSR
  output logic                lfsr_run,     // the LFSR steps and the chains shift
  output logic                prpg_mode,    // current pattern is pseudo-random
  output logic                capture
);

  localparam int unsigned K  = (R + B - 1) / B;
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned TW = $clog2(NUM_WIN * W + M + 1);
  localparam int unsigned WW = $clog2(NUM_WIN + 1);

  typedef enum logic [2:0] {S_IDLE, S_SEED, S_RUN, S_PR_RUN, S_CAPTURE, S_FLUSH} state_e;

  state_e         st;
  logic [KW-1:0]  blk_cnt;
  logic [TW-1:0]  cyc_cnt;
  logic [WW-1:0]  win_cnt;
  logic           resp_valid;
  logic [15:0]    total;
  logic           shift;

  logic           dec_valid;
  logic [B-1:0]   dec_block;
  logic [B-1:0]   dec_state;
  logic [R-1:0]   lfsr_state;
  logic [N-1:0]   ps_out, scan_in, scan_out;

  assign total = num_prpg + num_patterns;

  huffman_decoder #(.B(B)) u_dec (
    .clk, .rst_n,
    .cfg_we, .cfg_node, .cfg_bit, .cfg_leaf, .cfg_value,
    .in_valid, .in_bit, .in_ready,
    .out_valid(dec_valid), .out_block(dec_block), .out_ready(st == S_SEED),
    .state(dec_state)
  );

  assign seed_load = (st == S_SEED) && dec_valid;
  assign lfsr_run  = (st == S_RUN) || (st == S_PR_RUN);
  assign capture   = (st == S_CAPTURE);
  assign prpg_mode = (patterns_applied < num_prpg);
  assign shift     = lfsr_run || (st == S_FLUSH);
  assign scan_in   = (st == S_FLUSH) ? '0 : ps_out;

  separate_lfsr #(.R(R), .B(B), .K(K), .MAP_MUL(MAP_MUL), .TAPS(TAPS)) u_lfsr (
    .clk, .rst_n,
    .init(start && st == S_IDLE),
    .load_en(seed_load), .load_idx(blk_cnt), .load_block(dec_block),
    .run(lfsr_run),
    .state(lfsr_state)
  );

  phase_shifter #(.R(R), .N(N), .STRIDE(PS_STRIDE)) u_ps (.lfsr(lfsr_state), .out(ps_out));

  scan_chains #(.N(N), .M(M)) u_chains (
    .clk, .rst_n, .shift, .capture, .scan_in, .capture_in, .cells, .scan_out
  );

  misr #(.W(MISR_W), .N(N), .TAPS(MISR_TAPS)) u_misr (
    .clk, .rst_n,
    .clear(start && st == S_IDLE),
    .en(shift && resp_valid),
    .din(scan_out),
    .signature
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st               <= S_IDLE;
      blk_cnt          <= '0;
      cyc_cnt          <= '0;
      win_cnt          <= '0;
      resp_valid       <= 1'b0;
      patterns_applied <= '0;
      done             <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          patterns_applied <= '0;
          resp_valid       <= 1'b0;
          blk_cnt          <= '0;
          cyc_cnt          <= '0;
          win_cnt          <= '0;
          done             <= (total == 16'd0);
          if (total != 16'd0) st <= (num_prpg != 16'd0) ? S_PR_RUN : S_SEED;
        end
        S_SEED: if (dec_valid) begin
          if (32'(blk_cnt) == K - 1) begin
            blk_cnt <= '0;
            cyc_cnt <= '0;
            st      <= S_RUN;
          end else begin
            blk_cnt <= blk_cnt + 1'b1;
          end
        end
        S_RUN: begin
          cyc_cnt <= cyc_cnt + 1'b1;
          if (32'(cyc_cnt) == W - 1) begin
            if (32'(win_cnt) == NUM_WIN - 1) begin
              win_cnt <= '0;
              st      <= S_CAPTURE;
            end else begin
              win_cnt <= win_cnt + 1'b1;
              st      <= S_SEED;
            end
          end
        end
        S_PR_RUN: begin
          cyc_cnt <= cyc_cnt + 1'b1;
          if (32'(cyc_cnt) == NUM_WIN * W - 1) st <= S_CAPTURE;
        end
        S_CAPTURE: begin
          resp_valid       <= 1'b1;
          patterns_applied <= patterns_applied + 16'd1;
          cyc_cnt          <= '0;
          if (patterns_applied + 16'd1 >= total)        st <= S_FLUSH;
          else if (patterns_applied + 16'd1 < num_prpg) st <= S_PR_RUN;
          else                                          st <= S_SEED;
        end
        S_FLUSH: begin
          cyc_cnt <= cyc_cnt + 1'b1;
          if (32'(cyc_cnt) == M - 1) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  initial assert (NUM_WIN * W >= M) else
    $error("separate_decompressor: the scan windows must cover the chains");

endmodule
