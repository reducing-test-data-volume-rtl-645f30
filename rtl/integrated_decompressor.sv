// Test-vector decompressor with an integrated LFSR (scan cells form the LFSR).
//
// Each test cube is stored on the tester as one LFSR seed of N*Q bits, and the
// seed is stored Huffman-coded in B-bit blocks. Per pattern the sequence is:
//   LOAD    (scan mode, Q shift cycles): the decoder turns the tester bits into
//           blocks, the blocks are collected into N-bit bit-slices, and each
//           slice is shifted into all N chains at once. The seed is cut into
//           blocks in slice order: bit j of the seed's bit stream is chain
//           (j mod N) of slice (j div N); when N is a multiple of B, block i of
//           a slice drives chains i*B .. i*B+B-1. If N*Q is not a multiple of B,
//           the last block of a seed carries don't-care padding bits, which are
//           dropped. After Q slices the seed sits in the first Q cells of every
//           chain.
//   DECOMP  (decompression mode, M-Q cycles): the N*Q-bit LFSR runs on its own
//           and fills the remaining M-Q cells of every chain.
//   CAPTURE (system mode, 1 cycle): the response of the circuit under test is
//           captured into all scan cells.
// The next pattern's LOAD and DECOMP shift the captured response out into the
// MISR. After the last pattern, FLUSH shifts M cycles of zeros (scan mode) so
// the last response also reaches the MISR, and 'done' rises.
// Decoded blocks gather in a small bit accumulator (N+B-1 bits). It takes a
// block whenever it holds fewer than N bits, also while the chains are
// decompressing or capturing, so the next seed is decoded ahead (prefetch).
// The decoder, and through it the tester, stalls while the accumulator is full.
//
// Interface: cfg_* writes the Huffman code table (see huffman_decoder);
// in_valid/in_bit/in_ready is the tester bit stream; a 'start' pulse with
// num_patterns >= 1 begins a session (the MISR is cleared); busy is high until
// done; cells drive the circuit under test and capture_in returns its response;
// signature is the MISR. mode/scan_en/slice_shift expose the scan control for
// observation. A pattern takes max(decode time, M+1) cycles once decoding runs
// ahead; decoding a seed takes about ceil(N*Q/B) * (mean codeword length + 1)
// cycles.
//
// The three modes, the Q-slice seed load with N/B blocks per scan cycle, the
// don't-care padding of the last block, the M-Q cycle decompression and the
// response unload into the MISR follow the document. The accumulator with
// prefetch, the flush, the handshakes and the start/done control are this
// design's choices.
module integrated_decompressor
  import lfsr_reseed_pkg::*;
#(
  parameter int unsigned    N         = 8,
  parameter int unsigned    M         = 27,
  parameter int unsigned    Q         = 5,
  parameter int unsigned    B         = 4,
  parameter logic [N*Q-1:0] TAPS      = 40'h40_0028_0001,
  parameter int unsigned    MISR_W    = 32,
  parameter logic [MISR_W-1:0] MISR_TAPS = 32'h0040_0007
) (
  input  logic                clk,
  input  logic                rst_n,
  // Huffman code table
  input  logic                cfg_we,
  input  logic [B-1:0]        cfg_node,
  input  logic                cfg_bit,
  input  logic                cfg_leaf,
  input  logic [B-1:0]        cfg_value,
  // tester bit stream
  input  logic                in_valid,
  input  logic                in_bit,
  output logic                in_ready,
  // session control
  input  logic                start,
  input  logic [15:0]         num_patterns,
  output logic                busy,
  output logic                done,
  output logic [15:0]         patterns_applied,
  // circuit under test
  output logic [N-1:0][M-1:0] cells,
  input  logic [N-1:0][M-1:0] capture_in,
  output logic [MISR_W-1:0]   signature,
  // observation
  output scan_mode_e          mode,
  output logic                scan_en,
  output logic                slice_shift
);

  localparam int unsigned SEED_BITS = N * Q;
  localparam int unsigned NBLK      = (SEED_BITS + B - 1) / B;        // blocks per seed
  localparam int unsigned LAST_BITS = SEED_BITS - (NBLK - 1) * B;     // used bits of the last one
  localparam int unsigned AW        = N + B - 1;                      // accumulator bits
  localparam int unsigned AC        = $clog2(AW + 1);
  localparam int unsigned KB        = (NBLK > 1) ? $clog2(NBLK) : 1;
  localparam int unsigned SW = $clog2(Q + 1);
  localparam int unsigned CW = $clog2(M + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_DECOMP, S_CAPTURE, S_FLUSH} state_e;

  state_e         st;
  logic [AW-1:0]  acc_q;
  logic [AC-1:0]  acc_cnt;
  logic [KB-1:0]  seed_blk;
  logic           slice_full;
  logic           dec_take;
  logic [AC-1:0]  take_bits;
  logic [AW-1:0]  take_vec;
  logic [SW-1:0]  slice_cnt;
  logic [CW-1:0]  cyc_cnt;
  logic           resp_valid;
  logic           last_pat;

  logic           dec_valid, dec_ready;
  logic [B-1:0]   dec_block;
  logic [B-1:0]   dec_state;
  logic [N-1:0]   scan_in, scan_out;

  huffman_decoder #(.B(B)) u_dec (
    .clk, .rst_n,
    .cfg_we, .cfg_node, .cfg_bit, .cfg_leaf, .cfg_value,
    .in_valid, .in_bit, .in_ready,
    .out_valid(dec_valid), .out_block(dec_block), .out_ready(dec_ready),
    .state(dec_state)
  );

  // decoded blocks are taken whenever a session runs and the accumulator has room
  assign slice_full  = (32'(acc_cnt) >= N);
  assign dec_ready   = (st == S_LOAD || st == S_DECOMP || st == S_CAPTURE) && !slice_full;
  assign dec_take    = dec_valid && dec_ready;
  assign slice_shift = (st == S_LOAD) && slice_full;
  assign last_pat    = (patterns_applied + 16'd1 >= num_patterns);

  always_comb begin
    mode    = MODE_SCAN;
    scan_en = 1'b0;
    scan_in = acc_q[N-1:0];
    unique case (st)
      S_LOAD:    begin mode = MODE_SCAN;   scan_en = slice_full; end
      S_DECOMP:  begin mode = MODE_DECOMP; scan_en = 1'b1;       end
      S_CAPTURE: begin mode = MODE_SYSTEM; scan_en = 1'b1;       end
      S_FLUSH:   begin mode = MODE_SCAN;   scan_en = 1'b1; scan_in = '0; end
      default:   ;
    endcase
  end

  integrated_scan_lfsr #(.N(N), .M(M), .Q(Q), .TAPS(TAPS)) u_scan (
    .clk, .rst_n, .mode, .en(scan_en), .scan_in, .capture_in, .cells, .scan_out
  );

  misr #(.W(MISR_W), .N(N), .TAPS(MISR_TAPS)) u_misr (
    .clk, .rst_n,
    .clear(start && st == S_IDLE),
    .en(scan_en && resp_valid && mode != MODE_SYSTEM),
    .din(scan_out),
    .signature
  );

  // accumulator: decoded blocks are appended above the bits already held; a
  // slice shift removes the lowest N bits. The last block of every seed only
  // contributes LAST_BITS bits, the rest of it is padding.
  always_comb begin
    take_bits = (32'(seed_blk) == NBLK - 1) ? AC'(LAST_BITS) : AC'(B);
    take_vec  = '0;
    for (int unsigned j = 0; j < B; j++)
      if (j < 32'(take_bits)) take_vec[j] = dec_block[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= '0;
      acc_cnt  <= '0;
      seed_blk <= '0;
    end else if (st == S_IDLE) begin
      acc_q    <= '0;
      acc_cnt  <= '0;
      seed_blk <= '0;
    end else if (slice_shift) begin
      acc_q    <= acc_q >> N;
      acc_cnt  <= acc_cnt - AC'(N);
    end else if (dec_take) begin
      acc_q    <= acc_q | (take_vec << acc_cnt);
      acc_cnt  <= acc_cnt + take_bits;
      seed_blk <= (32'(seed_blk) == NBLK - 1) ? '0 : seed_blk + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st               <= S_IDLE;
      slice_cnt        <= '0;
      cyc_cnt          <= '0;
      resp_valid       <= 1'b0;
      patterns_applied <= '0;
      done             <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          patterns_applied <= '0;
          resp_valid       <= 1'b0;
          slice_cnt        <= '0;
          done             <= (num_patterns == 16'd0);
          if (num_patterns != 16'd0) st <= S_LOAD;
        end
        S_LOAD: if (slice_shift) begin
          if (32'(slice_cnt) == Q - 1) begin
            slice_cnt <= '0;
            cyc_cnt   <= '0;
            st        <= S_DECOMP;
          end else begin
            slice_cnt <= slice_cnt + 1'b1;
          end
        end
        S_DECOMP: begin
          cyc_cnt <= cyc_cnt + 1'b1;
          if (32'(cyc_cnt) == M - Q - 1) st <= S_CAPTURE;
        end
        S_CAPTURE: begin
          resp_valid       <= 1'b1;
          patterns_applied <= patterns_applied + 16'd1;
          cyc_cnt          <= '0;
          st               <= last_pat ? S_FLUSH : S_LOAD;
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

  // a slice is only shifted when all of its bits have been decoded
  a_shift_full: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_LOAD && scan_en) |-> slice_full);

endmodule
