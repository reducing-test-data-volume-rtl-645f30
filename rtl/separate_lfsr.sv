// Separate R-bit LFSR with block-wise parallel seed load.
//
// A modular (internal-XOR) LFSR of R stages. Each step moves stage k-1 into
// stage k; stage R-1 is the feedback bit, which enters stage 0 and is XORed into
// every stage k whose TAPS bit is set (bit k = coefficient of x^k, x^R implied).
// The default x^28 + x^25 + 1 is primitive.
//
// Seeds arrive from the Huffman decoder one b-bit block at a time and are
// written in parallel: a seed has K = ceil(R/B) blocks; bit j of block i is seed
// slot s = i*B + j and goes to flip-flop (s * MAP_MUL) mod (K*B). Slots that map
// to a number >= R are padding and are dropped. MAP_MUL = 1 gives contiguous
// blocks; any multiplier coprime with K*B gives another fixed assignment of
// flip-flops to blocks, which is the freedom the seed encoder exploits.
//
// Interface and timing (all synchronous, one action per cycle):
//   init      : load RESET_SEED (start state for pseudo-random patterns)
//   load_en   : write block load_block into the flip-flops of block load_idx
//   run       : one autonomous LFSR step
//   state     : registered LFSR contents
// Priority is init, then load_en, then run.
//
// Parallel block load and a free assignment of flip-flops to blocks follow the
// document; the polynomial, the interleaving formula and the init seed are this
// design's choices.
module separate_lfsr #(
  parameter int unsigned  R          = 28,
  parameter int unsigned  B          = 4,
  parameter int unsigned  K          = (R + B - 1) / B,
  parameter int unsigned  MAP_MUL    = 1,
  parameter logic [R-1:0] TAPS       = 28'h200_0001,
  parameter logic [R-1:0] RESET_SEED = R'(1),
  localparam int unsigned KW         = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          load_en,
  input  logic [KW-1:0] load_idx,
  input  logic [B-1:0]  load_block,
  input  logic          run,
  output logic [R-1:0]  state
);

  logic [R-1:0] loaded;
  logic [R-1:0] stepped;

  always_comb begin
    loaded = state;
    for (int unsigned i = 0; i < K; i++) begin
      for (int unsigned j = 0; j < B; j++) begin
        if (32'(load_idx) == i &&
            lfsr_reseed_pkg::block_slot_to_ff(i * B + j, MAP_MUL, K * B) < R)
          loaded[lfsr_reseed_pkg::block_slot_to_ff(i * B + j, MAP_MUL, K * B)] = load_block[j];
      end
    end
    stepped = {state[R-2:0], state[R-1]} ^ ({TAPS[R-1:1], 1'b0} & {R{state[R-1]}});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= RESET_SEED;
    else if (init)    state <= RESET_SEED;
    else if (load_en) state <= loaded;
    else if (run)     state <= stepped;
  end

  initial begin
    assert (K * B >= R) else $error("separate_lfsr: K*B must cover R");
    assert (TAPS[0]) else $error("separate_lfsr: TAPS bit 0 must be set");
  end

endmodule
