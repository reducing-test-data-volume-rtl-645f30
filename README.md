# Test-vector decompression by LFSR reseeding with Huffman-coded seeds

A scan test vector has many bits, but a deterministic test cube leaves most of
them unspecified. Such a cube can be stored as a short LFSR seed: an LFSR loaded
with the seed and clocked on its own reproduces every specified bit. Finding the
seed means solving a set of linear equations over GF(2), and that set usually
has many solutions. The seed generator uses this freedom so that the chosen
seeds are full of zeros in predictable positions. The seeds are then cut into
b-bit blocks and Huffman-coded, and the tester stores only the codewords.

On chip, the reverse happens: a Huffman decoder turns the tester bit stream
back into blocks, the blocks form the seed, and the LFSR expands the seed into
scan chain contents. This RTL implements that decompression hardware in both
of its architectures, plus the MISR that compacts the responses:

* **Integrated LFSR** (`integrated_decompressor`). The first `Q` cells of each
  of the `N` scan chains are joined into one `N*Q`-bit LFSR. No separate LFSR
  register is needed.
* **Separate LFSR with scan windows** (`separate_decompressor`). The scan
  chains are left unchanged. A small `R`-bit LFSR and a phase shifter fill the
  chains one *scan window* (a group of `W` bit-slices) at a time, with one seed
  per window. The same LFSR can also run unreseeded to apply pseudo-random
  patterns first (mixed-mode BIST).

`lfsr_reseed_top` puts the two side by side, each with its own tester stream
and its own chains. By default it is sized for a 214-cell circuit: a 40-bit
integrated LFSR, a 28-bit separate LFSR with two windows, and 4-bit blocks.
Computing the seeds (Gauss-Jordan elimination, choosing the free variables,
building the Huffman tree) is done offline in software and is not part of this
RTL.

## The Huffman decoder

`huffman_decoder` takes one code bit per cycle and walks a binary code tree.
A full tree with `2^B` leaves has `2^B-1` internal nodes, and these are the
FSM's states: 15 for `B=4`, 63 for 6, 255 for 8. Each state has two table
entries, one per input bit. Each entry holds `{leaf, value}`:

* For an internal branch, `value` is the next state.
* For a leaf, `value` is the decoded block. The block goes to an output
  register and the FSM returns to the root (state 0).

The table is written before a session through `cfg_we/cfg_node/cfg_bit/
cfg_leaf/cfg_value`, so any prefix-free code over `B`-bit blocks can be used.
After reset the table holds the balanced tree, which is the identity code:
every block is sent as its `B` plain bits, MSB first. If you hard-code one
specific code, the table becomes constants and the decoder shrinks to the
small FSM that the scheme aims for.

Timing: a codeword of `L` bits takes `L` cycles. Its block is valid the cycle
after the last bit. `in_ready` falls while a decoded block waits for
`out_ready`, so the tester is stalled instead of losing data.

## Integrated LFSR: three scan modes

`integrated_scan_lfsr` holds the `N x M` scan cells. Cell 0 of each chain is
its scan-in end and cell `M-1` its scan-out end. The LFSR stage numbered
`k = c*Q + j` is cell `j` of chain `c`. The LFSR is modular: every step moves
stage `k-1` into stage `k`. The last stage (chain `N-1`, cell `Q-1`) is the
feedback bit. It re-enters stage 0 and is XORed into each stage whose `TAPS`
bit is set (bit k is the coefficient of x^k). Cells `Q..M-1` of each chain
keep shifting from cell `Q-1` of their own chain, so each chain's remainder is
fed from a different tap point of the long LFSR. For that reason no phase
shifter is used.

| mode          | what every cell does (when `en`)                              |
|---------------|---------------------------------------------------------------|
| `MODE_SCAN`   | shift by one, `scan_in[c]` enters cell 0                      |
| `MODE_DECOMP` | first `Q` cells: one LFSR step; other cells: shift by one     |
| `MODE_SYSTEM` | capture: load `capture_in` (the circuit response)             |

`integrated_decompressor` runs this sequence for each pattern:

1. **LOAD**, `Q` scan cycles. The seed is read as a bit stream in slice order:
   stream bit `j` belongs to chain `j mod N` of slice `j div N`, and the stream
   is cut into `B`-bit blocks. When `N` is a multiple of `B`, a slice is exactly
   `N/B` blocks and block `i` of it drives chains `i*B .. i*B+B-1`. When a
   slice is complete it is shifted into all chains at once. After `Q` slices,
   the seed fills the first `Q` cells of every chain. If `N*Q` is not a multiple
   of `B`, the last block of each seed carries don't-care padding bits, which
   are dropped, so the next seed starts on a block boundary.
2. **DECOMP**, `M-Q` cycles. The LFSR runs on its own and the rest of every
   chain fills up. The seed was computed so that *all* `N*M` cells now hold the
   test cube, including the cells that form the LFSR.
3. **CAPTURE**, one system-mode cycle. This overwrites the LFSR state, which
   is no longer needed.

The response captured in step 3 leaves through the scan outputs into the MISR
during the next pattern's LOAD and DECOMP. After the last pattern, an extra
unload of `M` zero-shifts puts the last response into the MISR. Then `done`
rises and `signature` is final.

Decoding overlaps the shifting. Decoded blocks gather in an accumulator of
`N+B-1` bits, which takes a block whenever it holds fewer than `N` bits, also
during DECOMP and CAPTURE. The next seed is thus decoded ahead, and the next
LOAD can start at once. While the accumulator is full the decoder, and through
it the tester, is stalled. A pattern takes `max(decode time, M+1)` cycles. The
decode time is about `ceil(N*Q/B) * (mean codeword length + 1)`.

## Separate LFSR: scan windows and mixed mode

`separate_decompressor` chains `separate_lfsr -> phase_shifter ->
scan_chains -> misr`. For each deterministic pattern it runs `NUM_WIN`
windows. Each window does the following:

* **SEED**: `K = ceil(R/B)` blocks are decoded. Each block is written in
  parallel into the LFSR flip-flops it owns. Bit `j` of block `i` is seed slot
  `s = i*B + j` and goes to flip-flop `(s * MAP_MUL) mod (K*B)`. Slots that map
  past `R` are padding. `MAP_MUL = 1` gives contiguous blocks. Any multiplier
  coprime with `K*B` gives an interleaved assignment. The offline seed
  generator can use that to put the most zero-biased seed bits in the same
  block position.
* **RUN**, `W` cycles: in each cycle every chain shifts in its phase-shifter
  output, then the LFSR steps.

After `NUM_WIN` windows, one capture cycle follows. If `NUM_WIN*W > M`, the
first `NUM_WIN*W - M` slices shifted in are padding and leave through the far
end of the chains. With the defaults (2 x 14 slices for 27-cell chains) one
slice is padding. Each seed only has to cover the specified bits of its own
window, so `R` follows the worst window rather than the worst whole cube.

With `num_prpg > 0` the session starts with that many pseudo-random patterns.
The LFSR is set to `RESET_SEED` (1) at `start` and runs `NUM_WIN*W` cycles per
pattern without reseeding. After that come `num_patterns` reseeded patterns.

The phase shifter XORs three LFSR stages per chain:
`out[i] = XOR_j lfsr[(i*STRIDE + j*floor(R/3)) mod R]`, for `j = 0..2`. This is
a simple stand-in. A phase shifter synthesised for low channel correlation
can replace it, as long as it stays linear.

## Interfaces

Both decompressors (and the two halves of the top, prefixed `int_`/`sep_`)
have the same ports:

* `cfg_*`: code-table write port, one entry per cycle, used while idle.
* `in_valid / in_bit / in_ready`: the tester bit stream, one bit per cycle.
* `start` (one-cycle pulse while idle) with `num_patterns` (and `num_prpg` on
  the separate side). `start` clears the MISR. `busy` stays high until the
  unload ends. `done` then rises and stays high until the next `start`.
  `patterns_applied` counts captures.
* `cells` (`[N-1:0][M-1:0]`, chain then cell): drive the circuit under test.
  `capture_in` returns its response.
* Observation outputs: the scan mode, the shift and capture strobes, and
  `seed_load` / `lfsr_run` / `prpg_mode`.

The design uses one clock and an active-low asynchronous reset that clears
every register to zero. The exceptions are the separate LFSR, which resets to
`RESET_SEED`, and the decoder table, which resets to the identity code.

## Parameters and default sizes

| parameter | default | meaning |
|---|---|---|
| `B` | 4 | block size. The decoder has `2^B-1` states |
| `N`, `M` | 8, 27 | scan chains and cells per chain (216 cells, enough for 214) |
| `Q` | 5 | integrated LFSR cells per chain, so the LFSR has `N*Q = 40` bits |
| `INT_TAPS` | x^40+x^38+x^21+x^19+1 | integrated LFSR polynomial (primitive) |
| `R` | 28 | separate LFSR length |
| `SEP_TAPS` | x^28+x^25+1 | separate LFSR polynomial (primitive) |
| `W`, `NUM_WIN` | 14, 2 | scan window width in bit-slices, windows per cube |
| `MAP_MUL`, `PS_STRIDE` | 1, 5 | block-to-flip-flop interleave, phase-shifter spacing |
| MISR | 32 bits, x^32+x^22+x^2+x+1 | inside the decompressors |

The 40-bit, 28-bit, 4-bit and 214-cell figures match the published results
for the ISCAS-89 circuit s5378. Those results report LFSR sizes of 40 to 120
bits for the integrated scheme and 12 to 61 bits for the separate one, on
circuits of 214 to 1664 scan cells. Other circuits are reached by changing the
parameters. Two constraints apply:

* `N*M` must cover the scan cells.
* On the integrated side, `N*Q` should be at least the largest number of
  specified bits in a cube plus about 20. Otherwise some cubes have no seed.

Choices of this design, not fixed by the scheme: the 8-chain split, the chain
length, the window width in slices, all polynomials, the MISR, the phase-shifter
formula, the block interleave formula, the block accumulator, the final unload,
the handshakes and the start/done control.

## Limits and departures

* Table-driven decoder: the code is a run-time table (150 flip-flops for
  `B=4`) rather than a hard-wired FSM.
* Scan windows are counted in bit-slices of all `N` chains. A window
  therefore holds `N*W` cells (112 by default), not an arbitrary cell count.
* Seeds are only valid for the exact LFSR, polynomial, phase shifter, chain
  order and block layout they were solved for. Any change to these parameters
  means the seeds must be recomputed.
* The separate LFSR is loaded only while the chains are idle. Each window's
  `K` codewords are decoded before its `W` shift cycles, with no overlap.

## Files and simulation

`rtl/` holds one unit per file:

* `lfsr_reseed_pkg`: scan-mode enum and tap formulas
* `huffman_decoder`
* `integrated_scan_lfsr`
* `integrated_decompressor`
* `separate_lfsr`
* `phase_shifter`
* `scan_chains`
* `separate_decompressor`
* `misr`
* `lfsr_reseed_top`

`tb/` has one self-checking testbench `tb_<module>` per module. All of them use
`tb_ref_pkg`, a set of bit-level reference models (LFSR step, integrated
decompression step, phase shifter, MISR, a stand-in circuit response, Huffman
tree construction from block counts, and an encoder that walks the same code
tree written into the decoder). `tb_huffman_decoder`, `int_session` and
`sep_session` build a true Huffman code from the blocks they are about to
send, as the offline flow would; the top testbench uses a fixed skewed code.
Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

`tb_lfsr_reseed_top` runs the top at its default size: 4 integrated patterns,
plus 2 pseudo-random and 3 deterministic separate-LFSR patterns, with
Huffman-coded random seeds. It checks every applied test vector and both
signatures against the models. It also requires each mechanism to occur at
least once: scan-mode seed load, decompression, capture, decoding during
decompression, tester stall, final unload, block reseeding, reseeding of a
later window, pseudo-random patterns and padding shifted off. It runs in a
few seconds.

`tb_workloads` (integrated LFSR) and `tb_workloads_sep` /
`tb_workloads_sep_large` (separate LFSR, two, four and eight windows) run the
sizes of the published results: six ISCAS-89 circuits with 214 to 1664 scan
cells, plus block sizes 6 and 8 on the smallest one. Each configuration is a
session (`int_session`, `sep_session`) that makes random test cubes with as many
specified bits as its LFSR can take, solves each seed by GF(2) elimination with
the free seed bits set to 0, builds a Huffman code from the resulting blocks,
and checks every specified bit of every applied vector. Each takes one to
three minutes, mostly compile time. All LFSR and MISR polynomials used are
primitive.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lfsr_reseed_pkg.sv tb/tb_ref_pkg.sv rtl/lfsr_reseed_top.sv \
  tb/tb_lfsr_reseed_top.sv --top tb_lfsr_reseed_top -o sim
./obj_dir/sim
```

For another testbench, replace the last two names. Verilator finds the other
modules through `-Irtl` (`-y rtl` also works).
