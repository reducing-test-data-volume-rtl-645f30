// Statistical (Huffman) decoder for compressed LFSR seeds.
//
// The tester stores every seed as a sequence of variable-length Huffman
// codewords, one per b-bit block of the seed. This decoder walks the code tree
// one input bit per clock. A full binary tree with 2^b leaves has 2^b-1 internal
// nodes, so the FSM has 2^b-1 states (15 for b=4), state 0 being the root.
// When the bit just taken reaches a leaf, the b-bit block of that leaf is
// presented at the output and the FSM returns to the root.
//
// The code tree is held in a small table, one entry per (state, input bit):
// {leaf, value}, where value is the next state for an internal branch and the
// decoded block for a leaf. The table is written through the cfg_* port before
// a test session, so one decoder serves any code built for a test set. After
// reset the table holds the balanced tree, i.e. the identity code that sends
// every block as its b plain bits, most significant bit first.
//
// Interface and timing:
//   in_valid/in_ready/in_bit : one code bit per cycle from the tester.
//   out_valid/out_ready/out_block : one decoded block, registered; it appears
//     the cycle after the last bit of its codeword was taken. A codeword of L
//     bits therefore costs L cycles. While a block waits (out_valid and not
//     out_ready) the decoder takes no bit, which stalls the tester.
//   state : current FSM state (tree node), for observation.
//
// The FSM size and its role follow the document; the table-driven form, the
// write port, the reset code and the valid/ready handshakes are this design's
// own choices.
module huffman_decoder #(
  parameter int unsigned B = 4   // block size in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  // code-table write port
  input  logic         cfg_we,
  input  logic [B-1:0] cfg_node,   // state (tree node) 0 .. 2^B-2
  input  logic         cfg_bit,    // branch taken on this input bit
  input  logic         cfg_leaf,   // branch ends in a leaf
  input  logic [B-1:0] cfg_value,  // next state, or decoded block for a leaf
  // tester bit stream
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         in_ready,
  // decoded blocks
  output logic         out_valid,
  output logic [B-1:0] out_block,
  input  logic         out_ready,
  output logic [B-1:0] state
);

  localparam int unsigned NSTATES = (1 << B) - 1;

  typedef struct packed {
    logic         leaf;
    logic [B-1:0] value;
  } entry_t;

  entry_t       code_tab [NSTATES][2];
  logic [B-1:0] node_q;
  entry_t       hit;
  logic         take;

  // Balanced tree in heap order: node i has children 2i+1 and 2i+2; children
  // numbered NSTATES and above are leaves for blocks 0 .. 2^B-1.
  function automatic entry_t default_entry(int unsigned node, int unsigned bitv);
    int unsigned child;
    entry_t      e;
    child = 2 * node + 1 + bitv;
    if (child >= NSTATES) begin
      e.leaf  = 1'b1;
      e.value = B'(child - NSTATES);
    end else begin
      e.leaf  = 1'b0;
      e.value = B'(child);
    end
    return e;
  endfunction

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;
  assign hit      = code_tab[node_q][in_bit];
  assign state    = node_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < NSTATES; n++) begin
        code_tab[n][0] <= default_entry(n, 0);
        code_tab[n][1] <= default_entry(n, 1);
      end
    end else if (cfg_we && (32'(cfg_node) < NSTATES)) begin
      code_tab[cfg_node][cfg_bit] <= '{leaf: cfg_leaf, value: cfg_value};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      node_q    <= '0;
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        if (hit.leaf) begin
          out_block <= hit.value;
          out_valid <= 1'b1;
          node_q    <= '0;
        end else if (32'(hit.value) < NSTATES) begin
          node_q    <= hit.value;
        end else begin
          node_q    <= '0;   // malformed table entry: restart at the root
        end
      end
    end
  end

  // A block must never be dropped: the output register is only overwritten
  // once it has been accepted.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_block)));

endmodule
