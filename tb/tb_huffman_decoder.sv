// Testbench for huffman_decoder.
//
// Phase 1 uses the reset code (every block sent as its 4 plain bits) with the
// stream and the output always ready, and checks each block and the rate: a
// block appears exactly one cycle after the last bit of its codeword, so
// back-to-back 4-bit codewords give one block every 4 cycles.
// Phase 2 writes a skewed code tree through the configuration port and sends
// skewed random blocks with random gaps in the stream and random back-pressure
// on the output; every block must come out once, in order, and the FSM state
// must stay within its 2^b-1 states. Phase 3 checks the skewed code's rate.
// Phase 4 builds a Huffman code from the counts of 200 skewed blocks, checks
// that it is no longer than the skewed or the plain code, writes it and
// decodes the blocks at full rate.
module tb_huffman_decoder;
  import tb_ref_pkg::*;

  localparam int B = 4;
  localparam int NS = (1 << B) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0, cfg_bit = 1'b0, cfg_leaf = 1'b0;
  logic [B-1:0] cfg_node = '0, cfg_value = '0;
  logic in_valid = 1'b0, in_bit = 1'b0, in_ready;
  logic out_valid, out_ready = 1'b1;
  logic [B-1:0] out_block, state;

  int checks = 0, failures = 0;
  int cycle = 0;
  int exp_q[$];
  int last_out_cycle;
  int out_cycles[$];

  huffman_decoder #(.B(B)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  // output monitor: compare every accepted block with the expected queue
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (exp_q.size() == 0) check(1'b0, "unexpected block");
    else begin
      automatic int e = exp_q.pop_front();
      check(out_block == B'(e), $sformatf("block %0h expected %0h", out_block, e));
    end
    out_cycles.push_back(cycle);
  end

  always @(posedge clk) if (rst_n) check(32'(state) < NS, "state out of range");

  // send one codeword, honouring in_ready, with optional random gaps
  task automatic send_block(int s, bit gaps);
    for (int i = 0; i < code_len[s]; i++) begin
      if (gaps) while ($urandom_range(3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_bit   <= code_bits[s][i];
      do @(negedge clk); while (!in_ready);
      @(posedge clk);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nblk, start_cycle, total_len;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // ---- phase 1: reset code, full rate
    tree_balanced(B);
    build_codes();
    out_cycles.delete();
    start_cycle = cycle;
    for (int k = 0; k < 20; k++) begin
      automatic int s = $urandom_range(NS);
      exp_q.push_back(s);
      send_block(s, 1'b0);
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    check(exp_q.size() == 0, "phase 1: all blocks decoded");
    check(out_cycles.size() == 20, "phase 1: 20 blocks");
    for (int k = 1; k < out_cycles.size(); k++)
      check(out_cycles[k] - out_cycles[k-1] == B, "phase 1: one block per 4 cycles");
    check(out_cycles[0] - start_cycle == B + 1, "phase 1: latency of first block");

    // ---- phase 2: load a skewed code tree
    tree_skewed(B);
    build_codes();
    for (int n = 0; n < NS; n++)
      for (int v = 0; v < 2; v++) begin
        cfg_we <= 1'b1; cfg_node <= B'(n); cfg_bit <= v[0];
        cfg_leaf <= tree_leaf[n][v]; cfg_value <= B'(tree_val[n][v]);
        @(posedge clk);
      end
    cfg_we <= 1'b0;
    @(posedge clk);

    fork
      begin
        for (int k = 0; k < 300; k++) begin
          automatic int s = skewed_block(B);
          exp_q.push_back(s);
          send_block(s, 1'b1);
        end
        in_valid <= 1'b0;
      end
      begin
        repeat (3000) begin
          out_ready <= ($urandom_range(2) != 0);
          @(posedge clk);
        end
        out_ready <= 1'b1;
      end
    join_any
    out_ready <= 1'b1;
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "phase 2: all blocks decoded");

    // ---- phase 3: skewed code at full rate: block k after sum of code lengths
    wait fork;
    out_ready <= 1'b1;
    @(posedge clk);
    out_cycles.delete();
    start_cycle = cycle;
    total_len = 0;
    nblk = 0;
    for (int k = 0; k < 40; k++) begin
      automatic int s = skewed_block(B);
      exp_q.push_back(s);
      send_block(s, 1'b0);
      total_len += code_len[s];
      nblk++;
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    check(out_cycles.size() == nblk, "phase 3: block count");
    check(out_cycles[nblk-1] - start_cycle == total_len + 1,
          $sformatf("phase 3: last block at %0d, expected %0d",
                    out_cycles[nblk-1] - start_cycle, total_len + 1));
    check(code_len[0] == 1, "skewed code: block 0 has a 1-bit codeword");

    // ---- phase 4: Huffman code built from the counts of a block set
    begin
      int blks [200];
      int freq [256];
      int cost_skew, cost_huf, cost_flat;
      for (int v = 0; v < 256; v++) freq[v] = 0;
      for (int k = 0; k < 200; k++) begin
        blks[k] = skewed_block(B);
        freq[blks[k]]++;
      end
      cost_skew = 0; cost_flat = 0; cost_huf = 0;
      for (int v = 0; v <= NS; v++) begin
        cost_skew += (freq[v] + 1) * code_len[v];
        cost_flat += (freq[v] + 1) * B;
      end
      tree_huffman(B, freq);
      build_codes();
      for (int v = 0; v <= NS; v++) cost_huf += (freq[v] + 1) * code_len[v];
      check(cost_huf <= cost_skew && cost_huf <= cost_flat,
            $sformatf("phase 4: Huffman cost %0d, skewed %0d, plain %0d", cost_huf, cost_skew, cost_flat));
      for (int n = 0; n < NS; n++)
        for (int v = 0; v < 2; v++) begin
          cfg_we <= 1'b1; cfg_node <= B'(n); cfg_bit <= v[0];
          cfg_leaf <= tree_leaf[n][v]; cfg_value <= B'(tree_val[n][v]);
          @(posedge clk);
        end
      cfg_we <= 1'b0;
      @(posedge clk);
      out_cycles.delete();
      start_cycle = cycle;
      total_len = 0;
      for (int k = 0; k < 200; k++) begin
        exp_q.push_back(blks[k]);
        send_block(blks[k], 1'b0);
        total_len += code_len[blks[k]];
      end
      in_valid <= 1'b0;
      repeat (3) @(posedge clk);
      check(exp_q.size() == 0, "phase 4: all blocks decoded");
      check(out_cycles.size() == 200, "phase 4: block count");
      check(out_cycles[199] - start_cycle == total_len + 1,
            $sformatf("phase 4: last block at %0d, expected %0d",
                      out_cycles[199] - start_cycle, total_len + 1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
