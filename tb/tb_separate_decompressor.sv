// Testbench for separate_decompressor: 4 chains x 7 cells, 12-bit LFSR
// (x^12+x^6+x^4+x+1), 4-bit blocks with interleaved assignment (MAP_MUL = 5),
// 2 scan windows of 4 bit-slices (8 shifts for 7 cells, so one slice of
// padding leaves the chains), 2 pseudo-random then 4 deterministic patterns.
//
// The testbench is tester and circuit under test. A bit-level model of the
// LFSR, phase shifter, chains and MISR predicts every applied test vector and
// the final signature. It checks W shift cycles per window, a reseed (K blocks)
// before every deterministic window and none in pseudo-random patterns, and
// that every mechanism occurred: reseeding of a second window, pseudo-random
// patterns, padding shifted off the chains, and decoder stalls.
module tb_separate_decompressor;
  import tb_ref_pkg::*;

  localparam int N = 4, M = 7, R = 12, B = 4, W = 4, NUM_WIN = 2, K = 3;
  localparam int MAP_MUL = 5, PS_STRIDE = 5;
  localparam logic [R-1:0] TAPS = 12'h053;
  localparam logic [31:0] MISR_TAPS = 32'h0040_0007;
  localparam int PR = 2, DET = 4, P = PR + DET;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0, cfg_bit = 1'b0, cfg_leaf = 1'b0;
  logic [B-1:0] cfg_node = '0, cfg_value = '0;
  logic in_valid = 1'b0, in_bit = 1'b0, in_ready;
  logic start = 1'b0;
  logic [15:0] num_prpg = 16'(PR), num_patterns = 16'(DET);
  logic busy, done;
  logic [15:0] patterns_applied;
  logic [N-1:0][M-1:0] cells, capture_in;
  logic [31:0] signature;
  logic seed_load, lfsr_run, prpg_mode, capture;

  int checks = 0, failures = 0;
  bit [R-1:0] seeds [DET][NUM_WIN];
  int blocks [DET][NUM_WIN][K];
  grid_t exp_vec [P];
  bit [255:0] exp_sig;
  int n_capture = 0, n_stall = 0, n_loads = 0, n_pr_run = 0, n_reseed_w2 = 0;
  int n_run_pat = 0, n_run_win = 0;
  bit ran_in_pattern = 0;

  separate_decompressor #(.N(N), .M(M), .R(R), .B(B), .W(W), .NUM_WIN(NUM_WIN),
                          .TAPS(TAPS), .PS_STRIDE(PS_STRIDE), .MAP_MUL(MAP_MUL)) dut (.*);

  always #5 clk = ~clk;

  function automatic grid_t to_grid(logic [N-1:0][M-1:0] v);
    grid_t g;
    g = '0;
    for (int c = 0; c < N; c++) for (int j = 0; j < M; j++) g[c*ROW+j] = v[c][j];
    return g;
  endfunction

  always_comb begin
    automatic grid_t r = cut_response(to_grid(cells), N, M);
    for (int c = 0; c < N; c++) for (int j = 0; j < M; j++) capture_in[c][j] = r[c*ROW+j];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    automatic int p = int'(patterns_applied);
    if (in_valid && !in_ready) n_stall++;
    if (seed_load) begin
      n_loads++;
      if (n_run_win == W) n_reseed_w2++;        // reseed right after a full window
      check(!prpg_mode, "no reseeding in a pseudo-random pattern");
      if (n_run_win != 0) begin
        check(n_run_win == W, $sformatf("window of %0d shift cycles", n_run_win));
        n_run_win = 0;
      end
    end
    if (lfsr_run) begin
      n_run_pat++;
      if (!prpg_mode) n_run_win++;
      if (prpg_mode) n_pr_run++;
    end
    if (capture) begin
      n_capture++;
      check(p < P, "capture count");
      if (p < P) check(to_grid(cells) == exp_vec[p], $sformatf("test vector of pattern %0d", p));
      check(n_run_pat == NUM_WIN * W, $sformatf("pattern %0d: %0d shift cycles", p, n_run_pat));
      if (!prpg_mode) check(n_run_win == W, "last window length");
      n_run_pat = 0;
      n_run_win = 0;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bits(int s);
    for (int i = 0; i < code_len[s]; i++) begin
      in_valid <= 1'b1;
      in_bit   <= code_bits[s][i];
      do @(negedge clk); while (!in_ready);
      @(posedge clk);
    end
  endtask

  function automatic void run_window(ref grid_t g, ref bit [255:0] st, input int len, input bit resp);
    for (int t = 0; t < len; t++) begin
      if (resp) exp_sig = misr_step(exp_sig, scan_outs(g, N, M), 256'(MISR_TAPS), 32, N);
      g  = chains_shift(g, ps_out(st, R, N, PS_STRIDE), N, M);
      st = galois(st, 256'(TAPS), R);
    end
  endfunction

  initial begin
    grid_t g;
    bit [255:0] st;
    bit resp;
    // seeds and their blocks: bit j of block i is LFSR stage ((i*B+j)*MAP_MUL) mod (K*B)
    for (int d = 0; d < DET; d++)
      for (int w = 0; w < NUM_WIN; w++) begin
        seeds[d][w] = R'($urandom);
        for (int i = 0; i < K; i++) begin
          blocks[d][w][i] = 0;
          for (int j = 0; j < B; j++)
            if (seeds[d][w][((i*B + j) * MAP_MUL) % (K*B)]) blocks[d][w][i] |= (1 << j);
        end
      end
    g = '0; exp_sig = '0; resp = 0; st = 256'(1);
    for (int p = 0; p < P; p++) begin
      if (p < PR) run_window(g, st, NUM_WIN * W, resp);
      else for (int w = 0; w < NUM_WIN; w++) begin
        st = 256'(seeds[p-PR][w]);
        run_window(g, st, W, resp);
      end
      exp_vec[p] = g;
      g = cut_response(g, N, M);
      resp = 1;
    end
    for (int t = 0; t < M; t++) begin
      exp_sig = misr_step(exp_sig, scan_outs(g, N, M), 256'(MISR_TAPS), 32, N);
      g = chains_shift(g, '0, N, M);
    end

    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    tree_skewed(B);
    build_codes();
    for (int n = 0; n < (1 << B) - 1; n++)
      for (int v = 0; v < 2; v++) begin
        cfg_we <= 1'b1; cfg_node <= B'(n); cfg_bit <= v[0];
        cfg_leaf <= tree_leaf[n][v]; cfg_value <= B'(tree_val[n][v]);
        @(posedge clk);
      end
    cfg_we <= 1'b0;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int d = 0; d < DET; d++)
      for (int w = 0; w < NUM_WIN; w++)
        for (int i = 0; i < K; i++) send_bits(blocks[d][w][i]);
    in_valid <= 1'b0;
    wait (done);
    @(posedge clk);
    check(n_capture == P, $sformatf("%0d captures", n_capture));
    check(n_loads == DET * NUM_WIN * K, $sformatf("%0d blocks loaded", n_loads));
    check(signature == exp_sig[31:0], $sformatf("signature %h expected %h", signature, exp_sig[31:0]));
    check(n_stall > 0, "decoder stall occurred");
    check(n_pr_run == PR * NUM_WIN * W, "pseudo-random shift cycles");
    check(n_reseed_w2 >= DET, "second-window reseeding occurred");
    check(NUM_WIN * W > M, "padding slices were shifted off");
    $display("mechanisms: captures=%0d prpg_cycles=%0d window_reseeds=%0d stalls=%0d",
             n_capture, n_pr_run, n_reseed_w2, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
