// End-to-end testbench for lfsr_reseed_top at its default size: both
// architectures run a test session at the same time.
//
//   integrated side : 8 chains x 27 cells, 40-bit LFSR in the first 5 cells of
//                     each chain, 4 deterministic patterns.
//   separate side   : 8 chains x 27 cells, 28-bit LFSR, 2 windows of 14 slices,
//                     2 pseudo-random then 3 deterministic patterns.
//
// The testbench is tester and circuit under test for both. Seeds are random
// with blocks skewed towards 0 and are sent Huffman-coded with a skewed code
// written into each decoder. Bit-level models predict every applied test
// vector and both final MISR signatures. Every mechanism of the design is
// counted and must occur: seed slices shifted in scan mode, decompression
// cycles, capture cycles, decoding during decompression, tester stalls, the
// final unload, block-wise reseeding, reseeding of a later scan window,
// pseudo-random patterns and padding slices leaving the chains.
module tb_lfsr_reseed_top;
  import lfsr_reseed_pkg::*;
  import tb_ref_pkg::*;

  localparam int B = 4, N = 8, M = 27, Q = 5, R = 28, W = 14, NUM_WIN = 2, K = 7;
  localparam int NB = N / B, PS_STRIDE = 5, MAP_MUL = 1;
  localparam logic [N*Q-1:0] INT_TAPS = 40'h40_0028_0001;
  localparam logic [R-1:0]   SEP_TAPS = 28'h200_0001;
  localparam logic [31:0]    MISR_TAPS = 32'h0040_0007;
  localparam int IP = 4;                      // integrated patterns
  localparam int PR = 2, DET = 3, SP = PR + DET;

  logic clk = 1'b0, rst_n = 1'b0;
  logic int_cfg_we = 1'b0, int_cfg_bit = 1'b0, int_cfg_leaf = 1'b0;
  logic [B-1:0] int_cfg_node = '0, int_cfg_value = '0;
  logic int_in_valid = 1'b0, int_in_bit = 1'b0, int_in_ready;
  logic int_start = 1'b0;
  logic [15:0] int_num_patterns = 16'(IP);
  logic int_busy, int_done;
  logic [15:0] int_patterns_applied;
  logic [N-1:0][M-1:0] int_cells, int_capture_in;
  logic [31:0] int_signature;
  scan_mode_e int_mode;
  logic int_scan_en, int_slice_shift;

  logic sep_cfg_we = 1'b0, sep_cfg_bit = 1'b0, sep_cfg_leaf = 1'b0;
  logic [B-1:0] sep_cfg_node = '0, sep_cfg_value = '0;
  logic sep_in_valid = 1'b0, sep_in_bit = 1'b0, sep_in_ready;
  logic sep_start = 1'b0;
  logic [15:0] sep_num_prpg = 16'(PR), sep_num_patterns = 16'(DET);
  logic sep_busy, sep_done;
  logic [15:0] sep_patterns_applied;
  logic [N-1:0][M-1:0] sep_cells, sep_capture_in;
  logic [31:0] sep_signature;
  logic sep_seed_load, sep_lfsr_run, sep_prpg_mode, sep_capture;

  lfsr_reseed_top dut (.*);

  int checks = 0, failures = 0;
  bit [N-1:0] iseeds [IP][Q];
  bit [R-1:0] sseeds [DET][NUM_WIN];
  grid_t iexp [IP];
  grid_t sexp [SP];
  bit [255:0] isig, ssig;

  // mechanism counters
  int c_slice = 0, c_decomp = 0, c_icap = 0, c_prefetch = 0, c_istall = 0, c_iflush = 0;
  int c_load = 0, c_scap = 0, c_prpg = 0, c_reseed2 = 0, c_sstall = 0, c_sflush = 0, c_pad = 0;
  int s_run_pat = 0;
  int s_win_runs = 0;

  always #5 clk = ~clk;

  function automatic grid_t to_grid(logic [N-1:0][M-1:0] v);
    grid_t g;
    g = '0;
    for (int c = 0; c < N; c++) for (int j = 0; j < M; j++) g[c*ROW+j] = v[c][j];
    return g;
  endfunction

  function automatic logic [N-1:0][M-1:0] from_grid(grid_t g);
    logic [N-1:0][M-1:0] v;
    for (int c = 0; c < N; c++) for (int j = 0; j < M; j++) v[c][j] = g[c*ROW+j];
    return v;
  endfunction

  // circuits under test
  assign int_capture_in = from_grid(cut_response(to_grid(int_cells), N, M));
  assign sep_capture_in = from_grid(cut_response(to_grid(sep_cells), N, M));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    automatic int ip = int'(int_patterns_applied);
    automatic int sp = int'(sep_patterns_applied);
    // integrated side
    if (int_in_valid && !int_in_ready) c_istall++;
    if (int_slice_shift) c_slice++;
    if (int_scan_en && int_mode == MODE_DECOMP) c_decomp++;
    if (int_scan_en && int_mode == MODE_SCAN && !int_slice_shift) c_iflush++;
    if (dut.u_int.dec_valid && dut.u_int.dec_ready && int_mode == MODE_DECOMP) c_prefetch++;
    if (int_scan_en && int_mode == MODE_SYSTEM) begin
      c_icap++;
      check(ip < IP, "integrated capture count");
      if (ip < IP) check(to_grid(int_cells) == iexp[ip], $sformatf("integrated vector %0d", ip));
    end
    // separate side
    if (sep_in_valid && !sep_in_ready) c_sstall++;
    if (sep_seed_load) begin
      c_load++;
      if (s_win_runs == W) c_reseed2++;
      s_win_runs = 0;
    end
    if (sep_lfsr_run) begin
      s_run_pat++;
      s_win_runs++;
      if (sep_prpg_mode) c_prpg++;
    end
    if (dut.u_sep.shift && !sep_lfsr_run) c_sflush++;
    if (sep_capture) begin
      c_scap++;
      if (s_run_pat > M) c_pad++;
      check(s_run_pat == NUM_WIN * W, "separate shift cycles per pattern");
      check(sp < SP, "separate capture count");
      if (sp < SP) check(to_grid(sep_cells) == sexp[sp], $sformatf("separate vector %0d", sp));
      s_run_pat = 0;
      s_win_runs = 0;
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic int_send(int s);
    for (int i = 0; i < code_len[s]; i++) begin
      int_in_valid <= 1'b1;
      int_in_bit   <= code_bits[s][i];
      do @(negedge clk); while (!int_in_ready);
      @(posedge clk);
    end
  endtask

  task automatic sep_send(int s);
    for (int i = 0; i < code_len[s]; i++) begin
      sep_in_valid <= 1'b1;
      sep_in_bit   <= code_bits[s][i];
      do @(negedge clk); while (!sep_in_ready);
      @(posedge clk);
    end
  endtask

  function automatic void sep_run(ref grid_t g, ref bit [255:0] st, input int len, input bit resp);
    for (int t = 0; t < len; t++) begin
      if (resp) ssig = misr_step(ssig, scan_outs(g, N, M), 256'(MISR_TAPS), 32, N);
      g  = chains_shift(g, ps_out(st, R, N, PS_STRIDE), N, M);
      st = galois(st, 256'(SEP_TAPS), R);
    end
  endfunction

  function automatic void build_models();
    grid_t g;
    bit [255:0] st;
    bit resp;
    // integrated
    g = '0; isig = '0; resp = 0;
    for (int p = 0; p < IP; p++) begin
      for (int s = 0; s < Q; s++) begin
        if (resp) isig = misr_step(isig, scan_outs(g, N, M), 256'(MISR_TAPS), 32, N);
        g = chains_shift(g, 64'(iseeds[p][s]), N, M);
      end
      for (int t = 0; t < M - Q; t++) begin
        if (resp) isig = misr_step(isig, scan_outs(g, N, M), 256'(MISR_TAPS), 32, N);
        g = int_decomp(g, N, M, Q, 256'(INT_TAPS));
      end
      iexp[p] = g;
      g = cut_response(g, N, M);
      resp = 1;
    end
    for (int t = 0; t < M; t++) begin
      isig = misr_step(isig, scan_outs(g, N, M), 256'(MISR_TAPS), 32, N);
      g = chains_shift(g, '0, N, M);
    end
    // separate
    g = '0; ssig = '0; resp = 0; st = 256'(1);
    for (int p = 0; p < SP; p++) begin
      if (p < PR) sep_run(g, st, NUM_WIN * W, resp);
      else for (int w = 0; w < NUM_WIN; w++) begin
        st = 256'(sseeds[p-PR][w]);
        sep_run(g, st, W, resp);
      end
      sexp[p] = g;
      g = cut_response(g, N, M);
      resp = 1;
    end
    for (int t = 0; t < M; t++) begin
      ssig = misr_step(ssig, scan_outs(g, N, M), 256'(MISR_TAPS), 32, N);
      g = chains_shift(g, '0, N, M);
    end
  endfunction

  initial begin
    for (int p = 0; p < IP; p++)
      for (int s = 0; s < Q; s++)
        for (int i = 0; i < NB; i++) iseeds[p][s][i*B +: B] = B'(skewed_block(B));
    for (int d = 0; d < DET; d++)
      for (int w = 0; w < NUM_WIN; w++)
        for (int i = 0; i < K; i++) sseeds[d][w][i*B +: B] = B'(skewed_block(B));
    build_models();

    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    tree_skewed(B);
    build_codes();
    for (int n = 0; n < (1 << B) - 1; n++)
      for (int v = 0; v < 2; v++) begin
        int_cfg_we <= 1'b1; int_cfg_node <= B'(n); int_cfg_bit <= v[0];
        int_cfg_leaf <= tree_leaf[n][v]; int_cfg_value <= B'(tree_val[n][v]);
        sep_cfg_we <= 1'b1; sep_cfg_node <= B'(n); sep_cfg_bit <= v[0];
        sep_cfg_leaf <= tree_leaf[n][v]; sep_cfg_value <= B'(tree_val[n][v]);
        @(posedge clk);
      end
    int_cfg_we <= 1'b0;
    sep_cfg_we <= 1'b0;
    int_start <= 1'b1;
    sep_start <= 1'b1;
    @(posedge clk);
    int_start <= 1'b0;
    sep_start <= 1'b0;
    fork
      begin
        for (int p = 0; p < IP; p++)
          for (int s = 0; s < Q; s++)
            for (int i = 0; i < NB; i++) int_send(int'(iseeds[p][s][i*B +: B]));
        int_in_valid <= 1'b0;
      end
      begin
        for (int d = 0; d < DET; d++)
          for (int w = 0; w < NUM_WIN; w++)
            for (int i = 0; i < K; i++) sep_send(int'(sseeds[d][w][i*B +: B]));
        sep_in_valid <= 1'b0;
      end
    join
    wait (int_done && sep_done);
    @(posedge clk);

    check(c_icap == IP && int_patterns_applied == 16'(IP), "integrated captures");
    check(c_scap == SP && sep_patterns_applied == 16'(SP), "separate captures");
    check(int_signature == isig[31:0], $sformatf("integrated signature %h expected %h", int_signature, isig[31:0]));
    check(sep_signature == ssig[31:0], $sformatf("separate signature %h expected %h", sep_signature, ssig[31:0]));
    check(c_slice == IP * Q, "seed slices shifted in scan mode");
    check(c_decomp == IP * (M - Q), "decompression cycles");
    check(c_load == DET * NUM_WIN * K, "seed blocks loaded");
    check(c_prpg == PR * NUM_WIN * W, "pseudo-random shift cycles");
    // every mechanism must have happened
    check(c_slice > 0,    "mechanism: scan-mode seed load");
    check(c_decomp > 0,   "mechanism: decompression mode");
    check(c_icap > 0,     "mechanism: system-mode capture");
    check(c_prefetch > 0, "mechanism: decoding during decompression");
    check(c_istall + c_sstall > 0, "mechanism: tester stall");
    check(c_iflush == M && c_sflush == M, "mechanism: final unload");
    check(c_reseed2 > 0,  "mechanism: reseeding of a later scan window");
    check(c_prpg > 0,     "mechanism: pseudo-random patterns");
    check(c_pad > 0,      "mechanism: padding slices shifted off");
    $display("integrated: slices=%0d decomp=%0d captures=%0d prefetched=%0d stalls=%0d unload=%0d",
             c_slice, c_decomp, c_icap, c_prefetch, c_istall, c_iflush);
    $display("separate:   blocks=%0d window_reseeds=%0d prpg_cycles=%0d captures=%0d stalls=%0d padded_patterns=%0d unload=%0d",
             c_load, c_reseed2, c_prpg, c_scap, c_sstall, c_pad, c_sflush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
