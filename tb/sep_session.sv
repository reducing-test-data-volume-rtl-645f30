// One test session on a separate_decompressor, for the testbenches.
//
// Instantiates the decompressor at the given size and plays tester and
// circuit under test: PR pseudo-random patterns, then DET deterministic
// patterns of NUM_WIN random seeds each. Seed blocks are skewed towards 0,
// Huffman-coded with a code built from the counts of these blocks, written
// into the decoder, and streamed back to back. A bit-level model of LFSR, phase shifter, chains and MISR predicts
// every applied test vector and the signature; the session checks NUM_WIN*W
// shift cycles per pattern and K block loads per deterministic window.
// With CUBES set, each window's seed is instead solved from the specified bits
// of a random test cube that fall in that window (between R/4 and R-20 of them;
// GF(2) elimination, free seed bits 0), and every specified bit is checked in
// the applied vector.
module sep_session #(
  parameter int unsigned  N         = 4,
  parameter int unsigned  M         = 7,
  parameter int unsigned  R         = 12,
  parameter int unsigned  B         = 4,
  parameter int unsigned  W         = 4,
  parameter int unsigned  NUM_WIN   = 2,
  parameter logic [R-1:0] TAPS      = '1,
  parameter int unsigned  MAP_MUL   = 1,
  parameter int unsigned  PS_STRIDE = 5,
  parameter int unsigned  PR        = 1,
  parameter int unsigned  DET       = 2,
  parameter bit           CUBES     = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_stall
);
  import tb_ref_pkg::*;

  localparam logic [31:0] MISR_TAPS = 32'h0040_0007;
  localparam int K = (R + B - 1) / B;
  localparam int NS = (1 << B) - 1;
  localparam int P = PR + DET;

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

  bit [R-1:0] seeds [DET][NUM_WIN];
  int blocks [DET][NUM_WIN][K];
  grid_t exp_vec [P];
  grid_t basis [R];
  grid_t cube_care [DET], cube_val [DET];
  bit [255:0] exp_sig;
  int n_capture, n_loads, n_run_pat;
  bit t_leaf [NS][2];
  int t_val [NS][2];
  bit [255:0] c_bits [1 << B];
  int c_len [1 << B];

  separate_decompressor #(.N(N), .M(M), .R(R), .B(B), .W(W), .NUM_WIN(NUM_WIN),
                          .TAPS(TAPS), .PS_STRIDE(PS_STRIDE), .MAP_MUL(MAP_MUL)) dut (.*);

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
    if (!ok) begin
      failures++;
      $display("FAIL [sep N=%0d M=%0d R=%0d W=%0d x%0d]: %s", N, M, R, W, NUM_WIN, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    automatic int p = int'(patterns_applied);
    if (in_valid && !in_ready) n_stall++;
    if (seed_load) n_loads++;
    if (lfsr_run) n_run_pat++;
    if (capture) begin
      n_capture++;
      check(p < P, "capture count");
      if (p < P) check(to_grid(cells) == exp_vec[p], $sformatf("test vector of pattern %0d", p));
      if (CUBES && p >= PR && p < P)
        check(((to_grid(cells) ^ cube_val[p-PR]) & cube_care[p-PR]) == '0,
              $sformatf("pattern %0d: specified bits of the test cube", p));
      check(n_run_pat == NUM_WIN * W, $sformatf("pattern %0d: %0d shift cycles", p, n_run_pat));
      n_run_pat = 0;
    end
  end

  task automatic send_bits(int s);
    for (int i = 0; i < c_len[s]; i++) begin
      in_valid <= 1'b1;
      in_bit   <= c_bits[s][i];
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
    int freq [256];
    grid_t g;
    bit [255:0] st;
    bit resp;
    finished = 1'b0;
    checks = 0; failures = 0; n_stall = 0; n_capture = 0; n_loads = 0; n_run_pat = 0;
    if (CUBES) begin
      // seeds solved from random test cubes, one per window. basis[k] is the
      // last window's fill from a seed with only stage k set; an earlier
      // window's fill is the same moved (NUM_WIN-1-w)*W cells further along.
      for (int k = 0; k < R; k++) begin
        g = '0; st = '0; st[k] = 1'b1;
        run_window(g, st, W, 1'b0);
        basis[k] = g;
      end
      for (int d = 0; d < DET; d++) begin
        cube_care[d] = '0; cube_val[d] = '0;
        for (int w = 0; w < NUM_WIN; w++) begin
          automatic int lo = (NUM_WIN - 1 - w) * W;
          automatic int hi = ((NUM_WIN - w) * W < M) ? (NUM_WIN - w) * W : M;
          bit ok;
          ok = 1'b0;
          while (!ok) begin
            bit [255:0] a [512];
            bit rhs [512];
            bit [255:0] x;
            automatic int ns_bits = $urandom_range(R / 4, (R > 20 + R / 4) ? R - 20 : R / 4);
            grid_t care;
            care = '0;
            if (hi <= lo) ns_bits = 0;
            else if (ns_bits > int'(N) * (hi - lo)) ns_bits = int'(N) * (hi - lo);
            for (int r = 0; r < ns_bits; r++) begin
              int c, j;
              do begin c = $urandom_range(N - 1); j = $urandom_range(hi - 1, lo); end
              while (care[c*ROW+j]);
              care[c*ROW+j] = 1'b1;
              rhs[r] = $urandom_range(1);
              cube_val[d][c*ROW+j] = rhs[r];
              for (int k = 0; k < R; k++) a[r][k] = basis[k][c*ROW + j - lo];
            end
            ok = solve_gf2(a, rhs, ns_bits, R, x);
            if (!ok) cube_val[d] &= ~care;
            else cube_care[d] |= care;
            seeds[d][w] = x[R-1:0];
          end
          for (int i = 0; i < K; i++) begin
            blocks[d][w][i] = 0;
            for (int j = 0; j < B; j++) begin
              automatic int ff = ((i*B + j) * MAP_MUL) % (K*B);
              if (ff < R && seeds[d][w][ff]) blocks[d][w][i] |= 1 << j;
            end
          end
        end
      end
    end else begin
      // blocks, and the seed they write: slot i*B+j goes to stage (slot*MAP_MUL) mod (K*B)
      for (int d = 0; d < DET; d++)
        for (int w = 0; w < NUM_WIN; w++) begin
          seeds[d][w] = '0;
          for (int i = 0; i < K; i++) begin
            blocks[d][w][i] = skewed_block(B);
            for (int j = 0; j < B; j++) begin
              automatic int ff = ((i*B + j) * MAP_MUL) % (K*B);
              if (ff < R) seeds[d][w][ff] = blocks[d][w][i][j];
            end
          end
        end
    end
    for (int v = 0; v < 256; v++) freq[v] = 0;
    for (int d = 0; d < DET; d++) for (int w = 0; w < NUM_WIN; w++)
      for (int i = 0; i < K; i++) freq[blocks[d][w][i]]++;
    tree_huffman(B, freq);
    build_codes();
    for (int n = 0; n < NS; n++)
      for (int v = 0; v < 2; v++) begin t_leaf[n][v] = tree_leaf[n][v]; t_val[n][v] = tree_val[n][v]; end
    for (int s = 0; s < (1 << B); s++) begin c_bits[s] = code_bits[s]; c_len[s] = code_len[s]; end
    g = '0; exp_sig = '0; resp = 0; st = 256'(1);
    for (int p = 0; p < P; p++) begin
      if (p < PR) run_window(g, st, NUM_WIN * W, resp);
      else for (int w = 0; w < NUM_WIN; w++) begin
        st = 256'(seeds[p-PR][w]);
        run_window(g, st, W, resp);
      end
      exp_vec[p] = g;
      if (CUBES && p >= PR) check(((g ^ cube_val[p-PR]) & cube_care[p-PR]) == '0,
                                  $sformatf("model: seeds of pattern %0d reproduce its test cube", p));
      g = cut_response(g, N, M);
      resp = 1;
    end
    for (int t = 0; t < M; t++) begin
      exp_sig = misr_step(exp_sig, scan_outs(g, N, M), 256'(MISR_TAPS), 32, N);
      g = chains_shift(g, '0, N, M);
    end

    @(posedge rst_n);
    @(posedge clk);
    for (int n = 0; n < NS; n++)
      for (int v = 0; v < 2; v++) begin
        cfg_we <= 1'b1; cfg_node <= B'(n); cfg_bit <= v[0];
        cfg_leaf <= t_leaf[n][v]; cfg_value <= B'(t_val[n][v]);
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
    finished = 1'b1;
  end
endmodule
