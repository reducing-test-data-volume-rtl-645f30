// One test session on an integrated_decompressor, for the testbenches.
//
// Instantiates the decompressor at the given size and plays tester and
// circuit under test: P random seeds (blocks skewed towards 0) are cut into
// B-bit blocks in slice order (the last block of a seed padded with zeros when
// N*Q is not a multiple of B), Huffman-coded with a code built from the counts
// of these blocks, which is written into the decoder, and streamed; GAPS adds random idle cycles to the stream. A
// bit-level model predicts every applied test vector and the signature, and
// the session checks Q slice shifts and M-Q decompression cycles per pattern.
// With CUBES set, each seed is instead solved from a random test cube with
// between N*Q/4 and N*Q-20 specified bits (GF(2) elimination, free seed bits 0),
// and every specified bit is checked in the applied vector.
// 'finished' rises when the session is over; checks/failures and the mechanism
// counters are then final.
module int_session #(
  parameter int unsigned    N    = 8,
  parameter int unsigned    M    = 9,
  parameter int unsigned    Q    = 2,
  parameter int unsigned    B    = 4,
  parameter logic [N*Q-1:0] TAPS = '1,
  parameter int unsigned    P    = 4,
  parameter bit             GAPS = 1'b0,
  parameter bit             CUBES = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_prefetch
);
  import lfsr_reseed_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [31:0] MISR_TAPS = 32'h0040_0007;
  localparam int SEED_BITS = N * Q;
  localparam int NBLK = (SEED_BITS + B - 1) / B;
  localparam int NS = (1 << B) - 1;

  logic cfg_we = 1'b0, cfg_bit = 1'b0, cfg_leaf = 1'b0;
  logic [B-1:0] cfg_node = '0, cfg_value = '0;
  logic in_valid = 1'b0, in_bit = 1'b0, in_ready;
  logic start = 1'b0;
  logic [15:0] num_patterns = 16'(P);
  logic busy, done;
  logic [15:0] patterns_applied;
  logic [N-1:0][M-1:0] cells, capture_in;
  logic [31:0] signature;
  scan_mode_e mode;
  logic scan_en, slice_shift;

  bit [SEED_BITS-1:0] seeds [P];
  int blocks [P][NBLK];
  grid_t exp_vec [P];
  grid_t basis [SEED_BITS];
  grid_t cube_care [P], cube_val [P];
  bit [255:0] exp_sig;
  int n_capture, n_shift [P], n_decomp [P], n_unsolved;
  // local copy of the code, so sessions with different B can run together
  bit t_leaf [NS][2];
  int t_val [NS][2];
  bit [255:0] c_bits [1 << B];
  int c_len [1 << B];

  integrated_decompressor #(.N(N), .M(M), .Q(Q), .B(B), .TAPS(TAPS)) dut (.*);

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
      $display("FAIL [int N=%0d M=%0d Q=%0d B=%0d]: %s", N, M, Q, B, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    automatic int p = int'(patterns_applied);
    if (in_valid && !in_ready) n_stall++;
    if (dut.dec_valid && dut.dec_ready && mode == MODE_DECOMP) n_prefetch++;
    if (busy && p < P) begin
      if (slice_shift) n_shift[p]++;
      if (scan_en && mode == MODE_DECOMP) n_decomp[p]++;
    end
    if (scan_en && mode == MODE_SYSTEM) begin
      n_capture++;
      check(p < P, "capture count");
      if (p < P) begin
        check(to_grid(cells) == exp_vec[p], $sformatf("test vector of pattern %0d", p));
        if (CUBES) check(((to_grid(cells) ^ cube_val[p]) & cube_care[p]) == '0,
                         $sformatf("pattern %0d: specified bits of the test cube", p));
        check(n_shift[p] == Q, $sformatf("pattern %0d: %0d slice shifts", p, n_shift[p]));
        check(n_decomp[p] == M - Q, $sformatf("pattern %0d: %0d decompression cycles", p, n_decomp[p]));
      end
    end
  end

  task automatic send_bits(int s, bit gaps);
    for (int i = 0; i < c_len[s]; i++) begin
      while (gaps && $urandom_range(5) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_bit   <= c_bits[s][i];
      do @(negedge clk); while (!in_ready);
      @(posedge clk);
    end
  endtask

  initial begin
    int freq [256];
    grid_t g;
    bit resp;
    finished = 1'b0;
    checks = 0; failures = 0; n_stall = 0; n_prefetch = 0; n_capture = 0; n_unsolved = 0;
    for (int p = 0; p < P; p++) begin n_shift[p] = 0; n_decomp[p] = 0; end
    if (CUBES) begin
      // seeds solved from random test cubes; the vector a seed expands to is
      // linear in the seed, so it is the XOR of the vectors of its set bits
      for (int k = 0; k < SEED_BITS; k++) begin
        automatic bit [SEED_BITS-1:0] e = '0;
        e[k] = 1'b1;
        g = '0;
        for (int s = 0; s < Q; s++) g = chains_shift(g, 64'(e[s*N +: N]), N, M);
        for (int t = 0; t < M - Q; t++) g = int_decomp(g, N, M, Q, 256'(TAPS));
        basis[k] = g;
      end
      for (int p = 0; p < P; p++) begin
        bit ok;
        ok = 1'b0;
        while (!ok) begin
          bit [255:0] a [512];
          bit rhs [512];
          bit [255:0] x;
          automatic int ns_bits = $urandom_range(SEED_BITS / 4,
                                                  (SEED_BITS > 20 + SEED_BITS / 4) ? SEED_BITS - 20 : SEED_BITS / 4);
          cube_care[p] = '0; cube_val[p] = '0;
          for (int r = 0; r < ns_bits; r++) begin
            int c, j;
            do begin c = $urandom_range(N - 1); j = $urandom_range(M - 1); end
            while (cube_care[p][c*ROW+j]);
            cube_care[p][c*ROW+j] = 1'b1;
            cube_val[p][c*ROW+j]  = $urandom_range(1);
            for (int k = 0; k < SEED_BITS; k++) a[r][k] = basis[k][c*ROW+j];
            rhs[r] = cube_val[p][c*ROW+j];
          end
          ok = solve_gf2(a, rhs, ns_bits, SEED_BITS, x);
          if (!ok) n_unsolved++;
          seeds[p] = x[SEED_BITS-1:0];
        end
        for (int i = 0; i < NBLK; i++) begin
          blocks[p][i] = 0;
          for (int j = 0; j < B; j++)
            if (i*B + j < SEED_BITS && seeds[p][i*B + j]) blocks[p][i] |= 1 << j;
        end
      end
    end else begin
      // seeds: skewed blocks; padding bits of the last block are zero
      for (int p = 0; p < P; p++) begin
        seeds[p] = '0;
        for (int i = 0; i < NBLK; i++) begin
          blocks[p][i] = skewed_block(B);
          for (int j = 0; j < B; j++)
            if (i*B + j < SEED_BITS) seeds[p][i*B + j] = blocks[p][i][j];
            else blocks[p][i] &= ~(1 << j);
        end
      end
    end
    for (int v = 0; v < 256; v++) freq[v] = 0;
    for (int p = 0; p < P; p++) for (int i = 0; i < NBLK; i++) freq[blocks[p][i]]++;
    tree_huffman(B, freq);
    build_codes();
    for (int n = 0; n < NS; n++)
      for (int v = 0; v < 2; v++) begin t_leaf[n][v] = tree_leaf[n][v]; t_val[n][v] = tree_val[n][v]; end
    for (int s = 0; s < (1 << B); s++) begin c_bits[s] = code_bits[s]; c_len[s] = code_len[s]; end
    g = '0; exp_sig = '0; resp = 0;
    for (int p = 0; p < P; p++) begin
      for (int s = 0; s < Q; s++) begin
        if (resp) exp_sig = misr_step(exp_sig, scan_outs(g, N, M), 256'(MISR_TAPS), 32, N);
        g = chains_shift(g, 64'(seeds[p][s*N +: N]), N, M);
      end
      for (int t = 0; t < M - Q; t++) begin
        if (resp) exp_sig = misr_step(exp_sig, scan_outs(g, N, M), 256'(MISR_TAPS), 32, N);
        g = int_decomp(g, N, M, Q, 256'(TAPS));
      end
      exp_vec[p] = g;
      if (CUBES) check(((g ^ cube_val[p]) & cube_care[p]) == '0,
                       $sformatf("model: seed %0d reproduces its test cube", p));
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
    for (int p = 0; p < P; p++)
      for (int i = 0; i < NBLK; i++) send_bits(blocks[p][i], GAPS && p < P / 2);
    in_valid <= 1'b0;
    wait (done);
    @(posedge clk);
    check(n_capture == P, $sformatf("%0d captures", n_capture));
    check(patterns_applied == 16'(P), "patterns_applied");
    check(signature == exp_sig[31:0], $sformatf("signature %h expected %h", signature, exp_sig[31:0]));
    check(!busy, "idle after done");
    finished = 1'b1;
  end
endmodule
