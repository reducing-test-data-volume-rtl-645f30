// Reference models used by the testbenches.
//
// Bit-level models of the LFSRs, scan chains, integrated-LFSR decompression
// step, phase shifter, MISR, a stand-in circuit under test, Huffman tree
// construction from block counts, a Huffman encoder, and a GF(2) equation
// solver for computing seeds from test cubes. They are written independently
// of the RTL: scan chains are held as one flat vector with chain c, cell j at
// bit c*256+j (up to 8 chains of 256 cells), LFSRs as 256-bit vectors whose
// first L bits are used.
package tb_ref_pkg;

  typedef bit [8*256-1:0] grid_t;
  localparam int ROW = 256;

  // One step of a modular LFSR of length L: every bit moves up one stage, the
  // top bit re-enters at stage 0 and is XORed into each tapped stage.
  function automatic bit [255:0] galois(bit [255:0] s, bit [255:0] taps, int L);
    bit [255:0] n;
    bit fb;
    n  = '0;
    fb = s[L-1];
    n[0] = fb;
    for (int k = 1; k < L; k++) n[k] = s[k-1] ^ (taps[k] & fb);
    return n;
  endfunction

  function automatic grid_t chains_shift(grid_t g, bit [63:0] sin, int N, int M);
    grid_t n;
    n = g;
    for (int c = 0; c < N; c++) begin
      for (int j = M - 1; j > 0; j--) n[c*ROW+j] = g[c*ROW+j-1];
      n[c*ROW] = sin[c];
    end
    return n;
  endfunction

  function automatic bit [63:0] scan_outs(grid_t g, int N, int M);
    bit [63:0] o;
    o = '0;
    for (int c = 0; c < N; c++) o[c] = g[c*ROW+M-1];
    return o;
  endfunction

  // Decompression step of the integrated LFSR: the first Q cells of the N chains,
  // taken chain after chain, are one LFSR; the other cells shift from them.
  function automatic grid_t int_decomp(grid_t g, int N, int M, int Q, bit [255:0] taps);
    grid_t      n;
    bit [255:0] lin;
    lin = '0;
    for (int k = 0; k < N*Q; k++) lin[k] = g[(k/Q)*ROW + (k%Q)];
    lin = galois(lin, taps, N*Q);
    n = g;
    for (int c = 0; c < N; c++)
      for (int j = M - 1; j >= Q; j--) n[c*ROW+j] = g[c*ROW+j-1];
    for (int k = 0; k < N*Q; k++) n[(k/Q)*ROW + (k%Q)] = lin[k];
    return n;
  endfunction

  function automatic bit [255:0] misr_step(bit [255:0] sig, bit [63:0] din,
                                           bit [255:0] taps, int W, int N);
    bit [255:0] n;
    n = galois(sig, taps, W);
    n[0] = sig[W-1];            // stage 0 takes the feedback bit only
    for (int i = 0; i < N; i++) n[i % W] ^= din[i];
    return n;
  endfunction

  function automatic bit [63:0] ps_out(bit [255:0] s, int R, int N, int stride);
    bit [63:0] o;
    o = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < 3; j++) o[i] ^= s[(i*stride + j*(R/3)) % R];
    return o;
  endfunction

  // Stand-in circuit under test: each response bit mixes two scan cells and
  // the cell position, so every captured bit depends on the applied vector.
  function automatic grid_t cut_response(grid_t g, int N, int M);
    grid_t r;
    r = '0;
    for (int c = 0; c < N; c++)
      for (int j = 0; j < M; j++)
        r[c*ROW+j] = g[c*ROW+j] ^ g[((c+1)%N)*ROW + ((j+2)%M)] ^ bit'((c + j) % 3 == 0);
    return r;
  endfunction

  // ---- Huffman code tree, as written into the decoder, and its encoder
  bit tree_leaf [255][2];
  int tree_val  [255][2];
  bit [255:0] code_bits [256];
  int         code_len  [256];

  // Balanced tree in heap order (the decoder's reset code: plain b-bit blocks).
  function automatic void tree_balanced(int b);
    int ns, ch;
    ns = (1 << b) - 1;
    for (int n = 0; n < ns; n++)
      for (int v = 0; v < 2; v++) begin
        ch = 2*n + 1 + v;
        tree_leaf[n][v] = (ch >= ns);
        tree_val[n][v]  = (ch >= ns) ? ch - ns : ch;
      end
  endfunction

  // Skewed tree: block s gets s ones then a zero (the last block all ones),
  // so blocks near 0 get the shortest codewords.
  function automatic void tree_skewed(int b);
    int ns;
    ns = (1 << b) - 1;
    for (int n = 0; n < ns; n++) begin
      tree_leaf[n][0] = 1'b1; tree_val[n][0] = n;
      tree_leaf[n][1] = (n == ns - 1);
      tree_val[n][1]  = (n == ns - 1) ? ns : n + 1;
    end
  endfunction

  // Huffman tree for the block counts freq[0 .. 2^b-1]: the two lightest
  // subtrees are merged until one is left (each count gets +1 so every block
  // has a codeword). Merge k becomes decoder state 2^b-2-k, so the last merge
  // is the root, state 0; ties go to the lower index.
  function automatic void tree_huffman(int b, int freq [256]);
    int n, ns, a, c, id, ch;
    int w [511];
    bit alive [511];
    int kid [511][2];
    n  = 1 << b;
    ns = n - 1;
    for (int i = 0; i < 2*n - 1; i++) begin
      w[i] = (i < n) ? freq[i] + 1 : 0;
      alive[i] = (i < n);
    end
    for (int k = 0; k < ns; k++) begin
      a = -1; c = -1;
      for (int i = 0; i < n + k; i++)
        if (alive[i]) begin
          if (a < 0 || w[i] < w[a]) begin c = a; a = i; end
          else if (c < 0 || w[i] < w[c]) c = i;
        end
      id = n + k;
      w[id] = w[a] + w[c];
      alive[a] = 1'b0; alive[c] = 1'b0; alive[id] = 1'b1;
      kid[id][0] = a; kid[id][1] = c;
    end
    for (int k = 0; k < ns; k++)
      for (int v = 0; v < 2; v++) begin
        ch = kid[n + k][v];
        tree_leaf[ns-1-k][v] = (ch < n);
        tree_val[ns-1-k][v]  = (ch < n) ? ch : ns - 1 - (ch - n);
      end
  endfunction

  function automatic void walk(int node, bit [255:0] path, int len);
    for (int v = 0; v < 2; v++) begin
      bit [255:0] p;
      p = path;
      p[len] = bit'(v);
      if (tree_leaf[node][v]) begin
        code_bits[tree_val[node][v]] = p;
        code_len[tree_val[node][v]]  = len + 1;
      end else begin
        walk(tree_val[node][v], p, len + 1);
      end
    end
  endfunction

  function automatic void build_codes();
    for (int s = 0; s < 256; s++) code_len[s] = 0;
    walk(0, '0, 0);
  endfunction

  // Solves a * x = rhs over GF(2) by Gauss-Jordan elimination: n equations,
  // row i of a holding the coefficients of unknowns 0..ncols-1. Unknowns that
  // stay free are set to 0, which makes the solution rich in zeros. Returns 0
  // if the equations contradict each other.
  function automatic bit solve_gf2(input bit [255:0] a_in [512], input bit rhs_in [512],
                                   input int n, input int ncols, output bit [255:0] x);
    bit [255:0] a [512];
    bit rhs [512];
    int pivc [256];
    int r, sel;
    bit [255:0] ta;
    bit tb;
    a = a_in; rhs = rhs_in;
    r = 0;
    x = '0;
    for (int c = 0; c < ncols && r < n; c++) begin
      sel = -1;
      for (int i = r; i < n; i++) if (sel < 0 && a[i][c]) sel = i;
      if (sel < 0) continue;
      ta = a[sel]; a[sel] = a[r]; a[r] = ta;
      tb = rhs[sel]; rhs[sel] = rhs[r]; rhs[r] = tb;
      for (int i = 0; i < n; i++)
        if (i != r && a[i][c]) begin a[i] ^= a[r]; rhs[i] ^= rhs[r]; end
      pivc[r] = c;
      r++;
    end
    for (int i = r; i < n; i++) if (rhs[i]) return 1'b0;
    for (int i = 0; i < r; i++) x[pivc[i]] = rhs[i];
    return 1'b1;
  endfunction

  // Random block value skewed towards 0, as the seed encoder arranges it.
  function automatic int skewed_block(int b);
    int v;
    v = 0;
    for (int j = b - 1; j >= 0; j--) if ($urandom_range(99) < 50 - 12*j) v |= (1 << j);
    return v;
  endfunction

endpackage
