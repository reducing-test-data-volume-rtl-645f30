// Testbench for integrated_scan_lfsr (4 chains x 6 cells, 2 LFSR cells per
// chain, 8-bit LFSR with the primitive polynomial x^8+x^6+x^5+x^4+1).
//
// 1. Random mix of scan, system, decompression and hold cycles, compared every
//    cycle with an independent bit-level model.
// 2. Period: a non-zero seed shifted into the LFSR cells returns after exactly
//    255 decompression steps and not before, as a primitive 8-bit LFSR must.
module tb_integrated_scan_lfsr;
  import lfsr_reseed_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 4, M = 6, Q = 2;
  localparam logic [7:0] TAPS = 8'h71;

  logic clk = 1'b0, rst_n = 1'b0;
  scan_mode_e mode = MODE_SCAN;
  logic en = 1'b0;
  logic [N-1:0] scan_in = '0, scan_out;
  logic [N-1:0][M-1:0] capture_in = '0, cells;

  int checks = 0, failures = 0;
  grid_t model;

  integrated_scan_lfsr #(.N(N), .M(M), .Q(Q), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  function automatic grid_t to_grid(logic [N-1:0][M-1:0] v);
    grid_t g;
    g = '0;
    for (int c = 0; c < N; c++) for (int j = 0; j < M; j++) g[c*ROW+j] = v[c][j];
    return g;
  endfunction

  function automatic bit [7:0] lfsr_part(grid_t g);
    bit [7:0] v;
    for (int k = 0; k < N*Q; k++) v[k] = g[(k/Q)*ROW + (k%Q)];
    return v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [7:0] seed, cur;
    int period;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(to_grid(cells) == model, "reset value");

    for (int t = 0; t < 1500; t++) begin
      automatic int r = $urandom_range(9);
      en = (r != 0);
      mode = (r < 4) ? MODE_SCAN : (r < 6) ? MODE_SYSTEM : MODE_DECOMP;
      scan_in = N'($urandom);
      for (int c = 0; c < N; c++) capture_in[c] = M'($urandom);
      if (en) begin
        case (mode)
          MODE_SCAN:   model = chains_shift(model, 64'(scan_in), N, M);
          MODE_SYSTEM: model = to_grid(capture_in);
          default:     model = int_decomp(model, N, M, Q, 256'(TAPS));
        endcase
      end
      @(negedge clk);
      check(to_grid(cells) == model, $sformatf("cycle %0d mode %s en %0d", t, mode.name(), en));
      for (int c = 0; c < N; c++) check(scan_out[c] == model[c*ROW+M-1], "scan_out");
    end

    // period of the LFSR part
    en = 1'b1;
    mode = MODE_SCAN;
    for (int s = 0; s < Q; s++) begin
      scan_in = N'(s + 1);
      @(negedge clk);
    end
    seed = lfsr_part(to_grid(cells));
    check(seed != 0, "seed not zero");
    mode = MODE_DECOMP;
    period = 0;
    do begin
      @(negedge clk);
      period++;
      cur = lfsr_part(to_grid(cells));
    end while (cur != seed && period < 300);
    check(period == 255, $sformatf("LFSR period %0d, expected 255", period));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
