// Testbench for scan_chains (3 chains x 5 cells): random shift, capture and
// hold cycles compared every cycle with an independent model.
module tb_scan_chains;
  import tb_ref_pkg::*;

  localparam int N = 3, M = 5;

  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, capture = 1'b0;
  logic [N-1:0] scan_in = '0, scan_out;
  logic [N-1:0][M-1:0] capture_in = '0, cells;
  grid_t model;
  int checks = 0, failures = 0;

  scan_chains #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  function automatic grid_t to_grid(logic [N-1:0][M-1:0] v);
    grid_t g;
    g = '0;
    for (int c = 0; c < N; c++) for (int j = 0; j < M; j++) g[c*ROW+j] = v[c][j];
    return g;
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
    model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int t = 0; t < 1000; t++) begin
      automatic int r = $urandom_range(5);
      shift = (r < 3);
      capture = (r == 3);
      scan_in = N'($urandom);
      for (int c = 0; c < N; c++) capture_in[c] = M'($urandom);
      if (capture) model = to_grid(capture_in);
      else if (shift) model = chains_shift(model, 64'(scan_in), N, M);
      @(negedge clk);
      check(to_grid(cells) == model, $sformatf("cycle %0d", t));
      check(64'(scan_out) == scan_outs(model, N, M), "scan_out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
