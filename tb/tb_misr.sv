// Testbench for misr (32-bit signature, 8 inputs, default polynomial).
//
// Random input slices with random enables are compared each cycle with an
// independent model; clear must zero the signature; a single flipped input bit
// in a long sequence must give a different signature.
module tb_misr;
  import tb_ref_pkg::*;

  localparam int W = 32, N = 8;
  localparam logic [W-1:0] TAPS = 32'h0040_0007;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [N-1:0] din = '0;
  logic [W-1:0] signature;
  bit [255:0] model;
  logic [N-1:0] seq [200];
  int checks = 0, failures = 0;

  misr #(.W(W), .N(N), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_seq(int len, int flip_at, output bit [W-1:0] sig);
    clear = 1'b1; en = 1'b0;
    @(negedge clk);
    clear = 1'b0;
    model = '0;
    check(signature == '0, "clear");
    for (int t = 0; t < len; t++) begin
      en  = 1'b1;
      din = seq[t];
      if (t == flip_at) din[3] = ~din[3];
      model = misr_step(model, 64'(din), 256'(TAPS), W, N);
      @(negedge clk);
      check(signature == model[W-1:0], $sformatf("step %0d", t));
    end
    en = 1'b0;
    sig = signature;
  endtask

  initial begin
    bit [W-1:0] s0, s1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // random enables
    model = '0;
    for (int t = 0; t < 500; t++) begin
      en  = $urandom_range(3) != 0;
      din = N'($urandom);
      if (en) model = misr_step(model, 64'(din), 256'(TAPS), W, N);
      @(negedge clk);
      check(signature == model[W-1:0], $sformatf("random step %0d", t));
    end
    for (int t = 0; t < 200; t++) seq[t] = N'($urandom);
    run_seq(200, -1, s0);
    run_seq(200, 77, s1);
    check(s0 != s1, "single-bit error changes the signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
