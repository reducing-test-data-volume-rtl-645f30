// Testbench for phase_shifter (28-bit LFSR to 8 chains).
//
// Each single LFSR bit must reach exactly the chains whose three taps include
// it, every output must depend on exactly three distinct stages, the network
// must be linear, and random inputs must match an independent model.
module tb_phase_shifter;
  import tb_ref_pkg::*;

  localparam int R = 28, N = 8, STRIDE = 5;

  logic [R-1:0] lfsr = '0;
  logic [N-1:0] out;
  int checks = 0, failures = 0;
  int deps [N];

  phase_shifter #(.R(R), .N(N), .STRIDE(STRIDE)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] oa, ob;
    for (int i = 0; i < N; i++) deps[i] = 0;
    lfsr = '0;
    #1 check(out == '0, "zero in, zero out");
    for (int k = 0; k < R; k++) begin
      lfsr = R'(1) << k;
      #1;
      check(64'(out) == ps_out(256'(lfsr), R, N, STRIDE), $sformatf("unit vector %0d", k));
      for (int i = 0; i < N; i++) deps[i] += out[i];
    end
    for (int i = 0; i < N; i++) check(deps[i] == 3, $sformatf("output %0d has %0d inputs", i, deps[i]));
    for (int t = 0; t < 200; t++) begin
      automatic logic [R-1:0] a = R'($urandom), b = R'($urandom);
      lfsr = a; #1 oa = out;
      check(64'(out) == ps_out(256'(a), R, N, STRIDE), "random vector");
      lfsr = b; #1 ob = out;
      lfsr = a ^ b; #1;
      check(out == (oa ^ ob), "linearity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
