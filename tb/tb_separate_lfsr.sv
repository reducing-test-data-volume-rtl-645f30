// Testbench for separate_lfsr at its default 28-bit size with 4-bit blocks,
// once with contiguous blocks (MAP_MUL = 1) and once interleaved (MAP_MUL = 3).
//
// Random seeds are written block by block and must appear in the flip-flops the
// block assignment names; autonomous steps are compared with an independent
// model; init must restore the start seed.
module tb_separate_lfsr;
  import tb_ref_pkg::*;

  localparam int R = 28, B = 4, K = 7;
  localparam logic [R-1:0] TAPS = 28'h200_0001;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0, load_en = 1'b0, run = 1'b0;
  logic [2:0] load_idx = '0;
  logic [B-1:0] load_block = '0;
  logic [R-1:0] state_a, state_b;
  int checks = 0, failures = 0;

  separate_lfsr #(.R(R), .B(B), .MAP_MUL(1), .TAPS(TAPS)) dut_a (
    .clk, .rst_n, .init, .load_en, .load_idx, .load_block, .run, .state(state_a));
  separate_lfsr #(.R(R), .B(B), .MAP_MUL(3), .TAPS(TAPS)) dut_b (
    .clk, .rst_n, .init, .load_en, .load_idx, .load_block, .run, .state(state_b));

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

  initial begin
    bit [255:0] ma, mb;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(state_a == R'(1) && state_b == R'(1), "reset seed");
    for (int p = 0; p < 40; p++) begin
      automatic bit [R-1:0] seed = R'({$urandom, $urandom});
      // write the seed: block i holds seed flip-flops (i*B+j)*mul mod 28
      for (int i = 0; i < K; i++) begin
        load_en = 1'b1;
        load_idx = 3'(i);
        for (int j = 0; j < B; j++) load_block[j] = seed[i*B+j];
        @(negedge clk);
      end
      load_en = 1'b0;
      check(state_a == seed, "contiguous blocks load the seed");
      // interleaved: slot s went to flip-flop 3s mod 28
      for (int s = 0; s < R; s++)
        check(state_b[(3*s) % R] == seed[s], $sformatf("interleaved slot %0d", s));
      ma = 256'(state_a);
      mb = 256'(state_b);
      repeat ($urandom_range(1, 40)) begin
        run = 1'b1;
        ma = galois(ma, 256'(TAPS), R);
        mb = galois(mb, 256'(TAPS), R);
        @(negedge clk);
        check(state_a == ma[R-1:0] && state_b == mb[R-1:0], "autonomous step");
      end
      run = 1'b0;
    end
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    check(state_a == R'(1) && state_b == R'(1), "init seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
