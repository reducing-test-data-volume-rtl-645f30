// Testbench for integrated_decompressor, in two sizes that run together:
//   A: 8 chains x 9 cells, 2 LFSR cells per chain (16-bit LFSR,
//      x^16+x^15+x^13+x^4+1), 4-bit blocks: two blocks per bit-slice.
//   B: 6 chains x 10 cells, 3 LFSR cells per chain (18 bits, x^18+x^11+1),
//      4-bit blocks: 18 is not a multiple of 4, so blocks straddle slices and
//      the last block of every seed carries two padding bits.
// Each session (int_session) streams Huffman-coded random seeds, with random
// gaps for the first half of the patterns, and checks every applied test
// vector, the signature and the slice-shift and decompression cycle counts.
// Stalls of the tester and decoding during decompression must both occur.
module tb_integrated_decompressor;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin_a, fin_b;
  int ck_a, ck_b, fl_a, fl_b, st_a, st_b, pf_a, pf_b;
  int checks, failures;

  int_session #(.N(8), .M(9), .Q(2), .B(4), .TAPS(16'hA011), .P(6), .GAPS(1'b1)) u_a (
    .clk, .rst_n, .finished(fin_a), .checks(ck_a), .failures(fl_a), .n_stall(st_a), .n_prefetch(pf_a));
  int_session #(.N(6), .M(10), .Q(3), .B(4), .TAPS(18'h0_0801), .P(6), .GAPS(1'b1)) u_b (
    .clk, .rst_n, .finished(fin_b), .checks(ck_b), .failures(fl_b), .n_stall(st_b), .n_prefetch(pf_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ck_a + ck_b, fl_a + fl_b + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wait (fin_a && fin_b);
    checks = ck_a + ck_b + 2;
    failures = fl_a + fl_b;
    if (st_a + st_b == 0) begin failures++; $display("FAIL: no decoder stall"); end
    if (pf_a + pf_b == 0) begin failures++; $display("FAIL: no decoding during decompression"); end
    $display("mechanisms: stalls=%0d prefetched_blocks=%0d", st_a + st_b, pf_a + pf_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
