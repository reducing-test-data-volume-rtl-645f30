// Workload testbench for the separate-LFSR decompressor, on the published
// configurations of the ISCAS-89 circuits s5378, s9234 and s13207 (each with its
// three scan window sizes and LFSR sizes, at block size 4, and the smallest
// circuit's largest window at block sizes 6 and 8), one
// session each, all running at the same time. Chains are 8 per circuit, a choice of this design; the window size
// of the table (in scan cells) is reached by rounding the window up to whole
// bit-slices of 8 chains. Each session first applies one pseudo-random
// pattern. The
// circuits' test cubes are not available, so each session makes random test
// cubes with as many specified bits as its LFSR can take (at most its length
// minus 20), solves their seeds (GF(2) elimination, free seed bits 0),
// Huffman-codes the seed blocks and checks every applied test vector, every
// specified bit and the MISR signature against bit-level models.
//
//   s5378   separate:   window 107 cells -> 2 windows of 14 slices on 8 x 27, LFSR 28
//   s5378   separate:   window 54 cells -> 4 windows of 7 slices on 8 x 27, LFSR 20
//   s5378   separate:   window 27 cells -> 8 windows of 4 slices on 8 x 27, LFSR 12
//   s9234   separate:   window 124 cells -> 2 windows of 16 slices on 8 x 31, LFSR 38
//   s9234   separate:   window 62 cells -> 4 windows of 8 slices on 8 x 31, LFSR 24
//   s9234   separate:   window 31 cells -> 8 windows of 4 slices on 8 x 31, LFSR 24
//   s13207  separate:   window 350 cells -> 2 windows of 44 slices on 8 x 88, LFSR 36
//   s13207  separate:   window 175 cells -> 4 windows of 22 slices on 8 x 88, LFSR 20
//   s13207  separate:   window 88 cells -> 8 windows of 11 slices on 8 x 88, LFSR 16
//   s5378   separate (window 107) again with block sizes 6 and 8
module tb_workloads_sep;
  localparam int NI = 11;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NI-1:0] fin;
  int ck [NI];
  int fl [NI];

  sep_session #(.N(8), .M(27), .R(28), .B(4), .W(14), .NUM_WIN(2), .TAPS(28'h2000001), .PR(1), .DET(1), .CUBES(1)) u_s5378_sep2 (
    .clk, .rst_n, .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .n_stall());
  sep_session #(.N(8), .M(27), .R(20), .B(4), .W(7), .NUM_WIN(4), .TAPS(20'h20001), .PR(1), .DET(1), .CUBES(1)) u_s5378_sep4 (
    .clk, .rst_n, .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .n_stall());
  sep_session #(.N(8), .M(27), .R(12), .B(4), .W(4), .NUM_WIN(8), .TAPS(12'h53), .PR(1), .DET(1), .CUBES(1)) u_s5378_sep8 (
    .clk, .rst_n, .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .n_stall());
  sep_session #(.N(8), .M(31), .R(38), .B(4), .W(16), .NUM_WIN(2), .TAPS(38'h63), .PR(1), .DET(1), .CUBES(1)) u_s9234_sep2 (
    .clk, .rst_n, .finished(fin[3]), .checks(ck[3]), .failures(fl[3]), .n_stall());
  sep_session #(.N(8), .M(31), .R(24), .B(4), .W(8), .NUM_WIN(4), .TAPS(24'hc20001), .PR(1), .DET(1), .CUBES(1)) u_s9234_sep4 (
    .clk, .rst_n, .finished(fin[4]), .checks(ck[4]), .failures(fl[4]), .n_stall());
  sep_session #(.N(8), .M(31), .R(24), .B(4), .W(4), .NUM_WIN(8), .TAPS(24'hc20001), .PR(1), .DET(1), .CUBES(1)) u_s9234_sep8 (
    .clk, .rst_n, .finished(fin[5]), .checks(ck[5]), .failures(fl[5]), .n_stall());
  sep_session #(.N(8), .M(88), .R(36), .B(4), .W(44), .NUM_WIN(2), .TAPS(36'h2000001), .PR(1), .DET(1), .CUBES(1)) u_s13207_sep2 (
    .clk, .rst_n, .finished(fin[6]), .checks(ck[6]), .failures(fl[6]), .n_stall());
  sep_session #(.N(8), .M(88), .R(20), .B(4), .W(22), .NUM_WIN(4), .TAPS(20'h20001), .PR(1), .DET(1), .CUBES(1)) u_s13207_sep4 (
    .clk, .rst_n, .finished(fin[7]), .checks(ck[7]), .failures(fl[7]), .n_stall());
  sep_session #(.N(8), .M(88), .R(16), .B(4), .W(11), .NUM_WIN(8), .TAPS(16'ha011), .PR(1), .DET(1), .CUBES(1)) u_s13207_sep8 (
    .clk, .rst_n, .finished(fin[8]), .checks(ck[8]), .failures(fl[8]), .n_stall());
  sep_session #(.N(8), .M(27), .R(28), .B(6), .W(14), .NUM_WIN(2), .TAPS(28'h2000001), .PR(1), .DET(1), .CUBES(1)) u_s5378_sep2_b6 (
    .clk, .rst_n, .finished(fin[9]), .checks(ck[9]), .failures(fl[9]), .n_stall());
  sep_session #(.N(8), .M(27), .R(28), .B(8), .W(14), .NUM_WIN(2), .TAPS(28'h2000001), .PR(1), .DET(1), .CUBES(1)) u_s5378_sep2_b8 (
    .clk, .rst_n, .finished(fin[10]), .checks(ck[10]), .failures(fl[10]), .n_stall());

  always #5 clk = ~clk;

  function automatic int sum(int a [NI]);
    int s;
    s = 0;
    for (int i = 0; i < NI; i++) s += a[i];
    return s;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog, finished sessions %b", fin);
    $display("TB_RESULT checks=%0d failures=%0d", sum(ck), sum(fl) + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wait (&fin);
    $display("TB_RESULT checks=%0d failures=%0d", sum(ck), sum(fl));
    $finish;
  end
endmodule
