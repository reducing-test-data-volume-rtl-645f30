// Workload testbench for the separate-LFSR decompressor, on the published
// configurations of the ISCAS-89 circuits s15850, s38417 and s38584 (each with its
// three scan window sizes and LFSR sizes, at block size 4), one
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
//   s15850  separate:   window 306 cells -> 2 windows of 39 slices on 8 x 77, LFSR 32
//   s15850  separate:   window 153 cells -> 4 windows of 20 slices on 8 x 77, LFSR 24
//   s15850  separate:   window 77 cells -> 8 windows of 10 slices on 8 x 77, LFSR 20
//   s38417  separate:   window 832 cells -> 2 windows of 104 slices on 8 x 208, LFSR 60
//   s38417  separate:   window 416 cells -> 4 windows of 52 slices on 8 x 208, LFSR 38
//   s38417  separate:   window 208 cells -> 8 windows of 26 slices on 8 x 208, LFSR 28
//   s38584  separate:   window 732 cells -> 2 windows of 92 slices on 8 x 183, LFSR 61
//   s38584  separate:   window 366 cells -> 4 windows of 46 slices on 8 x 183, LFSR 38
//   s38584  separate:   window 183 cells -> 8 windows of 23 slices on 8 x 183, LFSR 28
module tb_workloads_sep_large;
  localparam int NI = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NI-1:0] fin;
  int ck [NI];
  int fl [NI];

  sep_session #(.N(8), .M(77), .R(32), .B(4), .W(39), .NUM_WIN(2), .TAPS(32'h400007), .PR(1), .DET(1), .CUBES(1)) u_s15850_sep2 (
    .clk, .rst_n, .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .n_stall());
  sep_session #(.N(8), .M(77), .R(24), .B(4), .W(20), .NUM_WIN(4), .TAPS(24'hc20001), .PR(1), .DET(1), .CUBES(1)) u_s15850_sep4 (
    .clk, .rst_n, .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .n_stall());
  sep_session #(.N(8), .M(77), .R(20), .B(4), .W(10), .NUM_WIN(8), .TAPS(20'h20001), .PR(1), .DET(1), .CUBES(1)) u_s15850_sep8 (
    .clk, .rst_n, .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .n_stall());
  sep_session #(.N(8), .M(208), .R(60), .B(4), .W(104), .NUM_WIN(2), .TAPS(60'h800000000000001), .PR(1), .DET(1), .CUBES(1)) u_s38417_sep2 (
    .clk, .rst_n, .finished(fin[3]), .checks(ck[3]), .failures(fl[3]), .n_stall());
  sep_session #(.N(8), .M(208), .R(38), .B(4), .W(52), .NUM_WIN(4), .TAPS(38'h63), .PR(1), .DET(1), .CUBES(1)) u_s38417_sep4 (
    .clk, .rst_n, .finished(fin[4]), .checks(ck[4]), .failures(fl[4]), .n_stall());
  sep_session #(.N(8), .M(208), .R(28), .B(4), .W(26), .NUM_WIN(8), .TAPS(28'h2000001), .PR(1), .DET(1), .CUBES(1)) u_s38417_sep8 (
    .clk, .rst_n, .finished(fin[5]), .checks(ck[5]), .failures(fl[5]), .n_stall());
  sep_session #(.N(8), .M(183), .R(61), .B(4), .W(92), .NUM_WIN(2), .TAPS(61'h1000600000000001), .PR(1), .DET(1), .CUBES(1)) u_s38584_sep2 (
    .clk, .rst_n, .finished(fin[6]), .checks(ck[6]), .failures(fl[6]), .n_stall());
  sep_session #(.N(8), .M(183), .R(38), .B(4), .W(46), .NUM_WIN(4), .TAPS(38'h63), .PR(1), .DET(1), .CUBES(1)) u_s38584_sep4 (
    .clk, .rst_n, .finished(fin[7]), .checks(ck[7]), .failures(fl[7]), .n_stall());
  sep_session #(.N(8), .M(183), .R(28), .B(4), .W(23), .NUM_WIN(8), .TAPS(28'h2000001), .PR(1), .DET(1), .CUBES(1)) u_s38584_sep8 (
    .clk, .rst_n, .finished(fin[8]), .checks(ck[8]), .failures(fl[8]), .n_stall());

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
