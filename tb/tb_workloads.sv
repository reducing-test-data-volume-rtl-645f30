// Workload testbench for the integrated-LFSR decompressor: the configurations
// of the published results (six ISCAS-89 circuits at block size 4, and the
// smallest circuit at block sizes 6 and 8), one session each, all running at
// the same time. Each session has the circuit's scan-cell count and integrated
// LFSR size; the chain counts are this design's choice. The
// circuits' test cubes are not available, so each session makes random test
// cubes with as many specified bits as its LFSR can take (at most its length
// minus 20), solves their seeds (GF(2) elimination, free seed bits 0),
// Huffman-codes the seed blocks and checks every applied test vector, every
// specified bit and the MISR signature against bit-level models.
//
//   s5378   integrated: 214 cells as 8 x 27, LFSR 40 = 8 x 5
//   s9234   integrated: 247 cells as 4 x 62, LFSR 68 = 4 x 17
//   s13207  integrated: 700 cells as 8 x 88, LFSR 48 = 8 x 6
//   s15850  integrated: 611 cells as 6 x 102, LFSR 54 = 6 x 9
//   s38417  integrated: 1664 cells as 8 x 208, LFSR 104 = 8 x 13
//   s38584  integrated: 1464 cells as 8 x 183, LFSR 120 = 8 x 15
//   s5378   integrated again with block sizes 6 and 8
module tb_workloads;
  localparam int NI = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NI-1:0] fin;
  int ck [NI];
  int fl [NI];

  int_session #(.N(8), .M(27), .Q(5), .B(4), .TAPS(40'h4000280001), .P(2), .CUBES(1)) u_s5378_int (
    .clk, .rst_n, .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .n_stall(), .n_prefetch());
  int_session #(.N(4), .M(62), .Q(17), .B(4), .TAPS(68'h800000000000001), .P(2), .CUBES(1)) u_s9234_int (
    .clk, .rst_n, .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .n_stall(), .n_prefetch());
  int_session #(.N(8), .M(88), .Q(6), .B(4), .TAPS(48'h800000300001), .P(2), .CUBES(1)) u_s13207_int (
    .clk, .rst_n, .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .n_stall(), .n_prefetch());
  int_session #(.N(6), .M(102), .Q(9), .B(4), .TAPS(54'h20000000060001), .P(2), .CUBES(1)) u_s15850_int (
    .clk, .rst_n, .finished(fin[3]), .checks(ck[3]), .failures(fl[3]), .n_stall(), .n_prefetch());
  int_session #(.N(8), .M(208), .Q(13), .B(4), .TAPS(104'h80600000000000000000000001), .P(2), .CUBES(1)) u_s38417_int (
    .clk, .rst_n, .finished(fin[4]), .checks(ck[4]), .failures(fl[4]), .n_stall(), .n_prefetch());
  int_session #(.N(8), .M(183), .Q(15), .B(4), .TAPS(120'h20000000000000000000000000205), .P(2), .CUBES(1)) u_s38584_int (
    .clk, .rst_n, .finished(fin[5]), .checks(ck[5]), .failures(fl[5]), .n_stall(), .n_prefetch());
  int_session #(.N(8), .M(27), .Q(5), .B(6), .TAPS(40'h4000280001), .P(2), .CUBES(1)) u_s5378_int_b6 (
    .clk, .rst_n, .finished(fin[6]), .checks(ck[6]), .failures(fl[6]), .n_stall(), .n_prefetch());
  int_session #(.N(8), .M(27), .Q(5), .B(8), .TAPS(40'h4000280001), .P(2), .CUBES(1)) u_s5378_int_b8 (
    .clk, .rst_n, .finished(fin[7]), .checks(ck[7]), .failures(fl[7]), .n_stall(), .n_prefetch());

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
