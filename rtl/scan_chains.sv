// Plain multiple scan chains of the circuit under test.
//
// N chains of M cells, left unchanged by the separate-LFSR architecture. Cell 0
// of each chain is the scan-input end, cell M-1 the scan-output end.
//
// Interface and timing (synchronous, 'capture' has priority):
//   shift   : every chain shifts one cell, scan_in[c] enters cell 0
//   capture : system-mode clock, every cell loads capture_in (the response)
//   cells   : registered cell contents, applied to the circuit under test
//   scan_out: cell M-1 of every chain, to the MISR
// Reset to zero is this design's choice.
module scan_chains #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 27
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic                capture,
  input  logic [N-1:0]        scan_in,
  input  logic [N-1:0][M-1:0] capture_in,
  output logic [N-1:0][M-1:0] cells,
  output logic [N-1:0]        scan_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells <= '0;
    end else if (capture) begin
      cells <= capture_in;
    end else if (shift) begin
      for (int unsigned c = 0; c < N; c++) cells[c] <= {cells[c][M-2:0], scan_in[c]};
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < N; c++) scan_out[c] = cells[c][M-1];
  end

  initial assert (M >= 2) else $error("scan_chains needs M >= 2");

endmodule
