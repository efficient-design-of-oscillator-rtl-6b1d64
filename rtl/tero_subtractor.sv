// tero_subtractor: bit extractor of the TERO PUF.
//
// Subtracts the oscillation count of the block-B cell from that of the
// block-A cell and extracts K bits (1 to 3) per challenge. Bit 0 is the
// sign of the comparison: 1 when cell A oscillated more times than cell B,
// 0 otherwise (equal counts give 0). Bits 1..K-1 are the lowest bits of the
// magnitude |A - B|. Which bits are taken beyond the sign is this design's
// choice. Purely combinational.
`timescale 1ns / 1ps
module tero_subtractor #(
  parameter int unsigned W = 11,
  parameter int unsigned K = 1
) (
  input  logic [W-1:0] count_a,
  input  logic [W-1:0] count_b,
  output logic [W:0]   diff,     // count_a - count_b, two's complement
  output logic [K-1:0] bits
);

  logic [W-1:0] mag;
  logic         a_gt_b;

  initial assert (K >= 1 && K <= 3 && K <= W + 1)
    else $error("tero_subtractor: K must be 1 to 3");

  always_comb begin
    diff   = {1'b0, count_a} - {1'b0, count_b};
    a_gt_b = count_a > count_b;
    mag    = a_gt_b ? count_a - count_b : count_b - count_a;
    bits   = '0;
    bits[0] = a_gt_b;
    for (int k = 1; k < int'(K); k++) bits[k] = mag[k-1];
  end

endmodule
