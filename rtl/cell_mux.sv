// cell_mux: output multiplexer of one cell block.
//
// Drives the output of the selected cell to the block's counter, which uses
// it as its clock. The select is held constant for the whole measurement;
// the sequencer keeps the counters in clear while it changes, so glitches
// from switching the select are never counted. Purely combinational.
`timescale 1ns / 1ps
module cell_mux #(
  parameter int unsigned N      = 128,
  localparam int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]     cell_out,  // one output per cell
  input  logic [SEL_W-1:0] sel,       // selected cell
  output logic             y          // to the counter clock
);

  always_comb begin
    y = 1'b0;
    if (32'(sel) < N) y = cell_out[sel];
  end

endmodule
