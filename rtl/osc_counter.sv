// osc_counter: W-bit counter clocked by the selected oscillator output.
//
// Counts rising edges of `osc` from 0 and stops at the all-ones maximum,
// where `full` is raised. In the RO PUF `full` tells the arbiter that this
// block's oscillator reached the maximum value first; in the TERO PUF the
// count is the number of oscillations of the cell and the saturation only
// guards against wrapping. The asynchronous clear (active high) comes from
// the sequencer in the system clock domain. Saturating rather than wrapping
// is this design's choice.
`timescale 1ns / 1ps
module osc_counter #(
  parameter int unsigned W = 11
) (
  input  logic         osc,    // counted signal, used as clock
  input  logic         clr,    // asynchronous clear, active high
  output logic [W-1:0] count,
  output logic         full    // count reached 2**W - 1
);

  assign full = &count;

  always_ff @(posedge osc or posedge clr) begin
    if (clr)        count <= '0;
    else if (!full) count <= count + 1'b1;
  end

endmodule
