// toggle_ff: T flip-flop placed at the output of each RO cell.
//
// It toggles on every rising edge of the oscillator, so its output runs at
// half the oscillator frequency with a 50 % duty cycle and clean edges, and
// it loads the ring with one flip-flop input. The asynchronous clear (active
// high) puts every cell in the same state before a measurement; the clear
// is this design's choice.
`timescale 1ns / 1ps
module toggle_ff (
  input  logic osc,  // raw ring-oscillator output (used as clock)
  input  logic clr,  // asynchronous clear, active high
  output logic q     // divided-by-two output
);

  always_ff @(posedge osc or posedge clr) begin
    if (clr) q <= 1'b0;
    else     q <= ~q;
  end

endmodule
