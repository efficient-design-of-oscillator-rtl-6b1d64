// tero_cell: behavioural model of one transient effect ring oscillator
// (TERO) cell (not synthesizable as written; on the FPGA it is built from
// AND2 and INV library cells).
//
// Structure modelled: two branches, each a 2-input AND gate followed by
// three inverters. Both AND gates take ctrl; their other inputs are the
// outputs of the opposite branches, which cross over. The cell output is
// the end of the upper branch. With ctrl low both branches rest at 1. When
// ctrl rises both branches switch together and the latch oscillates for a
// while; the mismatch between the branches ends the oscillation and the
// latch settles into one of its two stable states.
//
// The model reproduces that behaviour, not the analog mechanism: after ctrl
// rises the output toggles every HALF_PS picoseconds for N_OSC full periods
// (plus a uniform noise of up to +-JITTER_OSC periods), producing N_OSC
// rising edges, then settles at FINAL. It returns to 1 when ctrl falls.
// A synthesis tool that reads this model anyway turns its timing-controlled
// variables into latches; those latches belong to the model, not to the
// PUF, whose cells are placed library gates on the FPGA.
`timescale 1ns / 1ps
module tero_cell #(
  parameter int unsigned HALF_PS    = 1000,
  parameter int unsigned N_OSC      = 200,
  parameter bit          FINAL      = 1'b0,
  parameter int unsigned JITTER_OSC = 0
) (
  input  logic ctrl,  // control pulse to both AND gates
  output logic out    // output of the upper branch
);

  int unsigned n_osc;  // oscillations of the current activation
  int unsigned step;   // half periods elapsed since ctrl rose

  initial out = 1'b1;

  // One half period per pass: steps 0 .. 2*n_osc-1 toggle the output
  // (falling on even steps, rising on odd steps), step 2*n_osc settles it
  // at FINAL, after which the cell waits for ctrl to fall.
  always begin
    if (!ctrl) begin
      out  = 1'b1;
      step = 0;
      @(posedge ctrl);
      n_osc = N_OSC;
      if (JITTER_OSC != 0)
        n_osc = N_OSC - JITTER_OSC + ($urandom % (2 * JITTER_OSC + 1));
    end else if (step <= 2 * n_osc) begin
      #(real'(HALF_PS) / 1000.0);
      if (ctrl) begin
        if (step == 2 * n_osc) out = FINAL;
        else                   out = step[0];
        step++;
      end
    end else begin
      @(negedge ctrl);
    end
  end

endmodule
