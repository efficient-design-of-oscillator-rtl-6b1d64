// ro_cell: behavioural model of one ring-oscillator cell (not synthesizable
// as written; on the FPGA the cell is one AND2 and three INV library cells).
//
// Structure modelled: ctrl and the cell output feed a 2-input AND gate,
// followed by three inverters whose last output is the cell output and is
// fed back to the AND gate. With ctrl low the AND output is 0 and the output
// rests at 1. When ctrl rises, the loop holds an odd number of inversions
// and the output toggles every HALF_PS picoseconds (the delay around the
// loop) until ctrl falls, after which it returns to 1.
//
// HALF_PS stands for the cell's process variation and JITTER_PS for random
// noise: each half period is HALF_PS plus a uniform value in
// [-JITTER_PS, +JITTER_PS]. Both are simulation parameters of this model.
`timescale 1ns / 1ps
module ro_cell #(
  parameter int unsigned HALF_PS   = 1000,
  parameter int unsigned JITTER_PS = 0
) (
  input  logic ctrl,  // enable (AND gate input)
  output logic out    // output of the third inverter
);

  int unsigned half_ps;

  initial out = 1'b1;

  always begin
    if (!ctrl) begin
      out = 1'b1;
      @(posedge ctrl);
    end else begin
      half_ps = HALF_PS;
      if (JITTER_PS != 0)
        half_ps = HALF_PS - JITTER_PS + ($urandom % (2 * JITTER_PS + 1));
      #(real'(half_ps) / 1000.0);
      out = ctrl ? ~out : 1'b1;
    end
  end

endmodule
