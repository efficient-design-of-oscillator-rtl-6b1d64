// tero_cell_block: one block (A or B) of M TERO cells.
//
// The cell outputs go straight to the output multiplexer: a TERO cell is
// very sensitive to its output load, and a flip-flop at its output would
// unbalance the two branches and cut the number of oscillations, so unlike
// the RO cells there is no T flip-flop. On the FPGA each block sits in its
// own exclusive placement region; in simulation each cell's oscillation
// count and final state come from the process-variation model
// (osc_model_pkg) using DEVICE_SEED, the block number BLOCK (0 = A, 1 = B)
// and the cell index.
`timescale 1ns / 1ps
module tero_cell_block #(
  parameter int unsigned M           = 128,
  parameter int unsigned BLOCK       = 0,
  parameter int unsigned DEVICE_SEED = 1,
  parameter int unsigned HALF_PS     = 1000,
  parameter int unsigned JITTER_OSC  = 0
) (
  input  logic [M-1:0] cell_ctrl,  // per-cell control pulse
  output logic [M-1:0] cell_out
);

  for (genvar i = 0; i < int'(M); i++) begin : g_cell
    tero_cell #(
      .HALF_PS   (HALF_PS),
      .N_OSC     (osc_model_pkg::tero_osc_count(DEVICE_SEED, BLOCK, i)),
      .FINAL     (osc_model_pkg::tero_final(DEVICE_SEED, BLOCK, i)),
      .JITTER_OSC(JITTER_OSC)
    ) u_tero (
      .ctrl(cell_ctrl[i]),
      .out (cell_out[i])
    );
  end

endmodule
