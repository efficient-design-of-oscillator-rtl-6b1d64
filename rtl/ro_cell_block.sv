// ro_cell_block: one block (A or B) of M ring-oscillator cells.
//
// Each cell is an ro_cell followed by its own T flip-flop (toggle_ff), so
// every block output is the cell frequency divided by two with a symmetric
// duty cycle. Cell i is enabled by cell_ctrl[i], which comes from the
// registered demultiplexer. On the FPGA each block sits in its own
// exclusive placement region; in simulation each cell's half period is
// taken from the process-variation model (osc_model_pkg) using DEVICE_SEED,
// the block number BLOCK (0 = A, 1 = B) and the cell index.
`timescale 1ns / 1ps
module ro_cell_block #(
  parameter int unsigned M           = 128,
  parameter int unsigned BLOCK       = 0,
  parameter int unsigned DEVICE_SEED = 1,
  parameter int unsigned JITTER_PS   = 0
) (
  input  logic [M-1:0] cell_ctrl,  // per-cell enable
  input  logic         clr,        // clears the T flip-flops
  output logic [M-1:0] cell_out    // T flip-flop outputs
);

  for (genvar i = 0; i < int'(M); i++) begin : g_cell
    logic ro_out;

    ro_cell #(
      .HALF_PS  (osc_model_pkg::ro_half_ps(DEVICE_SEED, BLOCK, i)),
      .JITTER_PS(JITTER_PS)
    ) u_ro (
      .ctrl(cell_ctrl[i]),
      .out (ro_out)
    );

    toggle_ff u_tff (
      .osc(ro_out),
      .clr(clr),
      .q  (cell_out[i])
    );
  end

endmodule
