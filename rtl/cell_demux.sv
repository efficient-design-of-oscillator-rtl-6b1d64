// cell_demux: control demultiplexer of one cell block.
//
// The control signal is routed to the one cell of the block that the cell
// select (the challenge) addresses; every other cell gets 0 and stays idle.
// With REGISTERED = 1 (the RO PUF) each output comes from a flip-flop on
// the system clock, one flip-flop per cell input, so that the cells of block
// A and block B selected together start on the same clock edge: the enable
// signal cannot use the low-skew global network, but the clock can. With
// REGISTERED = 0 (the TERO PUF) the decoder is purely combinational.
// Registered outputs clear to 0 on the active-low reset.
`timescale 1ns / 1ps
module cell_demux #(
  parameter int unsigned N          = 128,
  parameter bit          REGISTERED = 1'b1,
  localparam int unsigned SEL_W     = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ctrl,       // control / enable from the sequencer
  input  logic [SEL_W-1:0] sel,        // selected cell
  output logic [N-1:0]     cell_ctrl   // one control line per cell
);

  logic [N-1:0] dec;

  always_comb begin
    dec = '0;
    if (ctrl && 32'(sel) < N) dec[sel] = 1'b1;
  end

  if (REGISTERED) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) cell_ctrl <= '0;
      else        cell_ctrl <= dec;
    end
  end else begin : g_comb
    assign cell_ctrl = dec;
  end

endmodule
