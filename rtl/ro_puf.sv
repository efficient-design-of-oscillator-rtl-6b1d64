// ro_puf: ring-oscillator PUF.
//
// N_CELLS ring oscillators are split into block A and block B of
// NP = N_CELLS/2 cells. Challenge i compares cell A.i with cell B.i, so
// every cell is used once and never against a cell of its own block. For
// each challenge the sequencer (ro_puf_ctrl) enables both cells on the same
// clock edge through per-cell enable flip-flops (cell_demux, REGISTERED);
// the T flip-flop outputs of the two selected cells pass through the output
// multiplexers (cell_mux) and clock two CNT_W-bit counters (osc_counter).
// The first counter to reach its maximum wins: the arbiter (ro_arbiter)
// gives 1 for block A and 0 for block B, the sequencer stops both cells,
// and the bit becomes response bit i. With `single` high a start measures
// only the pair given by `challenge` and returns its bit on `bit_out`. One
// response takes, per bit, about
// 2**CNT_W periods of the divided oscillator plus roughly 20 clock cycles.
//
// osc_a / osc_b are the multiplexer outputs, the signals that on the FPGA
// enter a CLKBUF and are distributed to the counters on the global clock
// network; here they drive the counter clocks directly.
// DEVICE_SEED and JITTER_PS only affect the simulation models of the cells.
`timescale 1ns / 1ps
module ro_puf
#(
  parameter int unsigned N_CELLS     = puf_pkg::DEF_N_CELLS,
  parameter int unsigned CNT_W       = puf_pkg::DEF_CNT_W,
  parameter int unsigned DEVICE_SEED = 1,
  parameter int unsigned JITTER_PS   = 0,
  localparam int unsigned NP         = N_CELLS / 2,
  localparam int unsigned SEL_W      = (NP > 1) ? $clog2(NP) : 1,
  localparam int unsigned TIE_W      = $clog2(NP + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             single,     // 1: measure `challenge` only
  input  logic [SEL_W-1:0] challenge,
  output logic             busy,
  output logic             valid,
  output logic [NP-1:0]    response,
  output logic             bit_out,    // bit of the last measured pair
  output logic [TIE_W-1:0] ties,
  output logic             osc_a,     // to the counter of block A
  output logic             osc_b      // to the counter of block B
);

  logic [SEL_W-1:0] sel;
  logic             ctrl, clr, arm;
  logic             arb_done, arb_bit, arb_tie;
  logic [NP-1:0]    en_a, en_b, out_a, out_b;
  logic             full_a, full_b;

  ro_puf_ctrl #(.NP(NP)) u_ctrl (
    .clk, .rst_n, .start, .single, .challenge, .busy, .valid, .response,
    .bit_out, .ties,
    .sel, .ctrl, .clr, .arm,
    .arb_done, .arb_bit, .arb_tie
  );

  cell_demux #(.N(NP), .REGISTERED(1'b1)) u_demux_a (
    .clk, .rst_n, .ctrl, .sel, .cell_ctrl(en_a)
  );
  cell_demux #(.N(NP), .REGISTERED(1'b1)) u_demux_b (
    .clk, .rst_n, .ctrl, .sel, .cell_ctrl(en_b)
  );

  ro_cell_block #(.M(NP), .BLOCK(0), .DEVICE_SEED(DEVICE_SEED),
                  .JITTER_PS(JITTER_PS)) u_block_a (
    .cell_ctrl(en_a), .clr, .cell_out(out_a)
  );
  ro_cell_block #(.M(NP), .BLOCK(1), .DEVICE_SEED(DEVICE_SEED),
                  .JITTER_PS(JITTER_PS)) u_block_b (
    .cell_ctrl(en_b), .clr, .cell_out(out_b)
  );

  cell_mux #(.N(NP)) u_mux_a (.cell_out(out_a), .sel, .y(osc_a));
  cell_mux #(.N(NP)) u_mux_b (.cell_out(out_b), .sel, .y(osc_b));

  osc_counter #(.W(CNT_W)) u_cnt_a (
    .osc(osc_a), .clr, .count(), .full(full_a)
  );
  osc_counter #(.W(CNT_W)) u_cnt_b (
    .osc(osc_b), .clr, .count(), .full(full_b)
  );

  ro_arbiter u_arb (
    .clk, .rst_n, .arm, .full_a, .full_b,
    .done(arb_done), .bit_out(arb_bit), .tie(arb_tie)
  );

endmodule
