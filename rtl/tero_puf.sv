// tero_puf: transient effect ring oscillator (TERO) PUF.
//
// N_CELLS TERO cells are split into block A and block B of
// NP = N_CELLS/2 cells; challenge i compares cell A.i with cell B.i. For
// each challenge the sequencer (tero_puf_ctrl) raises the control pulse of
// both cells through the demultiplexers (cell_demux, combinational) for
// ACT_CYCLES clock cycles (1 us by default). Each cell oscillates for a
// while and settles; its output goes, without a flip-flop, through the
// output multiplexer (cell_mux) to a CNT_W-bit counter (osc_counter) that
// counts its oscillations. At the end of the pulse the subtractor
// (tero_subtractor) compares the two counts and delivers K bits (1 to 3),
// stored as response bits [i*K +: K]. With `single` high a start measures
// only the pair given by `challenge` and returns its bits on `bits_out`.
// One response takes NP * (ACT_CYCLES
// + CLR_CYCLES + STOP_CYCLES) clock cycles, 128 * 108 = 13824 by default.
//
// DEVICE_SEED and JITTER_OSC only affect the simulation models of the cells.
`timescale 1ns / 1ps
module tero_puf
#(
  parameter int unsigned N_CELLS     = puf_pkg::DEF_N_CELLS,
  parameter int unsigned CNT_W       = puf_pkg::DEF_CNT_W,
  parameter int unsigned K           = 1,
  parameter int unsigned ACT_CYCLES  = puf_pkg::DEF_ACT_CYCLES,
  parameter int unsigned DEVICE_SEED = 1,
  parameter int unsigned JITTER_OSC  = 0,
  localparam int unsigned NP         = N_CELLS / 2,
  localparam int unsigned SEL_W      = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic             start,
  input  logic             single,     // 1: measure `challenge` only
  input  logic [SEL_W-1:0] challenge,
  output logic            busy,
  output logic            valid,
  output logic [NP*K-1:0] response,
  output logic [K-1:0]    bits_out,   // bits of the last measured pair
  output logic [CNT_W:0]  diff      // last A - B count difference
);

  logic [SEL_W-1:0] sel;
  logic             ctrl, clr;
  logic [NP-1:0]    ctl_a, ctl_b, out_a, out_b;
  logic             osc_a, osc_b;
  logic [CNT_W-1:0] count_a, count_b;
  logic [K-1:0]     ext_bits;

  tero_puf_ctrl #(.NP(NP), .K(K), .ACT_CYCLES(ACT_CYCLES)) u_ctrl (
    .clk, .rst_n, .start, .single, .challenge, .busy, .valid, .response,
    .bits_out, .sel, .ctrl, .clr, .ext_bits
  );

  cell_demux #(.N(NP), .REGISTERED(1'b0)) u_demux_a (
    .clk, .rst_n, .ctrl, .sel, .cell_ctrl(ctl_a)
  );
  cell_demux #(.N(NP), .REGISTERED(1'b0)) u_demux_b (
    .clk, .rst_n, .ctrl, .sel, .cell_ctrl(ctl_b)
  );

  tero_cell_block #(.M(NP), .BLOCK(0), .DEVICE_SEED(DEVICE_SEED),
                    .JITTER_OSC(JITTER_OSC)) u_block_a (
    .cell_ctrl(ctl_a), .cell_out(out_a)
  );
  tero_cell_block #(.M(NP), .BLOCK(1), .DEVICE_SEED(DEVICE_SEED),
                    .JITTER_OSC(JITTER_OSC)) u_block_b (
    .cell_ctrl(ctl_b), .cell_out(out_b)
  );

  cell_mux #(.N(NP)) u_mux_a (.cell_out(out_a), .sel, .y(osc_a));
  cell_mux #(.N(NP)) u_mux_b (.cell_out(out_b), .sel, .y(osc_b));

  osc_counter #(.W(CNT_W)) u_cnt_a (
    .osc(osc_a), .clr, .count(count_a), .full()
  );
  osc_counter #(.W(CNT_W)) u_cnt_b (
    .osc(osc_b), .clr, .count(count_b), .full()
  );

  tero_subtractor #(.W(CNT_W), .K(K)) u_sub (
    .count_a, .count_b, .diff, .bits(ext_bits)
  );

endmodule
