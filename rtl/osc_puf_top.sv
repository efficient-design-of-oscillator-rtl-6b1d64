// osc_puf_top: the two oscillator PUFs side by side.
//
// ro_puf (ring oscillators compared by frequency, arbiter bit extractor)
// and tero_puf (transient effect ring oscillators compared by number of
// oscillations, subtractor bit extractor) share the system clock and reset
// and are otherwise independent: each has its own start, busy, valid and
// 128-bit response. Each can also measure a single challenge (`*_single`
// high at start, pair number on `*_challenge`), returning its bit(s) on
// `ro_bit` / `tero_bits`. ro_osc_a / ro_osc_b bring out the RO multiplexer
// outputs, the signals that on the FPGA go through the global clock
// buffers to the counters. DEVICE_SEED and the jitter parameters only
// affect the simulation models of the oscillating cells.
`timescale 1ns / 1ps
module osc_puf_top
#(
  parameter int unsigned N_CELLS         = puf_pkg::DEF_N_CELLS,
  parameter int unsigned CNT_W           = puf_pkg::DEF_CNT_W,
  parameter int unsigned TERO_K          = 1,
  parameter int unsigned TERO_ACT_CYCLES = puf_pkg::DEF_ACT_CYCLES,
  parameter int unsigned DEVICE_SEED     = 1,
  parameter int unsigned RO_JITTER_PS    = 0,
  parameter int unsigned TERO_JITTER_OSC = 0,
  localparam int unsigned NP             = N_CELLS / 2,
  localparam int unsigned TIE_W          = $clog2(NP + 1),
  localparam int unsigned SEL_W          = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // RO PUF
  input  logic                 ro_start,
  input  logic                 ro_single,
  input  logic [SEL_W-1:0]     ro_challenge,
  output logic                 ro_busy,
  output logic                 ro_valid,
  output logic [NP-1:0]        ro_response,
  output logic                 ro_bit,
  output logic [TIE_W-1:0]     ro_ties,
  output logic                 ro_osc_a,
  output logic                 ro_osc_b,
  // TERO PUF
  input  logic                 tero_start,
  input  logic                 tero_single,
  input  logic [SEL_W-1:0]     tero_challenge,
  output logic                 tero_busy,
  output logic                 tero_valid,
  output logic [NP*TERO_K-1:0] tero_response,
  output logic [TERO_K-1:0]    tero_bits,
  output logic [CNT_W:0]       tero_diff
);

  ro_puf #(
    .N_CELLS(N_CELLS), .CNT_W(CNT_W),
    .DEVICE_SEED(DEVICE_SEED), .JITTER_PS(RO_JITTER_PS)
  ) u_ro_puf (
    .clk, .rst_n, .start(ro_start), .single(ro_single),
    .challenge(ro_challenge), .busy(ro_busy), .valid(ro_valid),
    .response(ro_response), .bit_out(ro_bit), .ties(ro_ties),
    .osc_a(ro_osc_a), .osc_b(ro_osc_b)
  );

  tero_puf #(
    .N_CELLS(N_CELLS), .CNT_W(CNT_W), .K(TERO_K),
    .ACT_CYCLES(TERO_ACT_CYCLES),
    .DEVICE_SEED(DEVICE_SEED), .JITTER_OSC(TERO_JITTER_OSC)
  ) u_tero_puf (
    .clk, .rst_n, .start(tero_start), .single(tero_single),
    .challenge(tero_challenge), .busy(tero_busy), .valid(tero_valid),
    .response(tero_response), .bits_out(tero_bits), .diff(tero_diff)
  );

endmodule
