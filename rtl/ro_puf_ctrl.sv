// ro_puf_ctrl: sequencer of the RO PUF.
//
// A pulse on `start` with `single` low produces one response of NP bits;
// with `single` high only the pair given by `challenge` is measured and its
// bit appears on `bit_out` (and in the response at that position). For each
// challenge (cell pair) i = 0 .. NP-1 in turn:
//   CLEAR  `sel` = i, counters and T flip-flops held in clear, cells off,
//          for CLR_CYCLES clock cycles (lets the multiplexers settle);
//   RUN    `ctrl` = 1 enables cell A.i and cell B.i on the same clock edge
//          (through the registered demultiplexers) and the arbiter is armed;
//          the state lasts until the arbiter reports which counter reached
//          its maximum first;
//   STOP   `ctrl` = 0 stops both oscillators, the arbiter's bit is stored
//          as response bit i, and the sequencer waits STOP_CYCLES cycles
//          for the cells to come to rest.
// After the last pair (or the single pair) `valid` rises with the response
// and `bit_out` and stays until the next `start`. `busy` is high from `start` to `valid`. `ties` counts the
// pairs the arbiter could not separate within one clock cycle.
// All outputs are registered. `clr` is high only in CLEAR, so every
// measurement starts with a fresh rising edge of the asynchronous clear of
// the counters and T flip-flops. The bit order (pair i gives bit i) and the
// clear/stop waiting times are this design's choices.
`timescale 1ns / 1ps
module ro_puf_ctrl
  import puf_pkg::*;
#(
  parameter int unsigned NP          = 128,
  parameter int unsigned CLR_CYCLES  = 4,
  parameter int unsigned STOP_CYCLES = 8,
  localparam int unsigned SEL_W      = (NP > 1) ? $clog2(NP) : 1,
  localparam int unsigned TIE_W      = $clog2(NP + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             single,     // measure one challenge only
  input  logic [SEL_W-1:0] challenge,  // the challenge for single mode
  output logic             busy,
  output logic             valid,
  output logic [NP-1:0]    response,
  output logic             bit_out,    // bit of the last measured pair
  output logic [TIE_W-1:0] ties,
  // to the datapath
  output logic [SEL_W-1:0] sel,
  output logic             ctrl,
  output logic             clr,
  output logic             arm,
  input  logic             arb_done,
  input  logic             arb_bit,
  input  logic             arb_tie
);

  seq_state_t  state;
  logic [15:0] wait_cnt;
  logic        single_q;

  assign busy = state != S_IDLE && state != S_DONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      wait_cnt <= '0;
      sel      <= '0;
      ctrl     <= 1'b0;
      clr      <= 1'b0;
      arm      <= 1'b0;
      valid    <= 1'b0;
      response <= '0;
      bit_out  <= 1'b0;
      single_q <= 1'b0;
      ties     <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state    <= S_CLEAR;
            wait_cnt <= '0;
            sel      <= single ? challenge : '0;
            single_q <= single;
            clr      <= 1'b1;
            valid    <= 1'b0;
            ties     <= '0;
          end
        end
        S_CLEAR: begin
          if (32'(wait_cnt) >= CLR_CYCLES - 1) begin
            state <= S_RUN;
            clr   <= 1'b0;
            ctrl  <= 1'b1;
            arm   <= 1'b1;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_RUN: begin
          if (arb_done) begin
            state         <= S_STOP;
            ctrl          <= 1'b0;
            arm           <= 1'b0;
            wait_cnt      <= '0;
            response[sel] <= arb_bit;
            bit_out       <= arb_bit;
            if (arb_tie) ties <= ties + 1'b1;
          end
        end
        S_STOP: begin
          if (32'(wait_cnt) >= STOP_CYCLES - 1) begin
            wait_cnt <= '0;
            if (single_q || 32'(sel) == NP - 1) begin
              state <= S_DONE;
              valid <= 1'b1;
            end else begin
              state <= S_CLEAR;
              clr   <= 1'b1;
              sel   <= sel + 1'b1;
            end
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
