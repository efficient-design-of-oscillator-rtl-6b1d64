// tero_puf_ctrl: sequencer of the TERO PUF.
//
// A pulse on `start` with `single` low produces one response of NP*K bits;
// with `single` high only the pair given by `challenge` is measured and its
// K bits appear on `bits_out` (and in the response at that position). For
// each challenge (cell pair) i = 0 .. NP-1 in turn:
//   CLEAR  `sel` = i, counters held in clear, control pulse low, for
//          CLR_CYCLES clock cycles;
//   RUN    `ctrl` = 1 for exactly ACT_CYCLES clock cycles (the activation
//          time, 1 us at the assumed 100 MHz clock); cell A.i and cell B.i
//          oscillate for a while and come to rest, and their oscillations
//          are counted; in the last cycle the K bits from the subtractor are
//          stored as response bits [i*K +: K];
//   STOP   `ctrl` = 0 for STOP_CYCLES cycles while the cells return to rest.
// After the last pair (or the single pair) `valid` rises with the response
// and `bits_out` and stays until the next `start`. All outputs are registered, so the control pulse reaching
// the combinational demultiplexers is glitch-free; `clr` is high only in
// CLEAR. The bit order and the clear/stop waiting times are this design's
// choices.
`timescale 1ns / 1ps
module tero_puf_ctrl
  import puf_pkg::*;
#(
  parameter int unsigned NP          = 128,
  parameter int unsigned K           = 1,
  parameter int unsigned ACT_CYCLES  = puf_pkg::DEF_ACT_CYCLES,
  parameter int unsigned CLR_CYCLES  = 4,
  parameter int unsigned STOP_CYCLES = 4,
  localparam int unsigned SEL_W      = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              single,     // measure one challenge only
  input  logic [SEL_W-1:0]  challenge,  // the challenge for single mode
  output logic              busy,
  output logic              valid,
  output logic [NP*K-1:0]   response,
  output logic [K-1:0]      bits_out,   // bits of the last measured pair
  // to the datapath
  output logic [SEL_W-1:0]  sel,
  output logic              ctrl,
  output logic              clr,
  input  logic [K-1:0]      ext_bits   // from the subtractor
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
      valid    <= 1'b0;
      response <= '0;
      bits_out <= '0;
      single_q <= 1'b0;
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
          end
        end
        S_CLEAR: begin
          if (32'(wait_cnt) >= CLR_CYCLES - 1) begin
            state    <= S_RUN;
            wait_cnt <= '0;
            clr      <= 1'b0;
            ctrl     <= 1'b1;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_RUN: begin
          if (32'(wait_cnt) >= ACT_CYCLES - 1) begin
            state    <= S_STOP;
            wait_cnt <= '0;
            ctrl     <= 1'b0;
            response[32'(sel) * K +: K] <= ext_bits;
            bits_out <= ext_bits;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
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
