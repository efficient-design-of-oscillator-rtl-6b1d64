// puf_pkg: constants and types shared by the RO PUF and the TERO PUF.
//
// Both PUFs compare a cell of block A with the cell of the same index in
// block B. The defaults below are the sizes of the main configuration:
// 256 cells (two blocks of 128), 11-bit counters, a 1 us activation time
// for the TERO control pulse and a 128-bit response. The system clock
// frequency is not fixed by the design; 100 MHz is assumed here, so the
// 1 us activation time is 100 clock cycles.
`timescale 1ns / 1ps
package puf_pkg;

  localparam int unsigned DEF_N_CELLS    = 256;  // oscillating cells per PUF
  localparam int unsigned DEF_CNT_W      = 11;   // counter width
  localparam int unsigned DEF_CLK_MHZ    = 100;  // assumed system clock
  localparam int unsigned DEF_ACT_NS     = 1000; // TERO activation time
  localparam int unsigned DEF_ACT_CYCLES = DEF_ACT_NS * DEF_CLK_MHZ / 1000;

  // Sequencer states, shared by both PUF controllers.
  typedef enum logic [2:0] {
    S_IDLE,   // waiting for start
    S_CLEAR,  // counters held in clear while the multiplexers settle
    S_RUN,    // selected cells enabled
    S_STOP,   // cells disabled, bit captured, waiting for them to stop
    S_DONE    // response valid
  } seq_state_t;

endpackage
