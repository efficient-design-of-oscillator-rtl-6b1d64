// tb_ro_puf_ctrl: drives the RO sequencer with a model of the datapath. For
// every challenge the model checks that the counters are released only
// after the select has settled, waits a random time after `ctrl` rises and
// then reports a decision whose bit comes from a random reference vector.
// The test checks the final response against the vector, the challenge
// order 0..127, that `ctrl` and `arm` fall right after each decision, the
// tie count, the number of clock cycles per response, and a second run.
// Then single-challenge runs: only the requested pair is measured, its bit
// appears on bit_out and in the response, the other bits are kept.
`timescale 1ns / 1ps
module tb_ro_puf_ctrl;
  localparam int NP = 128;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, single = 1'b0;
  logic busy, valid, ctrl, clr, arm, bit_out;
  logic [6:0] challenge = '0;
  logic [NP-1:0] response, ref_vec, prev;
  logic [7:0] ties;
  logic [6:0] sel;
  logic arb_done = 1'b0, arb_bit = 1'b0, arb_tie = 1'b0;
  int checks = 0, failures = 0;
  int exp_sel, n_ties_exp, cycles, run_sum;

  ro_puf_ctrl #(.NP(NP)) dut (
    .clk, .rst_n, .start, .single, .challenge, .busy, .valid, .response,
    .bit_out, .ties, .sel, .ctrl, .clr, .arm, .arb_done, .arb_bit, .arb_tie
  );

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // datapath model: one decision per RUN phase
  initial begin
    int wait_cycles;
    forever begin
      @(posedge clk iff (ctrl && arm));
      chk(!clr, "counters released during run");
      chk(32'(sel) == exp_sel, "challenge order");
      wait_cycles = 1 + $urandom % 20;
      run_sum += wait_cycles;
      repeat (wait_cycles - 1) @(posedge clk);
      #1;
      arb_done = 1'b1;
      arb_bit  = ref_vec[sel];
      arb_tie  = ($urandom % 8) == 0;
      if (arb_tie) n_ties_exp++;
      @(posedge clk); #1;
      chk(!ctrl && !arm, "stop after decision");
      arb_done = 1'b0; arb_tie = 1'b0;
      exp_sel++;
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      for (int w = 0; w < NP / 32; w++) ref_vec[w*32 +: 32] = $urandom;
      exp_sel = 0; n_ties_exp = 0; run_sum = 0;
      @(posedge clk); #1 start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      chk(busy && !valid, "busy after start");
      cycles = 1;
      while (!valid) begin
        @(posedge clk); #1 cycles++;
      end
      chk(response === ref_vec, "response");
      chk(exp_sel == NP, "all challenges");
      chk(32'(ties) == n_ties_exp, "tie count");
      // per bit: CLR_CYCLES (4) + 1 cycle before the datapath sees ctrl +
      // decision wait + STOP_CYCLES (8); plus 1 cycle to register start
      chk(cycles == NP * (4 + 1 + 8) + run_sum + 1, $sformatf("cycle count %0d vs %0d", cycles, NP * 13 + run_sum + 1));
      chk(!busy, "idle after valid");
      chk(bit_out == ref_vec[NP-1], "bit_out after sweep");
      repeat (10) @(posedge clk);
      chk(valid && response === ref_vec, "response held");
    end
    // single-challenge mode
    for (int run = 0; run < 8; run++) begin
      prev = response;
      for (int w = 0; w < NP / 32; w++) ref_vec[w*32 +: 32] = $urandom;
      challenge = 7'($urandom);
      exp_sel = 32'(challenge); n_ties_exp = 0; run_sum = 0;
      @(posedge clk); #1 start = 1'b1; single = 1'b1;
      @(posedge clk); #1 start = 1'b0; single = 1'b0;
      chk(busy && !valid, "busy after single start");
      cycles = 1;
      while (!valid) begin
        @(posedge clk); #1 cycles++;
      end
      chk(exp_sel == 32'(challenge) + 1, "single: one challenge only");
      chk(bit_out == ref_vec[challenge], "single: bit_out");
      prev[challenge] = ref_vec[challenge];
      chk(response === prev, "single: response updated at challenge only");
      chk(32'(ties) == n_ties_exp, "single: tie count");
      chk(cycles == 4 + 1 + 8 + run_sum + 1, $sformatf("single: cycle count %0d", cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
