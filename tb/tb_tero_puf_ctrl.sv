// tb_tero_puf_ctrl: drives the TERO sequencer with K = 3 extracted bits per
// challenge taken from a random reference vector, indexed by the select.
// Checks that each control pulse lasts exactly ACT_CYCLES clock cycles with
// the counters released, that the select does not change during a pulse,
// the challenge order, the final response and the cycles per response.
// Then single-challenge runs: one pulse for the requested pair only, its
// bits on bits_out and in the response, the other bits kept.
`timescale 1ns / 1ps
module tb_tero_puf_ctrl;
  localparam int NP = 128, K = 3, ACT = 100;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, single = 1'b0;
  logic busy, valid, ctrl, clr;
  logic [6:0] challenge = '0;
  logic [K-1:0] bits_out;
  logic [NP*K-1:0] response, ref_vec, prev;
  logic [6:0] sel;
  logic [K-1:0] ext_bits;
  int checks = 0, failures = 0;
  int pulses, exp_sel, cycles, width;

  tero_puf_ctrl #(.NP(NP), .K(K), .ACT_CYCLES(ACT)) dut (
    .clk, .rst_n, .start, .single, .challenge, .busy, .valid, .response,
    .bits_out, .sel, .ctrl, .clr, .ext_bits
  );

  always #5 clk = ~clk;
  // bits are only meaningful in the last cycle of the pulse; drive garbage
  // otherwise so that a premature capture is detected
  always_comb ext_bits = (ctrl && width == ACT - 1) ? ref_vec[32'(sel) * K +: K] : ~ref_vec[32'(sel) * K +: K];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse monitor
  initial begin
    logic [6:0] s0;
    width = 0;
    forever begin
      @(posedge clk iff ctrl);
      #1;
      chk(32'(sel) == exp_sel, "challenge order");
      chk(!clr, "counters released");
      s0 = sel;
      width = 1;
      while (1) begin
        @(posedge clk); #1;
        if (!ctrl) break;
        width++;
        chk(sel == s0 && !clr, "select stable in pulse");
      end
      // the monitor first sees ctrl one edge after it rose
      chk(width + 1 == ACT, $sformatf("pulse width %0d", width + 1));
      width = 0;
      pulses++;
      exp_sel++;
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      for (int w = 0; w < NP * K / 32; w++) ref_vec[w*32 +: 32] = $urandom;
      exp_sel = 0; pulses = 0;
      @(posedge clk); #1 start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      cycles = 1;
      while (!valid) begin
        @(posedge clk); #1 cycles++;
      end
      chk(response === ref_vec, "response");
      chk(pulses == NP, "pulse count");
      chk(cycles == NP * (4 + ACT + 4) + 1, $sformatf("cycle count %0d", cycles));
      chk(bits_out == ref_vec[(NP-1)*K +: K], "bits_out after sweep");
    end
    // single-challenge mode
    for (int run = 0; run < 8; run++) begin
      prev = response;
      for (int w = 0; w < NP * K / 32; w++) ref_vec[w*32 +: 32] = $urandom;
      challenge = 7'($urandom);
      exp_sel = 32'(challenge); pulses = 0;
      @(posedge clk); #1 start = 1'b1; single = 1'b1;
      @(posedge clk); #1 start = 1'b0; single = 1'b0;
      cycles = 1;
      while (!valid) begin
        @(posedge clk); #1 cycles++;
      end
      chk(pulses == 1, "single: one pulse");
      chk(bits_out == ref_vec[32'(challenge) * K +: K], "single: bits_out");
      prev[32'(challenge) * K +: K] = ref_vec[32'(challenge) * K +: K];
      chk(response === prev, "single: response updated at challenge only");
      chk(cycles == 4 + ACT + 4 + 1, $sformatf("single: cycle count %0d", cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
