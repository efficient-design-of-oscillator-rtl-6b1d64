// tb_tero_puf: TERO PUF with 32 cells (16 pairs), 11-bit counters, K = 3
// bits per challenge and the 1 us activation time (100 cycles at 100 MHz),
// modelled on two dies (device seeds 1 and 2). Expected bits come from the
// oscillation counts of the variation model: bit 0 of each challenge is 1
// when cell A oscillated more times than cell B, bits 1-2 are the low bits
// of the count difference. Also checks a repeat response, the number of
// clock cycles per response, and single-challenge measurements of a few
// pairs against the expected bits.
`timescale 1ns / 1ps
module tb_tero_puf;
  localparam int N_CELLS = 32, NP = N_CELLS / 2, K = 3, ACT = 100;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, single = 1'b0;
  logic [3:0] challenge = '0;
  logic [K-1:0] bits_out[2];
  logic busy[2], valid[2];
  logic [NP*K-1:0] resp[2], want[2];
  logic [11:0] diff[2];
  int checks = 0, failures = 0, ones = 0, zeros = 0, cycles;

  tero_puf #(.N_CELLS(N_CELLS), .K(K), .ACT_CYCLES(ACT), .DEVICE_SEED(1)) dut0 (
    .clk, .rst_n, .start, .single, .challenge, .busy(busy[0]), .valid(valid[0]),
    .response(resp[0]), .bits_out(bits_out[0]), .diff(diff[0]));
  tero_puf #(.N_CELLS(N_CELLS), .K(K), .ACT_CYCLES(ACT), .DEVICE_SEED(2)) dut1 (
    .clk, .rst_n, .start, .single, .challenge, .busy(busy[1]), .valid(valid[1]),
    .response(resp[1]), .bits_out(bits_out[1]), .diff(diff[1]));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int na, nb, m;
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < NP; i++) begin
        na = osc_model_pkg::tero_osc_count(d + 1, 0, i);
        nb = osc_model_pkg::tero_osc_count(d + 1, 1, i);
        m  = na > nb ? na - nb : nb - na;
        want[d][i*K +: K] = {m[1], m[0], na > nb};
        if (na > nb) ones++; else zeros++;
      end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(posedge clk); #1 start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      cycles = 1;
      while (!(valid[0] && valid[1])) begin
        @(posedge clk); #1 cycles++;
      end
      chk(cycles == NP * (4 + ACT + 4) + 1, $sformatf("cycles per response %0d", cycles));
      for (int d = 0; d < 2; d++)
        for (int i = 0; i < NP; i++)
          chk(resp[d][i*K +: K] === want[d][i*K +: K],
              $sformatf("die %0d pair %0d got %b want %b", d, i, resp[d][i*K +: K], want[d][i*K +: K]));
    end
    for (int r = 0; r < 6; r++) begin
      int ch;
      ch = (r * 7 + 3) % NP;
      @(posedge clk); #1 start = 1'b1; single = 1'b1; challenge = 4'(ch);
      @(posedge clk); #1 start = 1'b0; single = 1'b0;
      cycles = 1;
      while (!(valid[0] && valid[1])) begin
        @(posedge clk); #1 cycles++;
      end
      chk(cycles == 4 + ACT + 4 + 1, $sformatf("single challenge cycles %0d", cycles));
      for (int d = 0; d < 2; d++)
        chk(bits_out[d] === want[d][ch*K +: K], $sformatf("single challenge die %0d pair %0d", d, ch));
    end
    chk(ones > 0 && zeros > 0, "both comparison outcomes present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
