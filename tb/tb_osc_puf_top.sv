// tb_osc_puf_top: end-to-end test of both PUFs, reduced to 32 cells each
// (16-bit responses) and 8-bit counters to keep the simulation short, with
// the 1 us TERO pulse at 100 MHz; both PUFs are started together and then a
// second time. tb_osc_puf_full runs the same checks at the default sizes.
//
// Expected responses are worked out from the variation model of the cells:
// RO bit i is 1 when cell A.i has the shorter half period (it fills its
// counter first); pairs that fill within one clock period of each other
// are not checked. TERO bit i is 1 when cell A.i oscillates more times.
// The test counts how often each mechanism happened and fails if one never
// did: A winning and B winning in the RO arbiter, the arbiter stopping the
// slower oscillator before its counter was full, both TERO comparison
// outcomes, TERO cells settling at 0 and at 1, single-challenge
// measurements matching the sweep, and a repeated challenge
// sweep reproducing the same responses.
`timescale 1ns / 1ps
module tb_osc_puf_top;
  localparam int N_CELLS = 32, NP = N_CELLS / 2, CNT_W = 8, CNT_MAX = 2**CNT_W - 1;
  localparam int SEL_W = 4, NSINGLE = NP;
  logic clk = 1'b0, rst_n = 1'b1, ro_start = 1'b0, tero_start = 1'b0;
  logic ro_single = 1'b0, tero_single = 1'b0, ro_bit;
  logic [SEL_W-1:0] ro_challenge = '0, tero_challenge = '0;
  logic [0:0] tero_bits;
  logic ro_busy, ro_valid, tero_busy, tero_valid, ro_osc_a, ro_osc_b;
  logic [NP-1:0] ro_response, tero_response, ro_first, tero_first;
  logic [4:0] ro_ties;
  logic [CNT_W:0] tero_diff;
  int checks = 0, failures = 0, skipped = 0;
  int n_ro_a = 0, n_ro_b = 0, n_ro_stop = 0, n_tero_a = 0, n_tero_b = 0;
  int n_fin0 = 0, n_fin1 = 0, n_repeat = 0, n_single = 0;
  int ro_cycles, tero_cycles, cyc;

  osc_puf_top #(.N_CELLS(N_CELLS), .CNT_W(CNT_W)) dut (
    .clk, .rst_n,
    .ro_start, .ro_single, .ro_challenge, .ro_busy, .ro_valid, .ro_response,
    .ro_bit, .ro_ties, .ro_osc_a, .ro_osc_b,
    .tero_start, .tero_single, .tero_challenge, .tero_busy, .tero_valid,
    .tero_response, .tero_bits, .tero_diff
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // The arbiter stops the pair: when the sequencer leaves the run state,
  // the counter of the slower cell has not reached its maximum.
  always @(negedge dut.u_ro_puf.u_ctrl.arm)
    if (rst_n && dut.u_ro_puf.u_ctrl.state == puf_pkg::S_STOP)
      if (!(dut.u_ro_puf.full_a && dut.u_ro_puf.full_b)) n_ro_stop++;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ha, hb, na, nb, c0;
    real fill_cycles;
    for (int i = 0; i < NP; i++)
      for (int b = 0; b < 2; b++)
        if (osc_model_pkg::tero_final(1, b, i)) n_fin1++; else n_fin0++;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(posedge clk); #1 ro_start = 1'b1; tero_start = 1'b1;
      c0 = cyc;
      @(posedge clk); #1 ro_start = 1'b0; tero_start = 1'b0;
      fork
        begin wait (tero_valid); tero_cycles = cyc - c0; end
        begin wait (ro_valid);   if (run == 0) ro_cycles = cyc - c0; end
      join
      // TERO: challenges of 4 clear + 100 activation + 4 stop cycles
      chk(tero_cycles == NP * 108 + 1, $sformatf("TERO cycles %0d", tero_cycles));
      fill_cycles = 0.0;
      for (int i = 0; i < NP; i++) begin
        ha = osc_model_pkg::ro_half_ps(1, 0, i);
        hb = osc_model_pkg::ro_half_ps(1, 1, i);
        // the faster cell fills its counter after CNT_MAX periods of the
        // T flip-flop output, i.e. 4 * CNT_MAX half periods of the ring
        fill_cycles += CNT_MAX * 4.0 * ((ha < hb) ? ha : hb) / 10000.0;
        if (CNT_MAX * 4 * ((ha > hb) ? ha - hb : hb - ha) < 12000) begin
          skipped++;
        end else begin
          chk(ro_response[i] === (ha < hb), $sformatf("RO pair %0d", i));
          if (run == 0) begin if (ro_response[i]) n_ro_a++; else n_ro_b++; end
        end
        na = osc_model_pkg::tero_osc_count(1, 0, i);
        nb = osc_model_pkg::tero_osc_count(1, 1, i);
        // the counters stop at their maximum
        if (na > CNT_MAX) na = CNT_MAX;
        if (nb > CNT_MAX) nb = CNT_MAX;
        chk(tero_response[i] === (na > nb), $sformatf("TERO pair %0d", i));
        if (run == 0) begin if (na > nb) n_tero_a++; else n_tero_b++; end
      end
      // RO: fill time plus 4 clear, 1 enable, 3 arbiter and 8 stop cycles
      // per challenge (about 17 cycles)
      if (run == 0)
        chk(ro_cycles > int'(fill_cycles) + NP * 14 && ro_cycles < int'(fill_cycles) + NP * 20,
            $sformatf("RO cycles %0d, fill time %0d cycles", ro_cycles, int'(fill_cycles)));
      if (run == 0) begin
        ro_first = ro_response;
        tero_first = tero_response;
      end else begin
        chk(ro_response === ro_first && tero_response === tero_first, "repeat gives same responses");
        if (ro_response === ro_first && tero_response === tero_first) n_repeat++;
      end
      chk(!ro_busy && !tero_busy, "idle after response");
    end
    // single challenges: the pair given on *_challenge alone, result on
    // ro_bit / tero_bits, equal to the bit of the full response
    for (int r = 0; r < NSINGLE; r++) begin
      int ch;
      ch = (r * 5 + 1) % NP;
      @(posedge clk); #1 ro_start = 1'b1; tero_start = 1'b1;
      ro_single = 1'b1; tero_single = 1'b1;
      ro_challenge = SEL_W'(ch); tero_challenge = SEL_W'(ch);
      @(posedge clk); #1 ro_start = 1'b0; tero_start = 1'b0;
      ro_single = 1'b0; tero_single = 1'b0;
      wait (ro_valid && tero_valid);
      chk(ro_bit === ro_first[ch], $sformatf("RO single challenge %0d", ch));
      chk(tero_bits === tero_first[ch], $sformatf("TERO single challenge %0d", ch));
      chk(ro_response === ro_first && tero_response === tero_first, "single challenge keeps responses");
      if (ro_bit === ro_first[ch] && tero_bits === tero_first[ch]) n_single++;
    end
    $display("RO   response %h (%0d cycles, %0d near-ties unchecked, %0d ties)", ro_response, ro_cycles, skipped / 2, ro_ties);
    $display("TERO response %h (%0d cycles)", tero_response, tero_cycles);
    $display("mechanisms: RO A wins %0d, RO B wins %0d, arbiter stops %0d, TERO A>B %0d, TERO A<=B %0d, settle 0 %0d, settle 1 %0d, repeats %0d, single challenges %0d",
             n_ro_a, n_ro_b, n_ro_stop, n_tero_a, n_tero_b, n_fin0, n_fin1, n_repeat, n_single);
    chk(n_ro_a > 0, "RO: A wins happened");
    chk(n_ro_b > 0, "RO: B wins happened");
    chk(n_ro_stop > 0, "RO: arbiter stop happened");
    chk(n_tero_a > 0, "TERO: A more oscillations happened");
    chk(n_tero_b > 0, "TERO: B more oscillations happened");
    chk(n_fin0 > 0 && n_fin1 > 0, "TERO: both settle states happened");
    chk(n_repeat > 0, "repeat happened");
    chk(n_single > 0, "single challenge happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
