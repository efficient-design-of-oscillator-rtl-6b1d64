// tb_ro_puf: RO PUF with 32 cells (16 pairs) and 8-bit counters, modelled
// on two different dies (device seeds 1 and 2). The expected bit of pair i
// is worked out from the cell delays of the variation model: the faster
// cell (shorter half period) fills its counter first, so bit i is 1 when
// cell A.i is faster than B.i. Pairs whose fill times differ by less than
// one clock period may legitimately go either way and are not checked.
// Also checks that a second response of the same die is identical (no
// jitter) and the time per response against the expected fill time, then
// measures every pair once more on its own (single-challenge mode) and
// compares the bit with the full response.
`timescale 1ns / 1ps
module tb_ro_puf;
  localparam int N_CELLS = 32, NP = N_CELLS / 2, CNT_W = 8;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, single = 1'b0;
  logic [3:0] challenge = '0;
  logic busy[2], valid[2], bit_out[2];
  logic [NP-1:0] resp[2], first[2];
  logic [4:0] ties[2];
  logic osc_a[2], osc_b[2];
  int checks = 0, failures = 0, skipped = 0, ones = 0, zeros = 0;
  realtime t_start, t_end;

  ro_puf #(.N_CELLS(N_CELLS), .CNT_W(CNT_W), .DEVICE_SEED(1)) dut0 (
    .clk, .rst_n, .start, .single, .challenge, .busy(busy[0]), .valid(valid[0]),
    .response(resp[0]), .bit_out(bit_out[0]), .ties(ties[0]), .osc_a(osc_a[0]), .osc_b(osc_b[0]));
  ro_puf #(.N_CELLS(N_CELLS), .CNT_W(CNT_W), .DEVICE_SEED(2)) dut1 (
    .clk, .rst_n, .start, .single, .challenge, .busy(busy[1]), .valid(valid[1]),
    .response(resp[1]), .bit_out(bit_out[1]), .ties(ties[1]), .osc_a(osc_a[1]), .osc_b(osc_b[1]));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ha, hb;
    real fill_ns, total_ns;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(posedge clk); #1 start = 1'b1;
      t_start = $realtime;
      @(posedge clk); #1 start = 1'b0;
      wait (valid[0] && valid[1]);
      t_end = $realtime;
      for (int d = 0; d < 2; d++) begin
        total_ns = 0.0;
        for (int i = 0; i < NP; i++) begin
          ha = osc_model_pkg::ro_half_ps(d + 1, 0, i);
          hb = osc_model_pkg::ro_half_ps(d + 1, 1, i);
          // counter full after (2**CNT_W - 1) periods of 4 half periods
          fill_ns = (2**CNT_W - 1) * 4.0 * ((ha < hb) ? ha : hb) / 1000.0;
          total_ns += fill_ns;
          if ((2**CNT_W - 1) * 4 * ((ha > hb) ? ha - hb : hb - ha) < 12000) begin
            skipped++;
          end else begin
            chk(resp[d][i] === (ha < hb), $sformatf("die %0d pair %0d (A %0d ps, B %0d ps)", d, i, ha, hb));
            if (resp[d][i]) ones++; else zeros++;
          end
        end
        if (run == 0) begin
          first[d] = resp[d];
          // per pair about 25 clock cycles of overhead around the fill time
          if (d == 0) chk(t_end - t_start > total_ns && t_end - t_start < total_ns + NP * 400.0,
                          $sformatf("response time %0t vs fill %0f", t_end - t_start, total_ns));
        end else begin
          chk(resp[d] === first[d], "same die, same response");
        end
      end
      repeat (5) @(posedge clk);
    end
    for (int i = 0; i < NP; i++) begin
      @(posedge clk); #1 start = 1'b1; single = 1'b1; challenge = 4'(i);
      @(posedge clk); #1 start = 1'b0; single = 1'b0;
      wait (valid[0] && valid[1]);
      for (int d = 0; d < 2; d++) begin
        chk(bit_out[d] === first[d][i], $sformatf("single challenge die %0d pair %0d", d, i));
        chk(resp[d] === first[d], "single challenge keeps response");
      end
    end
    chk(resp[0] !== resp[1], "two dies differ");
    chk(ones > 0 && zeros > 0, "both bit values produced");
    $display("responses: die1 %h die2 %h, unchecked near-ties %0d", resp[0], resp[1], skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
