// tb_ro_counter_size: effect of the RO counter width on the steadiness of
// the RO PUF, at reduced size. Three RO PUFs with 128 cells (64-bit
// responses) are built from the same modelled die (device seed 1, so the
// same cell delays) and differ only in their counter width: 7, 9 and 11
// bits. Noise is switched on in the cell model (each half period varies by
// up to +-300 ps around its nominal 900..1100 ps). Each PUF produces NRESP
// responses; steadiness is the mean Hamming distance between a response
// and the bitwise majority of all responses of that PUF, in % of the
// response length.
//
// A wider counter integrates the delay difference of a pair over more
// periods: the systematic part grows with the count and the random part
// only with its square root, so fewer pairs change their bit from one
// response to the next. The test checks that every response arrives, that
// the 7-bit PUF shows noisy bits at all, that the 11-bit PUF is steadier
// than the 7-bit one and below 5 %, and that the three PUFs agree on the
// pairs that are steady at 11 bits and differ clearly enough to decide at
// 7 bits. Supply voltage, the other axis of the published sweep, has no
// counterpart in this model.
`timescale 1ns / 1ps
module tb_ro_counter_size;
  localparam int N_CELLS = 128, NP = N_CELLS / 2, NRESP = 7, NW = 3;
  localparam int WIDTHS[NW] = '{7, 9, 11};
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [NW-1:0] busy, valid;
  logic [NP-1:0] resp[NW];
  logic [NP-1:0] all[NW][NRESP];
  real st[NW];
  int checks = 0, failures = 0;

  for (genvar w = 0; w < NW; w++) begin : g_w
    ro_puf #(
      .N_CELLS(N_CELLS), .CNT_W(WIDTHS[w]), .DEVICE_SEED(1), .JITTER_PS(300)
    ) dut (
      .clk, .rst_n, .start, .single(1'b0), .challenge('0),
      .busy(busy[w]), .valid(valid[w]), .response(resp[w]), .bit_out(),
      .ties(), .osc_a(), .osc_b()
    );
  end

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #8ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NP-1:0] refr[NW], steady11;
    int ones, hd;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int y = 0; y < NRESP; y++) begin
      @(posedge clk); #1 start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      wait (&valid);
      chk(1'b1, "responses arrived");
      for (int w = 0; w < NW; w++) all[w][y] = resp[w];
    end
    for (int w = 0; w < NW; w++) begin
      for (int b = 0; b < NP; b++) begin
        ones = 0;
        for (int y = 0; y < NRESP; y++) ones += int'(all[w][y][b]);
        refr[w][b] = 2 * ones > NRESP;
      end
      hd = 0;
      for (int y = 0; y < NRESP; y++) hd += $countones(all[w][y] ^ refr[w]);
      st[w] = 100.0 * hd / (NRESP * NP);
      $display("counter %2d bits: steadiness %5.2f %%  reference %h", WIDTHS[w], st[w], refr[w]);
    end
    chk(st[0] > 0.0, "7-bit counter shows noisy bits");
    chk(st[NW-1] < st[0], "11-bit counter steadier than 7-bit");
    chk(st[NW-1] < 5.0, "11-bit steadiness below 5 %");
    // pairs whose bit never changed at 11 bits and whose nominal fill times
    // differ by more than 4 clock periods at 7 bits must agree everywhere
    steady11 = '1;
    for (int y = 0; y < NRESP; y++) steady11 &= ~(all[NW-1][y] ^ refr[NW-1]);
    for (int i = 0; i < NP; i++) begin
      int ha, hb;
      ha = osc_model_pkg::ro_half_ps(1, 0, i);
      hb = osc_model_pkg::ro_half_ps(1, 1, i);
      if (steady11[i] && 127 * 4 * ((ha > hb) ? ha - hb : hb - ha) > 40000)
        for (int w = 0; w < NW; w++)
          chk(refr[w][i] === (ha < hb), $sformatf("pair %0d at %0d bits", i, WIDTHS[w]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
