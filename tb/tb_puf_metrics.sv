// tb_puf_metrics: characterization workload at reduced size. Four modelled
// dies (device seeds 1..4) of the whole design, 32 cells per PUF (16-bit
// responses), 8-bit RO counters, with noise switched on in the cell models
// (RO half-period jitter of +-20 ps, TERO oscillation count jitter of +-3).
// Each die produces NRESP responses of each PUF. The test computes the two
// usual PUF metrics:
//   uniqueness  mean Hamming distance between a response of die i and the
//               reference (bitwise majority) response of die j != i,
//               in % of the response length; ideal 50 %;
//   steadiness  mean Hamming distance between a response of die i and its
//               own reference response, in %; ideal 0 %.
// It checks that every response arrives, that the uniqueness of both PUFs
// lies between 25 % and 75 % and that the steadiness is below 10 %.
`timescale 1ns / 1ps
module tb_puf_metrics;
  localparam int N_CELLS = 32, NP = N_CELLS / 2, CNT_W = 8, ND = 4, NRESP = 5;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [ND-1:0] ro_busy, ro_valid, tero_busy, tero_valid, ro_osc_a, ro_osc_b;
  logic [NP-1:0] ro_resp[ND], tero_resp[ND];
  logic [NP-1:0] ro_all[ND][NRESP], tero_all[ND][NRESP];
  logic [4:0] ro_ties[ND];
  logic [CNT_W:0] tero_diff[ND];
  int checks = 0, failures = 0;

  for (genvar d = 0; d < ND; d++) begin : g_die
    osc_puf_top #(
      .N_CELLS(N_CELLS), .CNT_W(CNT_W), .DEVICE_SEED(d + 1),
      .RO_JITTER_PS(20), .TERO_JITTER_OSC(3)
    ) dut (
      .clk, .rst_n,
      .ro_start(start), .ro_single(1'b0), .ro_challenge('0),
      .ro_busy(ro_busy[d]), .ro_valid(ro_valid[d]),
      .ro_response(ro_resp[d]), .ro_bit(), .ro_ties(ro_ties[d]),
      .ro_osc_a(ro_osc_a[d]), .ro_osc_b(ro_osc_b[d]),
      .tero_start(start), .tero_single(1'b0), .tero_challenge('0),
      .tero_busy(tero_busy[d]), .tero_valid(tero_valid[d]),
      .tero_response(tero_resp[d]), .tero_bits(), .tero_diff(tero_diff[d])
    );
  end

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [NP-1:0] majority(input logic [NP-1:0] r[NRESP]);
    logic [NP-1:0] m;
    int ones;
    for (int b = 0; b < NP; b++) begin
      ones = 0;
      for (int y = 0; y < NRESP; y++) ones += int'(r[y][b]);
      m[b] = 2 * ones > NRESP;
    end
    return m;
  endfunction

  // uniqueness (uq) and steadiness (st) in % of the response length
  function automatic void metrics(input logic [NP-1:0] all[ND][NRESP], output real uq, output real st);
    logic [NP-1:0] refr[ND];
    real hd_sum;
    int n;
    for (int d = 0; d < ND; d++) refr[d] = majority(all[d]);
    hd_sum = 0.0; n = 0;
    for (int i = 0; i < ND; i++)
      for (int j = 0; j < ND; j++)
        if (i != j)
          for (int y = 0; y < NRESP; y++) begin
            hd_sum += $countones(all[i][y] ^ refr[j]);
            n++;
          end
    uq = 100.0 * hd_sum / (n * NP);
    hd_sum = 0.0; n = 0;
    for (int i = 0; i < ND; i++)
      for (int y = 0; y < NRESP; y++) begin
        hd_sum += $countones(all[i][y] ^ refr[i]);
        n++;
      end
    st = 100.0 * hd_sum / (n * NP);
  endfunction

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ro_uq, ro_st, tero_uq, tero_st;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int y = 0; y < NRESP; y++) begin
      @(posedge clk); #1 start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      wait (&ro_valid && &tero_valid);
      chk(1'b1, "responses arrived");
      for (int d = 0; d < ND; d++) begin
        ro_all[d][y]   = ro_resp[d];
        tero_all[d][y] = tero_resp[d];
      end
    end
    metrics(ro_all, ro_uq, ro_st);
    metrics(tero_all, tero_uq, tero_st);
    $display("RO PUF:   uniqueness %5.1f %%  steadiness %4.1f %%", ro_uq, ro_st);
    $display("TERO PUF: uniqueness %5.1f %%  steadiness %4.1f %%", tero_uq, tero_st);
    chk(ro_uq > 25.0 && ro_uq < 75.0, "RO uniqueness");
    chk(tero_uq > 25.0 && tero_uq < 75.0, "TERO uniqueness");
    chk(ro_st < 10.0, "RO steadiness");
    chk(tero_st < 10.0, "TERO steadiness");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
