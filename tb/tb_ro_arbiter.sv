// tb_ro_arbiter: raises the asynchronous `full` flags of counter A and B in
// random order and at random times and checks the decision: bit 1 when A is
// first, 0 when B is first, `tie` when both appear in the same clock period
// (A then wins), `done` exactly 3 clock edges after the first flag, and a
// decision that does not change when the second flag arrives later.
`timescale 1ns / 1ps
module tb_ro_arbiter;
  logic clk = 1'b0, rst_n = 1'b1, arm = 1'b0, full_a = 1'b0, full_b = 1'b0;
  logic done, bit_out, tie;
  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, n_tie = 0;

  ro_arbiter dut (.clk, .rst_n, .arm, .full_a, .full_b, .done, .bit_out, .tie);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mode, gap;
    bit want;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      mode = $urandom % 3;   // 0: A first, 1: B first, 2: same instant
      gap  = 30 + $urandom % 50;
      @(posedge clk); #1 arm = 1'b1;
      repeat (2 + $urandom % 5) @(posedge clk);
      #(1 + $urandom % 3);
      // first flag rises between two clock edges
      if (mode == 1) full_b = 1'b1; else full_a = 1'b1;
      if (mode == 2) full_b = 1'b1;
      want = (mode != 1);
      // done must rise on the third clock edge after the flag
      @(posedge clk); #1 chk(!done, "done too early 1");
      @(posedge clk); #1 chk(!done, "done too early 2");
      @(posedge clk); #1 chk(done === 1'b1, "done latency");
      chk(bit_out === want, "bit");
      chk(tie === (mode == 2), "tie");
      if (mode == 0) n_a++; else if (mode == 1) n_b++; else n_tie++;
      #(gap);
      full_a = 1'b1;
      full_b = 1'b1;
      repeat (4) @(posedge clk);
      #1 chk(done === 1'b1 && bit_out === want, "decision held");
      arm = 1'b0; full_a = 1'b0; full_b = 1'b0;
      @(posedge clk); #1 chk(!done, "disarm clears");
      repeat (3) @(posedge clk);
    end
    chk(n_a > 0 && n_b > 0 && n_tie > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
