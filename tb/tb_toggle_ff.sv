// tb_toggle_ff: checks that the T flip-flop toggles once per rising edge of
// its oscillator input, ignores falling edges, and that the asynchronous
// clear forces 0 immediately and holds it while asserted.
`timescale 1ns / 1ps
module tb_toggle_ff;
  logic osc = 1'b0, clr = 1'b0, q;
  int checks = 0, failures = 0;
  logic exp_q;

  toggle_ff dut (.osc, .clr, .q);

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0b want %0b", what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clr = 1'b1;
    #2 check(q, 1'b0, "clear");
    osc = 1'b1; #2; check(q, 1'b0, "edge during clear");
    osc = 1'b0; #2;
    clr = 1'b0; #2;
    exp_q = 1'b0;
    for (int i = 0; i < 40; i++) begin
      osc = 1'b1; #1; exp_q = ~exp_q;
      check(q, exp_q, "rise");
      osc = 1'b0; #1;
      check(q, exp_q, "fall");
    end
    osc = 1'b1; #1; osc = 1'b0; #1;   // q = 1 now
    check(q, 1'b1, "before clear");
    clr = 1'b1; #0.5;
    check(q, 1'b0, "async clear");
    clr = 1'b0; #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
