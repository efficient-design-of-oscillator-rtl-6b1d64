// tb_ro_cell: checks the ring-oscillator model: output at rest (1) while
// ctrl is low, first falling edge one loop delay after ctrl rises, a period
// of exactly two loop delays, return to rest when ctrl falls, and a
// restart after re-enabling. Uses two cells with different delays.
`timescale 1ns / 1ps
module tb_ro_cell;
  logic ctrl = 1'b0;
  logic out1, out2;
  int checks = 0, failures = 0;
  realtime t_rise[$];
  realtime t0;
  int n1, n2;

  ro_cell #(.HALF_PS(1000)) dut1 (.ctrl, .out(out1));
  ro_cell #(.HALF_PS(1250)) dut2 (.ctrl, .out(out2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge out1) if (ctrl) begin n1++; t_rise.push_back($realtime); end
  always @(posedge out2) if (ctrl) n2++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    chk(out1 === 1'b1 && out2 === 1'b1, "rest at 1");
    t0 = $realtime;
    ctrl = 1'b1;
    #0.9  chk(out1 === 1'b1, "no change before one delay");
    #0.2  chk(out1 === 1'b0, "falls after one delay");
    #998.4;   // until t0 + 999.5 ns
    ctrl = 1'b0;
    // 1 ns half period: rising edges at t0 + 2, 4, ... , 998 ns
    chk(n1 == 499, $sformatf("cell 1 edges %0d", n1));
    // 1.25 ns half period: rising edges every 2.5 ns, the last at 997.5 ns
    chk(n2 == 399, $sformatf("cell 2 edges %0d", n2));
    chk(t_rise.size() > 2 && t_rise[1] - t_rise[0] > 1.999 && t_rise[1] - t_rise[0] < 2.001, "period");
    #3 chk(out1 === 1'b1 && out2 === 1'b1, "back at rest");
    n1 = 0;
    #20 chk(n1 == 0 && out1 === 1'b1, "quiet while disabled");
    ctrl = 1'b1; #100.5; ctrl = 1'b0;
    chk(n1 == 50, $sformatf("restart edges %0d", n1));
    #5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
