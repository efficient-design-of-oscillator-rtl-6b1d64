// tb_tero_cell: checks the TERO model: rest at 1 with ctrl low, exactly
// N_OSC rising edges after ctrl rises, a settled output at the FINAL level
// afterwards (no further edges while ctrl stays high), and return to 1
// when ctrl falls. Two cells with different counts and final levels, two
// activations each.
`timescale 1ns / 1ps
module tb_tero_cell;
  logic ctrl = 1'b0;
  logic out1, out2;
  int checks = 0, failures = 0;
  int n1, n2;

  tero_cell #(.HALF_PS(1000), .N_OSC(123), .FINAL(1'b0)) dut1 (.ctrl, .out(out1));
  tero_cell #(.HALF_PS(800),  .N_OSC(301), .FINAL(1'b1)) dut2 (.ctrl, .out(out2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge out1) if (ctrl) n1++;
  always @(posedge out2) if (ctrl) n2++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      #10;
      chk(out1 === 1'b1 && out2 === 1'b1, "rest at 1");
      n1 = 0; n2 = 0;
      ctrl = 1'b1;
      #1000;
      chk(n1 == 123, $sformatf("cell 1 oscillations %0d", n1));
      chk(n2 == 301, $sformatf("cell 2 oscillations %0d", n2));
      chk(out1 === 1'b0, "cell 1 settled at 0");
      chk(out2 === 1'b1, "cell 2 settled at 1");
      #200;
      chk(n1 == 123 && n2 == 301, "no edges after settling");
      ctrl = 1'b0;
      #1 chk(out1 === 1'b1 && out2 === 1'b1, "back at rest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
