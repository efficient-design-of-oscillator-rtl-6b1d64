// tb_cell_mux: applies random cell output vectors and selects to a 128:1
// multiplexer and checks that the output equals the selected bit.
`timescale 1ns / 1ps
module tb_cell_mux;
  localparam int N = 128;
  logic [N-1:0] cell_out;
  logic [6:0]   sel;
  logic         y;
  int checks = 0, failures = 0;

  cell_mux #(.N(N)) dut (.cell_out, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      for (int w = 0; w < N / 32; w++) cell_out[w*32 +: 32] = $urandom;
      sel = 7'($urandom);
      if (i % 3 == 0) cell_out = ~(N'(1) << sel);   // lone 0 at the selected bit
      if (i % 3 == 1) cell_out = N'(1) << sel;      // lone 1 at the selected bit
      #1;
      checks++;
      if (y !== cell_out[sel]) begin
        failures++;
        $display("FAIL sel=%0d y=%0b", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
