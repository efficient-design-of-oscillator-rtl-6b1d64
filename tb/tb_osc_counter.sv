// tb_osc_counter: clocks the 11-bit counter with a fast irregular pulse
// train, compares the count with a reference after every edge, checks that
// `full` rises exactly at 2047 and that the count then stays there, and
// that the asynchronous clear returns it to 0.
`timescale 1ns / 1ps
module tb_osc_counter;
  localparam int W = 11;
  logic osc = 1'b0, clr = 1'b1;
  logic [W-1:0] count;
  logic full;
  int checks = 0, failures = 0;
  int ref_cnt;

  osc_counter #(.W(W)) dut (.osc, .clr, .count, .full);

  task automatic pulse;
    #(0.3 + ($urandom % 5) * 0.1) osc = 1'b1;
    #(0.3 + ($urandom % 5) * 0.1) osc = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pulse(); pulse();
    checks++; if (count !== 0) failures++;
    clr = 1'b0;
    ref_cnt = 0;
    for (int i = 0; i < 2100; i++) begin
      pulse();
      if (ref_cnt < 2**W - 1) ref_cnt++;
      checks++;
      if (count !== W'(ref_cnt) || full !== (ref_cnt == 2**W - 1)) begin
        failures++;
        $display("FAIL edge %0d: count=%0d full=%0b ref=%0d", i, count, full, ref_cnt);
      end
    end
    clr = 1'b1; #0.2;
    checks++; if (count !== 0 || full !== 1'b0) failures++;
    pulse();
    checks++; if (count !== 0) failures++;
    clr = 1'b0;
    repeat (5) pulse();
    checks++; if (count !== 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
