// tb_cell_demux: drives random (ctrl, sel) into a registered and a
// combinational demultiplexer of 128 outputs and compares with a one-hot
// reference: the combinational one in the same cycle, the registered one
// exactly one clock later (the per-cell enable flip-flops).
`timescale 1ns / 1ps
module tb_cell_demux;
  localparam int N = 128;
  logic clk = 1'b0, rst_n = 1'b1, ctrl = 1'b0;
  logic [6:0] sel = '0;
  logic [N-1:0] out_r, out_c, exp_prev;
  int checks = 0, failures = 0;

  cell_demux #(.N(N), .REGISTERED(1'b1)) dut_r (.clk, .rst_n, .ctrl, .sel, .cell_ctrl(out_r));
  cell_demux #(.N(N), .REGISTERED(1'b0)) dut_c (.clk, .rst_n, .ctrl, .sel, .cell_ctrl(out_c));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] onehot(input logic c, input logic [6:0] s);
    logic [N-1:0] v;
    v = '0;
    if (c) v[s] = 1'b1;
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (out_r !== '0) failures++;
    rst_n = 1'b1;
    exp_prev = '0;
    for (int i = 0; i < 500; i++) begin
      ctrl = ($urandom % 4) != 0;
      sel  = 7'($urandom);
      #1;
      checks++;
      if (out_c !== onehot(ctrl, sel)) begin
        failures++; $display("FAIL comb sel=%0d ctrl=%0b", sel, ctrl);
      end
      checks++;
      if (out_r !== exp_prev) begin
        failures++; $display("FAIL reg before edge, i=%0d", i);
      end
      @(posedge clk); #1;
      exp_prev = onehot(ctrl, sel);
      checks++;
      if (out_r !== exp_prev) begin
        failures++; $display("FAIL reg sel=%0d ctrl=%0b", sel, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
