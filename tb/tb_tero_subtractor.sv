// tb_tero_subtractor: random and corner 11-bit count pairs into the
// subtractor with K = 3 and K = 1; checks the signed difference, the sign
// bit (1 when A counted more) and the magnitude bits against a reference
// computed with integers.
`timescale 1ns / 1ps
module tb_tero_subtractor;
  localparam int W = 11;
  logic [W-1:0] a, b;
  logic [W:0]   diff3, diff1;
  logic [2:0]   bits3;
  logic [0:0]   bits1;
  int checks = 0, failures = 0;

  tero_subtractor #(.W(W), .K(3)) dut3 (.count_a(a), .count_b(b), .diff(diff3), .bits(bits3));
  tero_subtractor #(.W(W), .K(1)) dut1 (.count_a(a), .count_b(b), .diff(diff1), .bits(bits1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib, d, m;
    logic [2:0] want;
    for (int i = 0; i < 3000; i++) begin
      if (i < 4) begin
        ia = (i & 1) ? 2047 : 0; ib = (i & 2) ? 2047 : 0;
      end else if (i % 4 == 0) begin
        ia = $urandom % 2048; ib = ia + int'($urandom % 7) - 3;
        if (ib < 0) ib = 0; if (ib > 2047) ib = 2047;
      end else begin
        ia = $urandom % 2048; ib = $urandom % 2048;
      end
      a = W'(ia); b = W'(ib);
      #1;
      d = ia - ib;
      m = d < 0 ? -d : d;
      want = {m[1], m[0], ia > ib};
      checks++;
      if ($signed(diff3) !== (W+1)'(d) || diff1 !== diff3) begin
        failures++; $display("FAIL diff a=%0d b=%0d got %0d", ia, ib, $signed(diff3));
      end
      checks++;
      if (bits3 !== want || bits1 !== want[0]) begin
        failures++; $display("FAIL bits a=%0d b=%0d got %b/%b want %b", ia, ib, bits3, bits1, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
