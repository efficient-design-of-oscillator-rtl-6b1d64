// ro_arbiter: bit extractor of the RO PUF.
//
// Watches the `full` flags of the two counters while `arm` is high and
// decides which counter reached its maximum first: block A gives bit 1,
// block B gives bit 0. The flags come from the oscillator clock domains and
// pass through two-flop synchronizers into the system clock domain. On the
// first clock edge at which either synchronized flag is high, `done` rises
// and stays high with `bit_out` until `arm` falls; the sequencer then
// stops the oscillators. If both flags appear on the same edge the race is
// below the clock resolution: `tie` is raised and block A wins (this tie
// rule is this design's choice). Decision latency: 3 clock cycles after a
// flag rises (2 synchronizer stages and the decision register).
`timescale 1ns / 1ps
module ro_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic arm,      // measurement in progress
  input  logic full_a,   // asynchronous, from counter A
  input  logic full_b,   // asynchronous, from counter B
  output logic done,     // decision made
  output logic bit_out,  // 1: A first, 0: B first
  output logic tie       // both flags seen on the same edge
);

  logic [1:0] sync_a, sync_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_a <= '0;
      sync_b <= '0;
    end else begin
      sync_a <= {sync_a[0], full_a};
      sync_b <= {sync_b[0], full_b};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done    <= 1'b0;
      bit_out <= 1'b0;
      tie     <= 1'b0;
    end else if (!arm) begin
      done    <= 1'b0;
      bit_out <= 1'b0;
      tie     <= 1'b0;
    end else if (!done && (sync_a[1] || sync_b[1])) begin
      done    <= 1'b1;
      bit_out <= sync_a[1];
      tie     <= sync_a[1] && sync_b[1];
    end
  end

endmodule
