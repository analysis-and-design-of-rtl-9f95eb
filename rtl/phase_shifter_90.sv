// phase_shifter_90: exact 90-degree splitter for the recovered carrier.
//
// Two D flip-flops form a twisted ring: Q1 takes the inverse of Q2 and Q2
// takes Q1. Clocked at four times the carrier frequency the pair walks
// 00 -> 10 -> 11 -> 01 -> 00, so each output is a square wave at a quarter of
// the clock and u2 follows u1 by exactly one clock, a quarter cycle, at any
// clock frequency. This is the circuit of the text; here the "clock" is an
// enable (tick) on the master clock so the whole terminal stays synchronous.
//
// Ports: tick advances the ring by one state; u1 carrier, u2 quadrature
// carrier (lagging). Timing: outputs change on the clock edge after tick.
module phase_shifter_90 (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  output logic u1,
  output logic u2
);
  logic q1, q2;

  always_ff @(posedge clk) begin
    if (rst) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else if (tick) begin
      q1 <= ~q2;
      q2 <= q1;
    end
  end

  assign u1 = q1;
  assign u2 = q2;
endmodule
