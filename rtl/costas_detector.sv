// costas_detector: I/Q phase detectors and Costas error detector.
//
// The in-phase and quadrature phase detectors compare the hard-limited IF
// with the VCO carrier u1 and quadrature carrier u2 (exclusive-OR gates, as
// in the text). The dc part of each detector output is a triangular function
// of the phase offset. Here the dc part is taken by an integrate-and-dump over
// 2^WIN_LOG2 clocks: the count of clocks on which the two signals agree,
// recentred, gives i_val and q_val in -2^WIN_LOG2 .. +2^WIN_LOG2. The Costas
// error is the hard-limited I arm times Q, which yields the saw-tooth of
// period pi that does not depend on signal amplitude; lock points are phase
// 0 and pi. The sign is chosen so that a positive error means the IF leads
// the VCO (the VCO must speed up).
//
// The XOR detectors and the hard-limit-and-multiply follow the text; the
// integrate-and-dump that stands in for the analog low-pass of each arm and
// its window length are this design's own.
//
// Timing: err/i_val/q_val update and valid pulses for one clk at the end of
// each window, every 2^WIN_LOG2 clocks.
module costas_detector #(
  parameter int unsigned WIN_LOG2 = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    if_in,
  input  logic                    u1,
  input  logic                    u2,
  output logic signed [WIN_LOG2+1:0] i_val,
  output logic signed [WIN_LOG2+1:0] q_val,
  output logic signed [WIN_LOG2+1:0] err,
  output logic                    valid
);
  localparam int unsigned CW = WIN_LOG2 + 2;

  logic [WIN_LOG2-1:0] phase;   // position in the window
  logic [WIN_LOG2:0]   i_cnt, q_cnt;
  logic [WIN_LOG2:0]   i_nxt, q_nxt;
  logic signed [CW-1:0] i_s, q_s;

  // Agreement counts including this clock's sample.
  assign i_nxt = i_cnt + {{WIN_LOG2{1'b0}}, ~(if_in ^ u1)};
  assign q_nxt = q_cnt + {{WIN_LOG2{1'b0}}, ~(if_in ^ u2)};
  // Recentre: 2*agree - window length.
  assign i_s = signed'({1'b0, i_nxt}) * 2 - signed'(CW'(1) << WIN_LOG2);
  assign q_s = signed'({1'b0, q_nxt}) * 2 - signed'(CW'(1) << WIN_LOG2);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      i_cnt <= '0;
      q_cnt <= '0;
      i_val <= '0;
      q_val <= '0;
      err   <= '0;
      valid <= 1'b0;
    end else begin
      phase <= phase + 1'b1;
      valid <= 1'b0;
      if (phase == '1) begin
        i_cnt <= '0;
        q_cnt <= '0;
        i_val <= i_s;
        q_val <= q_s;
        err   <= (i_s >= 0) ? -q_s : q_s;
        valid <= 1'b1;
      end else begin
        i_cnt <= i_nxt;
        q_cnt <= q_nxt;
      end
    end
  end
endmodule
