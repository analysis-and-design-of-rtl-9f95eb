// rot_freq_comparator: rotational frequency detector of the AFC loop.
//
// At every rising edge of the hard-limited IF the carrier u1 and the
// quadrature carrier u2 are sampled into flip-flops 1 and 2, and the previous
// pair moves into flip-flops 3 and 4. The pair names the quadrant of the VCO
// cycle in which the IF edge fell. When the IF is faster than the VCO the
// sampled quadrant walks backwards and, once per beat cycle, steps from
// (0,1) to (1,1): an up pulse. When the IF is slower it steps from (1,1) to
// (0,1): a down pulse. Pulse rate therefore equals the frequency error and
// no pulses come when the two frequencies are equal. This follows the text
// (four flip-flops, two 4-input AND gates).
//
// This design's own choices: the IF is taken as a signal synchronous to clk
// (already hard-limited and synchronised upstream), its rising edge is found
// by comparing with the previous clk sample, and each "short pulse of fixed
// width" is one clk period long, issued the cycle after the IF edge.
module rot_freq_comparator (
  input  logic clk,
  input  logic rst,
  input  logic if_in,   // hard-limited IF
  input  logic u1,      // VCO carrier
  input  logic u2,      // VCO quadrature carrier
  output logic fd_up,   // IF above VCO: one-clock pulse per beat cycle
  output logic fd_dn    // IF below VCO
);
  logic if_d;
  logic q1, q2, q3, q4;  // flip-flops 1..4 of the comparator
  logic upd;             // a new sample pair has just been taken

  always_ff @(posedge clk) begin
    if (rst) begin
      if_d <= 1'b0;
      {q1, q2, q3, q4} <= 4'b0;
      upd <= 1'b0;
    end else begin
      if_d <= if_in;
      upd  <= if_in & ~if_d;
      if (if_in & ~if_d) begin
        q1 <= u1;
        q2 <= u2;
        q3 <= q1;
        q4 <= q2;
      end
    end
  end

  // gate 5: previous (0,1), new (1,1); gate 6: previous (1,1), new (0,1)
  assign fd_up = upd & ~q3 &  q4 &  q1 & q2;
  assign fd_dn = upd &  q3 &  q4 & ~q1 & q2;
endmodule
