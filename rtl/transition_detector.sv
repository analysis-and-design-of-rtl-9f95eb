// transition_detector: data transition detector of the bit synchronizer.
//
// The incoming NRZ data is delayed by one 1.92 MHz reference period in a D
// flip-flop (at most 0.52 us) and exclusive-ORed with its undelayed self,
// giving a short pulse (trans) at every data transition. A set/reset flip-flop
// stretches the pulse from the transition until the next rising edge of the
// in-phase clock, the instant at which the programmable divider may be
// preset; this level (seen) enables the preset and, since that edge also
// ends a discriminator cycle, marks "a transition occurred in this bit
// period". A transition arriving on the same clock as the in-phase edge opens
// the next period. As in the text; the data input is taken as synchronous to
// the master clock (synchronised upstream).
module transition_detector (
  input  logic clk,
  input  logic rst,
  input  logic tick_sys,    // 1.92 MHz enable
  input  logic data_in,
  input  logic bit_strobe,  // in-phase clock rising edge
  output logic trans,       // short transition pulse (until next tick_sys)
  output logic seen         // stretched: transition since last in-phase edge
);
  logic dly;

  always_ff @(posedge clk) begin
    if (rst) begin
      dly  <= 1'b0;
      seen <= 1'b0;
    end else begin
      if (tick_sys) dly <= data_in;
      if (trans)           seen <= 1'b1;
      else if (bit_strobe) seen <= 1'b0;
    end
  end

  assign trans = data_in ^ dly;
endmodule
