// afc_filter: digital integrator of the AFC loop.
//
// A presettable up/down counter accumulates the frequency comparator pulses:
// +1 for an up pulse, -1 for a down pulse, so its reading is the integral of
// the comparator output since the last preset. The reading feeds the AFC DAC
// (outside this block), whose gain sets the filter time constant. The counter
// starts at mid-scale 2^(W-1) and is preset back to mid-scale whenever it
// reaches either end of its range, which keeps the loop from settling on a
// data sideband. The 8-bit width and the preset value 128 follow the detailed
// design in the text (an earlier overview mentions a 16-bit counter; W is a
// parameter). The hold input (enable low) is this design's way of switching
// the frequency comparator out after lock, which the text recommends at low
// signal-to-noise ratio.
//
// Timing: one clk after a pulse the count moves; one clk after the count
// reaches 0 or 2^W-1 it is back at mid-scale and `wrap` pulses for one clk.
module afc_filter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,      // 0 freezes the integrator
  input  logic         up,
  input  logic         dn,
  output logic [W-1:0] code,    // to the DAC; mid-scale = zero correction
  output logic         wrap     // preset to mid-scale after reaching an end
);
  localparam logic [W-1:0] MID = W'(1) << (W - 1);
  localparam logic [W-1:0] MAX = '1;

  always_ff @(posedge clk) begin
    if (rst) begin
      code <= MID;
      wrap <= 1'b0;
    end else begin
      wrap <= 1'b0;
      if (code == '0 || code == MAX) begin
        code <= MID;
        wrap <= 1'b1;
      end else if (en && up && !dn) begin
        code <= code + 1'b1;
      end else if (en && dn && !up) begin
        code <= code - 1'b1;
      end
    end
  end
endmodule
