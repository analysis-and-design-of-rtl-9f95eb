// shift_lpf: one-pole recursive low-pass filter without multipliers.
//
// y(n) = beta*y(n-1) + (1-beta)*x(n) with beta = 1 - 2^-S, computed as
// y(n) = y(n-1) + (x(n) - y(n-1)) >> S, so the only "multiplication" is an
// arithmetic shift, as the speech detector requires. The state carries F
// extra fraction bits so that long time constants do not lose the input
// resolution. The output saturates at YMAX (in output units), which is how
// the short-term level p(n) is capped at p_max. Unit dc gain; time constant
// 2^S samples. x is unsigned; y = x * 2^F in steady state.
//
// Timing: y updates one clk after in_valid.
module shift_lpf #(
  parameter int unsigned XW   = 10,
  parameter int unsigned F    = 8,
  parameter int unsigned S    = 7,
  parameter longint unsigned YMAX = (64'd1 << (XW + F)) - 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic [XW-1:0]       x,
  output logic [XW+F-1:0]     y
);
  localparam int unsigned YW = XW + F;
  logic signed [YW+1:0] diff, nxt;

  assign diff = signed'({2'b00, x, {F{1'b0}}}) - signed'({2'b00, y});
  assign nxt  = signed'({2'b00, y}) + (diff >>> S);

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else if (in_valid) begin
      if (nxt < 0)                          y <= '0;
      else if (nxt > (YW+2)'(YMAX))         y <= YW'(YMAX);
      else                                  y <= YW'(nxt);
    end
  end
endmodule
