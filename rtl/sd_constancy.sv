// sd_constancy: constancy test of the short-term level p(n).
//
// The long-term level p_hat(n) is p(n) low-pass filtered over 2^S_LT samples
// (2048 samples = 256 ms at 8 kHz). The magnitude |p(n) - p_hat(n)| is
// low-pass filtered again over 2^S_DEV samples to give the mean deviation,
// which is multiplied by k = 2^K_SH and subtracted from p(n). If the result
// d(n) is positive the deviation is small and p(n) is judged constant: c = 1.
//
// Structure and the 256 ms long-term average follow the text; the deviation
// time constant (S_DEV = 10, 128 ms) and k = 8 are this design's, the text
// leaving them to simulation. Inputs and outputs carry F fraction bits.
// Timing: c and the averages update one clk after in_valid.
module sd_constancy #(
  parameter int unsigned PW    = 18,   // p width incl. fraction
  parameter int unsigned F     = 8,    // extra fraction bits in the filters
  parameter int unsigned S_LT  = 11,
  parameter int unsigned S_DEV = 10,
  parameter int unsigned K_SH  = 3
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [PW-1:0] p,
  output logic [PW-1:0] p_lt,     // long-term level
  output logic [PW-1:0] dev,      // mean deviation
  output logic          c
);
  logic [PW+F-1:0] lt_y, dev_y;
  logic [PW-1:0]   absdiff;
  logic signed [PW+K_SH+1:0] d;

  shift_lpf #(.XW(PW), .F(F), .S(S_LT)) u_lt (
    .clk, .rst, .in_valid, .x(p), .y(lt_y));
  assign p_lt = lt_y[PW+F-1:F];

  assign absdiff = (p > p_lt) ? p - p_lt : p_lt - p;

  shift_lpf #(.XW(PW), .F(F), .S(S_DEV)) u_dev (
    .clk, .rst, .in_valid, .x(absdiff), .y(dev_y));
  assign dev = dev_y[PW+F-1:F];

  assign d = signed'({{(K_SH + 2){1'b0}}, p}) - signed'({2'b00, dev, {K_SH{1'b0}}});
  assign c = (d > 0);
endmodule
