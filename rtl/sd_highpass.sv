// sd_highpass: dc and low-frequency removal ahead of the speech detector.
//
// The dc estimate is a one-pole low-pass with time constant 2^S samples
// (shift arithmetic); the output is the input minus that estimate, i.e. a
// first-order high-pass with corner f_s/(2*pi*2^S) (40 Hz for S = 5 at 8 kHz,
// below the 100 Hz the detector must ignore). The output saturates to the
// input width and |y| is provided for the detector.
//
// The text asks only for "a simple digital high pass filter"; the structure
// and S are this design's. Timing: y and mag update one clk after in_valid,
// out_valid marks them.
module sd_highpass #(
  parameter int unsigned W = 10,
  parameter int unsigned S = 5,
  parameter int unsigned F = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y,
  output logic [W-1:0]        mag,
  output logic                out_valid
);
  localparam logic signed [W:0] YMAXV = (W+1)'((1 << (W - 1)) - 1);
  localparam logic signed [W:0] YMINV = -(W+1)'(1 << (W - 1));

  logic signed [W+F-1:0] dc;        // dc estimate with F fraction bits
  logic signed [W+F:0]   diff;
  logic signed [W:0]     hp;
  logic signed [W-1:0]   y_n;

  assign diff = (W+F+1)'(signed'({x, {F{1'b0}}})) - (W+F+1)'(dc);
  assign hp   = (W+1)'(x) - (W+1)'(dc >>> F);

  always_comb begin
    if (hp > YMAXV)      y_n = YMAXV[W-1:0];
    else if (hp < YMINV) y_n = YMINV[W-1:0];
    else                 y_n = hp[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dc        <= '0;
      y         <= '0;
      mag       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dc  <= dc + (W+F)'(diff >>> S);
        y   <= y_n;
        mag <= y_n[W-1] ? W'(-y_n) : W'(y_n);
      end
    end
  end
endmodule
