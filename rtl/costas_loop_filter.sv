// costas_loop_filter: proportional-plus-integral filter of the Costas loop.
//
// Realises F(s) = alpha + beta/s in discrete time: on every detector update
// the integral register adds KI*err and the output is
// (KP*err + integral) >> FRAC, a frequency-control word for the oscillator.
// Two gain sets give the two loop bandwidths of the text: a wide one for
// acquisition (acq = 1) and a narrow one for tracking (acq = 0). The integral
// is kept when the bandwidth is switched, so the switch does not disturb the
// frequency already acquired.
//
// The filter form and the two bandwidths (400 Hz and 75 Hz, damping 0.707)
// follow the text. The digital form and the gain values are this design's:
// with the detector slope 2^(WIN_LOG2+1)/pi per radian, 37.5 kHz updates and
// 0.899 rad/s per control unit they place the natural frequency at 400 Hz
// and 75 Hz with damping 0.707. The integral saturates at +/-2^(IW-1) and
// the output at +/-2^(OW-1).
//
// Timing: ctrl changes one clk after err_valid.
module costas_loop_filter #(
  parameter int unsigned EW     = 10,    // error width
  parameter int unsigned OW     = 20,    // output width
  parameter int unsigned IW     = 32,    // integral register width
  parameter int unsigned FRAC   = 8,
  parameter int unsigned KP_ACQ = 6221,
  parameter int unsigned KI_ACQ = 294,
  parameter int unsigned KP_TRK = 1165,
  parameter int unsigned KI_TRK = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 acq,       // 1: acquisition bandwidth
  input  logic signed [EW-1:0] err,
  input  logic                 err_valid,
  output logic signed [OW-1:0] ctrl
);
  localparam logic signed [IW-1:0] IMAX = {1'b0, {(IW-1){1'b1}}};
  localparam logic signed [IW-1:0] IMIN = {1'b1, {(IW-1){1'b0}}};

  logic signed [IW-1:0] integ;
  logic signed [IW:0]   integ_nxt;
  logic signed [IW-1:0] kp, ki;
  logic signed [IW:0]   sum, scaled;
  localparam logic signed [OW-1:0] CMAX = {1'b0, {(OW-1){1'b1}}};
  localparam logic signed [OW-1:0] CMIN = {1'b1, {(OW-1){1'b0}}};

  assign kp = acq ? IW'(KP_ACQ) : IW'(KP_TRK);
  assign ki = acq ? IW'(KI_ACQ) : IW'(KI_TRK);
  assign integ_nxt = (IW+1)'(integ) + (IW+1)'(ki * IW'(err));

  always_ff @(posedge clk) begin
    if (rst) begin
      integ <= '0;
      ctrl  <= '0;
    end else if (err_valid) begin
      if (integ_nxt > (IW+1)'(IMAX))      integ <= IMAX;
      else if (integ_nxt < (IW+1)'(IMIN)) integ <= IMIN;
      else                                integ <= IW'(integ_nxt);
      if (scaled > (IW+1)'(CMAX))      ctrl <= CMAX;
      else if (scaled < (IW+1)'(CMIN)) ctrl <= CMIN;
      else                             ctrl <= OW'(scaled);
    end
  end

  assign sum    = (IW+1)'(kp * IW'(err)) + (IW+1)'(integ);
  assign scaled = sum >>> FRAC;
endmodule
