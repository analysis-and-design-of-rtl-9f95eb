// speech_detector: adaptive speech detector that keys the transmitter carrier.
//
// Idea: measure the background noise only where the signal is "almost surely
// noise" (low and steady), and put the detection threshold just above it.
//   1. sd_highpass removes dc and low-frequency noise; |x(n)| is formed.
//   2. p(n), the short-term mean magnitude, is a one-pole low-pass with
//      beta = 1 - 2^-7 (128 samples, 16 ms at 8 kHz), capped at P_MAX so that
//      loud speech cannot drag it up.
//   3. sd_constancy flags p(n) as constant (c) when its mean deviation from
//      the 256 ms average is small.
//   4. sd_noise_level resets CNLE and the threshold CT = 3.75*CNLE whenever
//      c = 1 and p(n) <= CNLE (asn), and lets CNLE creep up otherwise.
//   5. sd_decision declares speech when N consecutive |x(n)| exceed CT and
//      holds it for H samples.
// All multiplications are shifts. One sample is taken per in_valid pulse
// (8 kHz in the terminal). Latency: speech reflects a sample two clks after
// its in_valid; the noise estimate uses p(n) one clk later still.
//
// The algorithm and beta follow the text. P_MAX (64 sample units, taken as
// roughly 20 dB below the mean speech magnitude of a well-driven 10-bit A/D)
// and the other constants listed in the sub-blocks are this design's choices.
module speech_detector #(
  parameter int unsigned W       = 10,
  parameter int unsigned F       = 8,
  parameter int unsigned S_HP    = 5,
  parameter int unsigned S_P     = 7,
  parameter int unsigned P_MAX   = 64,
  parameter int unsigned S_LT    = 11,
  parameter int unsigned S_DEV   = 10,
  parameter int unsigned K_SH    = 3,
  parameter int unsigned DELTA   = 1,
  parameter int unsigned N       = 3,
  parameter int unsigned H       = 1600
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x,
  output logic                 speech,     // carrier enable
  output logic                 onset,      // a detection run completed
  output logic                 asn,        // almost-surely-noise this sample
  output logic                 c,          // p(n) constant
  output logic [W+F-1:0]       p,          // short-term level
  output logic [W+F-1:0]       cnle,       // noise level estimate
  output logic [W+1:0]         ct_int      // threshold in sample units
);
  localparam int unsigned PW = W + F;

  logic [W-1:0]        mag;
  logic                v1, v2;
  logic [PW-1:0]       p_lt, dev;
  logic [PW+1:0]       ct;

  sd_highpass #(.W(W), .S(S_HP), .F(F)) u_hp (
    .clk, .rst, .in_valid, .x, .y(), .mag, .out_valid(v1));

  shift_lpf #(.XW(W), .F(F), .S(S_P), .YMAX(longint'(P_MAX) << F)) u_p (
    .clk, .rst, .in_valid(v1), .x(mag), .y(p));

  always_ff @(posedge clk) begin
    if (rst) v2 <= 1'b0;
    else     v2 <= v1;
  end

  sd_constancy #(.PW(PW), .F(F), .S_LT(S_LT), .S_DEV(S_DEV), .K_SH(K_SH)) u_c (
    .clk, .rst, .in_valid(v2), .p, .p_lt, .dev, .c);

  sd_noise_level #(.PW(PW), .F(F), .DELTA(DELTA), .CT_INIT(0)) u_nl (
    .clk, .rst, .in_valid(v2), .p, .c, .cnle, .ct, .ct_int, .asn);

  sd_decision #(.MW(W), .TW(W + 2), .N(N), .H(H)) u_dec (
    .clk, .rst, .in_valid(v1), .mag, .ct(ct_int), .speech, .onset);
endmodule
