// carrier_recovery: Costas loop combined with a frequency-comparator AFC loop.
//
// The hard-limited IF is compared with the recovered carrier u1 and its
// quadrature u2. The Costas detector and its PI filter pull the phase once
// the frequency error is inside the loop bandwidth; the rotational frequency
// comparator and its up/down-counter integrator pull the frequency from a
// large initial error, where the Costas detector output averages to zero.
// Both control words are summed into the oscillator, whose 4x tick drives the
// 90-degree phase shifter producing u1 and u2 (structure as in the text).
//
// acq selects the wide (acquisition) or narrow (tracking) Costas bandwidth;
// afc_en switches the frequency comparator into the loop. The I arm sign,
// i_sign, is the hard decision of the in-phase channel. Who switches acq and
// afc_en, and when, is left to the user of the block: the text states that
// the bandwidth is switched and the comparator may be switched off after
// lock, but not how lock is judged.
//
// Reference assignment (this design's choice): the frequency comparator
// fires only on quadrant steps across an edge of u1 with u2 high. The Costas
// arms therefore use u2 as their in-phase reference and the inverted u1 as
// quadrature, so that both Costas lock points (0 and pi) put the IF edges on
// edges of u2, a quarter period away from the comparator's decision
// boundaries. Were u1 the in-phase reference, sampling jitter at the pi lock
// point would make pairs of up and down pulses that kick the AFC by one
// count each and slow acquisition.
module carrier_recovery #(
  parameter int unsigned WIN_LOG2 = 8,
  parameter int unsigned AFC_W    = 8,
  parameter int unsigned AFC_GAIN = 3000,
  parameter longint unsigned CLK_HZ = 9_600_000,
  parameter longint unsigned F0_HZ  = 455_000
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              if_in,
  input  logic              acq,
  input  logic              afc_en,
  output logic              u1,
  output logic              u2,
  output logic              fd_up,
  output logic              fd_dn,
  output logic [AFC_W-1:0]  afc_code,
  output logic              afc_wrap,
  output logic signed [19:0] costas_ctrl,
  output logic signed [WIN_LOG2+1:0] pd_err,
  output logic              pd_valid,
  output logic signed [WIN_LOG2+1:0] i_val,   // I arm, dumped each window
  output logic signed [WIN_LOG2+1:0] q_val,   // Q arm
  output logic              i_sign,
  output logic [23:0]       fcw              // oscillator word (4x carrier)
);
  logic tick;

  phase_shifter_90 u_ps (.clk, .rst, .tick, .u1, .u2);

  rot_freq_comparator u_fd (.clk, .rst, .if_in, .u1, .u2, .fd_up, .fd_dn);

  afc_filter #(.W(AFC_W)) u_afc (
    .clk, .rst, .en(afc_en), .up(fd_up), .dn(fd_dn),
    .code(afc_code), .wrap(afc_wrap));

  // In-phase reference u2, quadrature reference ~u1 (a quarter period
  // behind u2): see the opening comment.
  logic u1_n;
  assign u1_n = ~u1;
  costas_detector #(.WIN_LOG2(WIN_LOG2)) u_cd (
    .clk, .rst, .if_in, .u1(u2), .u2(u1_n),
    .i_val, .q_val, .err(pd_err), .valid(pd_valid));

  costas_loop_filter #(.EW(WIN_LOG2 + 2), .OW(20)) u_lf (
    .clk, .rst, .acq, .err(pd_err), .err_valid(pd_valid), .ctrl(costas_ctrl));

  dco #(.ACC_W(24), .AFC_W(AFC_W), .CW(20), .CLK_HZ(CLK_HZ), .F0_HZ(F0_HZ),
        .AFC_GAIN(AFC_GAIN)) u_dco (
    .clk, .rst, .afc_code, .costas_ctrl, .tick, .fcw);

  assign i_sign = ~i_val[WIN_LOG2+1];
endmodule
