// mobile_terminal: digital core of a mobile terminal that carries voice and
// data packets on one 800 MHz TFM channel.
//
// Data packets are slipped into the silent gaps of conversational speech.
// That needs, in each terminal, (1) a demodulator front end that locks to a
// packet's carrier and bit clock within a few milliseconds, and (2) a speech
// detector that turns the transmitter carrier off whenever the talker is
// silent, so the gaps are visible on the channel. This top holds the digital
// parts of both, side by side on one 9.6 MHz clock:
//   * carrier_recovery  - Costas loop aided by a rotational-frequency-
//                         comparator AFC, on the hard-limited 455 kHz IF;
//   * bit_synchronizer  - all-digital early/late-gate clock recovery for the
//                         16 kb/s demodulated NRZ data;
//   * speech_detector   - adaptive-threshold speech/noise decision on 8 kHz
//                         10-bit samples;
//   * tx_access_ctrl    - keys the carrier for talk spurts and sends pending
//                         data packets only into channel gaps.
// The speech detector's decision drives the access controller. The two
// receiver loops are not joined here: the TFM data demodulator between
// them is not part of the design, so its output enters as rx_data, and the
// hard limiter, A/D converter, AFC DAC, busy-tone detector and RF chains
// are outside as well (their signals are ports).
//
// All ports are plain signals; every output is registered or a simple
// decode of registers inside the sub-blocks. Timing: one clock domain,
// synchronous active-high reset; slower clocks of the original hardware
// (4x carrier, 1.92 MHz, 16 kHz, 8 kHz) are clock enables. The partition and
// the numbers (455 kHz IF, 16 kb/s, 9.6 MHz reference, 8 kHz speech) follow
// the text; the single-clock structure and the keying controller's states
// are this design's own.
module mobile_terminal
  import mt_pkg::*;
(
  input  logic              clk,          // 9.6 MHz master
  input  logic              rst,          // synchronous, active high
  // carrier recovery
  input  logic              if_in,        // hard-limited IF
  input  logic              cr_acq,       // 1: wide acquisition bandwidth
  input  logic              cr_afc_en,    // frequency comparator in the loop
  output logic              cr_u1,        // recovered carrier
  output logic              cr_u2,        // recovered quadrature carrier
  output logic [7:0]        cr_afc_code,  // to the AFC DAC
  output logic              cr_afc_wrap,  // AFC integrator preset to mid-scale
  output logic              cr_fd_up,
  output logic              cr_fd_dn,
  output logic signed [19:0] cr_ctrl,     // Costas filter output
  output logic [23:0]       cr_fcw,       // oscillator word
  output logic              cr_i_sign,    // hard decision of the I arm
  output logic signed [9:0] cr_i_val,
  output logic signed [9:0] cr_q_val,
  // bit synchronizer
  input  logic              rx_data,      // demodulated NRZ data
  input  logic              bs_int_en,    // second-order loop
  output logic              rx_clk,       // recovered 16 kHz data clock
  output logic              rx_clk_q,     // mid-phase clock
  output logic              rx_strobe,    // one clk at each rx_clk rising edge
  output logic              rx_bit,       // retimed data
  output logic signed [5:0] bs_err,
  output logic              bs_err_valid,
  output logic signed [5:0] bs_corr,
  output logic              bs_corr_applied,
  output logic [3:0]        bs_phase12,
  // speech detector
  input  logic              spk_valid,    // 8 kHz sample strobe from the A/D
  input  logic signed [SAMPLE_W-1:0] spk_x,
  output logic              speech,
  output logic              speech_onset,
  output logic              sd_asn,
  output logic [17:0]       sd_cnle,
  output logic [11:0]       sd_ct,
  // transmitter keying
  input  logic              voice_mode,   // voice channel assigned
  input  logic              data_req,     // data packet waiting
  input  logic              chan_busy,    // busy tone / carrier sensed
  input  logic              pkt_done,     // packet fully sent
  output logic              carrier_on,   // RF transmitter enable
  output logic              data_grant,   // modem may send the packet
  output tx_state_e         tx_state
);
  // Internal observation outputs of the subsystems that the terminal does
  // not use are left open.
  carrier_recovery #(.CLK_HZ(CLK_HZ), .F0_HZ(IF_HZ)) u_cr (
    .clk, .rst, .if_in, .acq(cr_acq), .afc_en(cr_afc_en),
    .u1(cr_u1), .u2(cr_u2), .fd_up(cr_fd_up), .fd_dn(cr_fd_dn),
    .afc_code(cr_afc_code), .afc_wrap(cr_afc_wrap), .costas_ctrl(cr_ctrl),
    .pd_err(), .pd_valid(), .i_val(cr_i_val), .q_val(cr_q_val),
    .i_sign(cr_i_sign), .fcw(cr_fcw));

  bit_synchronizer u_bs (
    .clk, .rst, .data_in(rx_data), .int_en(bs_int_en),
    .ck_i(rx_clk), .ck_q(rx_clk_q), .bit_strobe(rx_strobe), .data_out(rx_bit),
    .err(bs_err), .err_valid(bs_err_valid), .corr(bs_corr), .corr_valid(),
    .corr_applied(bs_corr_applied), .trans(), .phase12(bs_phase12),
    .reading());

  speech_detector #(.W(SAMPLE_W)) u_sd (
    .clk, .rst, .in_valid(spk_valid), .x(spk_x), .speech, .onset(speech_onset),
    .asn(sd_asn), .c(), .p(), .cnle(sd_cnle), .ct_int(sd_ct));

  tx_access_ctrl u_tx (
    .clk, .rst, .voice_mode, .speech, .data_req, .chan_busy, .pkt_done,
    .carrier_on, .data_grant, .state(tx_state));
endmodule
