// bit_synchronizer: all-digital clock recovery for 16 kb/s NRZ data.
//
// A modified absolute-value early/late-gate loop. The transition detector
// marks data transitions; the discriminator measures, in reference ticks,
// how far each transition lies from the centre of the mid-phase window; the
// loop filter averages these readings and issues phase corrections; the
// digital VCO applies each correction by stretching or shortening one cycle
// of its /10 divider by k reference periods (3 degrees each). data_out is the
// input sampled at the recovered in-phase clock rising edge (mid-bit).
//
// int_en selects the second-order loop. All timing is derived from the one
// 9.6 MHz clock; the structure is that of the text, the exact cycle
// alignment is this design's.
module bit_synchronizer #(
  parameter int unsigned K      = 16,
  parameter int unsigned M      = 12,
  parameter int unsigned N_LOG2 = 1,
  parameter int unsigned I_SH   = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              data_in,
  input  logic              int_en,
  output logic              ck_i,
  output logic              ck_q,
  output logic              bit_strobe,
  output logic              data_out,
  output logic signed [$clog2(2*K):0] err,
  output logic              err_valid,
  output logic signed [5:0] corr,
  output logic              corr_valid,
  output logic              corr_applied,
  output logic              trans,        // raw transition pulse
  output logic [3:0]        phase12,      // /12 state of the data clock
  output logic [$clog2(2*K)-1:0] reading  // discriminator counter reading
);
  logic tick_sys, ref_tick, seen;

  bs_dvco u_vco (
    .clk, .rst, .corr_valid, .corr, .tick_sys, .ref_tick, .phase12,
    .ck_i, .ck_q, .bit_strobe, .applied(corr_applied));

  transition_detector u_td (
    .clk, .rst, .tick_sys, .data_in, .bit_strobe, .trans, .seen);

  elg_discriminator #(.K(K), .M(M)) u_disc (
    .clk, .rst, .ref_tick, .ck_q, .seen, .cycle_end(bit_strobe),
    .reading, .err, .err_valid);

  bs_loop_filter #(.EW($clog2(2*K) + 1), .N_LOG2(N_LOG2), .I_SH(I_SH), .KW(6)) u_lf (
    .clk, .rst, .int_en, .err, .err_valid, .corr, .corr_valid);

  always_ff @(posedge clk) begin
    if (rst)             data_out <= 1'b0;
    else if (bit_strobe) data_out <= data_in;
  end
endmodule
