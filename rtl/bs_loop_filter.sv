// bs_loop_filter: loop filter of the bit synchronizer.
//
// Direct path: the discriminator readings of N = 2^N_LOG2 consecutive data
// transitions are accumulated and averaged. The average is fed to an
// integrator and also added to the integrator output (scaled by 2^-I_SH).
// A multiplexer selects either the direct word alone (first-order loop) or
// direct plus integral (second-order loop, int_en = 1). Every N transitions
// the selected word, negated, is issued as the correction command k to the
// digital VCO: a positive discriminator error (clock late) gives negative k
// (shorter division, clock advanced). The command saturates at the KW-bit
// range.
//
// Follows the text: accumulation over N transitions, integrator, mux that
// switches the integrator in and out. This design's own: averaging by an
// arithmetic shift, N = 2 (with it the loop pulls in a 180-degree step in
// about 20 transitions, as reported for the original circuit), the integrator
// scaling I_SH = 4, and clearing the integrator while it is switched out.
//
// Timing: corr_valid pulses one clk after the err_valid that completes a
// group of N.
module bs_loop_filter #(
  parameter int unsigned EW     = 6,
  parameter int unsigned N_LOG2 = 1,
  parameter int unsigned I_SH   = 4,
  parameter int unsigned KW     = 6
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 int_en,
  input  logic signed [EW-1:0] err,
  input  logic                 err_valid,
  output logic signed [KW-1:0] corr,
  output logic                 corr_valid
);
  localparam int unsigned AW = EW + N_LOG2 + 1;
  localparam int unsigned IW = EW + 12;

  logic signed [AW-1:0] acc, acc_nxt;
  logic signed [AW-1:0] direct;
  logic signed [IW-1:0] integ, integ_nxt;
  logic signed [IW-1:0] word;
  logic [N_LOG2:0]      n;

  assign acc_nxt   = acc + AW'(err);
  assign direct    = acc_nxt >>> N_LOG2;
  assign integ_nxt = int_en ? integ + IW'(direct) : '0;
  assign word      = int_en ? IW'(direct) + (integ_nxt >>> I_SH) : IW'(direct);

  // the negated word, limited to the KW-bit correction range
  localparam logic signed [IW-1:0] CMAX = IW'((1 << (KW - 1)) - 1);
  localparam logic signed [IW-1:0] CMIN = -IW'(1 << (KW - 1));
  logic signed [IW-1:0] neg;
  logic signed [KW-1:0] corr_sat;
  assign neg = -word;
  always_comb begin
    if (neg > CMAX)      corr_sat = CMAX[KW-1:0];
    else if (neg < CMIN) corr_sat = CMIN[KW-1:0];
    else                 corr_sat = neg[KW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc        <= '0;
      integ      <= '0;
      n          <= '0;
      corr       <= '0;
      corr_valid <= 1'b0;
    end else begin
      corr_valid <= 1'b0;
      if (!int_en) integ <= '0;
      if (err_valid) begin
        if (n == (N_LOG2 + 1)'((1 << N_LOG2) - 1)) begin
          n          <= '0;
          acc        <= '0;
          integ      <= integ_nxt;
          corr       <= corr_sat;
          corr_valid <= 1'b1;
        end else begin
          n   <= n + 1'b1;
          acc <= acc_nxt;
        end
      end
    end
  end
endmodule
