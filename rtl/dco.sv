// dco: digitally controlled oscillator of the carrier loop.
//
// Stands in for the VCO and the summing amplifier in front of it. The
// frequency-control word is the free-running word FCW0 plus the AFC term
// (AFC counter reading minus mid-scale, times the DAC gain AFC_GAIN) plus the
// Costas filter output. A phase accumulator of ACC_W bits adds the word every
// clk; each carry is one tick at four times the carrier frequency, which
// clocks the 90-degree phase shifter. f_tick = FCW * f_clk / 2^ACC_W.
//
// The summation of the two error signals and the 4x clock into the phase
// shifter follow the text. The oscillator itself is analog there; the
// accumulator, its width and the AFC gain are this design's own: 3000 units
// is about 430 Hz of carrier per AFC count, so the +/-127 counts before a
// preset span +/-54 kHz, more than the 42 kHz oscillator drift budget of the
// 840 MHz transmitter, and a 10 kHz step is pulled in within a few ms. The free-running carrier is F0_HZ.
//
// Timing: tick is a one-clk pulse; control changes act on the next clk.
module dco #(
  parameter int unsigned ACC_W    = 24,
  parameter int unsigned AFC_W    = 8,
  parameter int unsigned CW       = 20,
  parameter longint unsigned CLK_HZ = 9_600_000,
  parameter longint unsigned F0_HZ  = 455_000,
  parameter int unsigned AFC_GAIN = 3000
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [AFC_W-1:0]     afc_code,
  input  logic signed [CW-1:0] costas_ctrl,
  output logic                 tick,
  output logic [ACC_W-1:0]     fcw
);
  // Word for a tick rate of 4*F0, rounded.
  localparam longint unsigned FCW0_L =
    ((4 * F0_HZ) * (64'd1 << ACC_W) + CLK_HZ / 2) / CLK_HZ;
  localparam logic signed [ACC_W+1:0] FCW0 = (ACC_W+2)'(FCW0_L);
  localparam logic signed [AFC_W:0] AFC_MID = (AFC_W+1)'(1) <<< (AFC_W - 1);

  logic [ACC_W-1:0]          acc;
  logic [ACC_W:0]            acc_sum;
  logic signed [AFC_W:0]     afc_s;
  logic signed [ACC_W+1:0]   word;

  assign afc_s = signed'({1'b0, afc_code}) - AFC_MID;
  assign word  = FCW0 + (ACC_W+2)'(afc_s * signed'({1'b0, AFC_GAIN}))
                      + (ACC_W+2)'(costas_ctrl);
  // Keep the word inside 0 .. 2^ACC_W-1.
  always_comb begin
    if (word < 0)                                  fcw = '0;
    else if (word > (ACC_W+2)'({1'b0, {ACC_W{1'b1}}})) fcw = '1;
    else                                           fcw = word[ACC_W-1:0];
  end

  assign acc_sum = {1'b0, acc} + {1'b0, fcw};

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      tick <= 1'b0;
    end else begin
      acc  <= acc_sum[ACC_W-1:0];
      tick <= acc_sum[ACC_W];
    end
  end
endmodule
