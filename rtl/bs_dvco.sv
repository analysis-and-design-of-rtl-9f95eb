// bs_dvco: digital "VCO" of the bit synchronizer.
//
// The 9.6 MHz master clock is divided by PRE_DIV (5) to the 1.92 MHz system
// reference (tick_sys). A 4-bit synchronous counter counts these ticks and
// reloads at its terminal count 15; reloading with 16-PDIV makes it divide by
// PDIV (10) to 192 kHz, and a /OUT_DIV (12) counter after it gives the 16 kHz
// data clock, 120 reference periods per bit. A correction command k makes
// the next reload use 16-PDIV-k, so that one /10 cycle becomes /(10+k) and
// the clock phase moves by k steps of 2*pi/120 (3 degrees); positive k
// delays the clock. The reload is changed only once per command, at most
// once per /10 cycle. k is limited to what a 4-bit counter can realise
// (-9 .. +6 for PDIV 10).
//
// From the /12 state: in-phase clock ck_i high in states 0..5 (its rising
// edge, bit_strobe, is the data sampling instant at mid-bit), mid-phase clock
// ck_q high in states 3..8, a quarter period later, whose high half-cycle is
// the discriminator window centred on the expected data transition. The
// reference count clock ref_tick runs at 2*OUT_DIV = 24 times the data clock
// (two ticks per /10 cycle, at states 10 and 15 of the 4-bit counter), phase
// coherent with the output clock as the text requires.
//
// Follows the text: 9.6 MHz / 5, presettable 4-bit /10, /12, 3-degree step,
// 24x reference. This design's own: the exact counter states used for the
// clocks and reference ticks. The text writes 1.96 MHz once for the /5
// output; 9.6 MHz / 5 = 1.92 MHz, the value used elsewhere, is meant.
module bs_dvco #(
  parameter int unsigned PRE_DIV = 5,
  parameter int unsigned PDIV    = 10,
  parameter int unsigned PCNT_W  = 4,
  parameter int unsigned OUT_DIV = 12,
  parameter int unsigned KW      = 6      // correction word width (signed)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 corr_valid,
  input  logic signed [KW-1:0] corr,        // k: /PDIV becomes /(PDIV+k) once
  output logic                 tick_sys,    // 1.92 MHz enable
  output logic                 ref_tick,    // 24x data-clock count enable
  output logic [3:0]           phase12,     // state of the /12 counter
  output logic                 ck_i,        // recovered in-phase data clock
  output logic                 ck_q,        // mid-phase clock
  output logic                 bit_strobe,  // one clk at each ck_i rising edge
  output logic                 applied      // a correction took effect
);
  localparam int unsigned TC = (1 << PCNT_W) - 1;
  localparam int signed KMAX = (1 << PCNT_W) - PDIV;
  localparam int signed KMIN = 1 - PDIV;
  localparam logic [PCNT_W-1:0] LOAD_NOM = PCNT_W'((1 << PCNT_W) - PDIV);
  localparam int unsigned MIDTICK = TC - PDIV / 2;

  logic [$clog2(PRE_DIV)-1:0] pre;
  logic [PCNT_W-1:0]          pcnt;
  logic                       pend;
  logic signed [KW-1:0]       pend_k;
  logic signed [KW-1:0]       k_lim;
  logic                       tc;

  // Clamp the command to what the 4-bit counter can realise.
  always_comb begin
    if (corr > KW'(KMAX))      k_lim = KW'(KMAX);
    else if (corr < KW'(KMIN)) k_lim = KW'(KMIN);
    else                       k_lim = corr;
  end

  assign tc = tick_sys && (pcnt == PCNT_W'(TC));

  always_ff @(posedge clk) begin
    if (rst) begin
      pre        <= '0;
      tick_sys   <= 1'b0;
      pcnt       <= LOAD_NOM;
      phase12    <= '0;
      pend       <= 1'b0;
      pend_k     <= '0;
      bit_strobe <= 1'b0;
      applied    <= 1'b0;
      ref_tick   <= 1'b0;
    end else begin
      // /5 prescaler
      tick_sys <= (pre == ($clog2(PRE_DIV))'(PRE_DIV - 1));
      pre      <= (pre == ($clog2(PRE_DIV))'(PRE_DIV - 1)) ? '0 : pre + 1'b1;

      ref_tick   <= tick_sys && (pcnt == PCNT_W'(TC) || pcnt == PCNT_W'(MIDTICK));
      bit_strobe <= 1'b0;
      applied    <= 1'b0;

      if (corr_valid) begin
        pend   <= 1'b1;
        pend_k <= k_lim;
      end

      if (tick_sys) begin
        if (tc) begin
          if (pend && !corr_valid) begin
            pcnt    <= PCNT_W'(KW'(LOAD_NOM) - pend_k);
            pend    <= 1'b0;
            applied <= 1'b1;
          end else begin
            pcnt <= LOAD_NOM;
          end
          if (phase12 == 4'(OUT_DIV - 1)) begin
            phase12    <= '0;
            bit_strobe <= 1'b1;
          end else begin
            phase12 <= phase12 + 1'b1;
          end
        end else begin
          pcnt <= pcnt + 1'b1;
        end
      end
    end
  end

  assign ck_i = (phase12 < 4'(OUT_DIV / 2));
  assign ck_q = (phase12 >= 4'(OUT_DIV / 4)) && (phase12 < 4'(3 * OUT_DIV / 4));
endmodule
