// elg_discriminator: modified absolute-value early/late-gate discriminator,
// with its integrator gating, for square NRZ data.
//
// The window is the high half-cycle of the mid-phase clock, T/2 long and
// centred on the expected data transition. The early gate runs from the
// window start to the data transition and the late gate from the transition
// to the window end (gating: ck_q & ~seen and ck_q & seen). For square pulses
// the absolute value of each integrate-and-dump equals its window length, so
// both integrators are replaced by counting reference ticks (2M per bit, M
// per window): one up/down counter, preset to K-1 at the start of each bit
// period, counts down in the early gate and up in the late gate, modulo 2K.
// At the end of the period the reading R gives err = R-(K-1) = Xu-Xd, in
// -M..+M: zero in lock, positive when the transition came early (recovered
// clock late), saturating at +/-M when the error is beyond T/4 (flat
// discriminator characteristic up to T/2). err_valid is raised only when a
// transition fell in the period; otherwise the reading is discarded.
//
// Follows the text: window placement, up/down counter with preset K-1,
// R = [(K-1)+Xu-Xd] mod 2K, 24x reference (M = 12). This design's own:
// K = 16 (the smallest power of two with M <= K-1, which the text requires
// to avoid overflow), and the output taken at the in-phase clock edge.
module elg_discriminator #(
  parameter int unsigned K = 16,
  parameter int unsigned M = 12
) (
  input  logic clk,
  input  logic rst,
  input  logic ref_tick,
  input  logic ck_q,
  input  logic seen,         // transition already seen in this period
  input  logic cycle_end,    // in-phase clock rising edge
  output logic [$clog2(2*K)-1:0] reading,   // raw counter reading R
  output logic signed [$clog2(2*K):0] err,  // R-(K-1)
  output logic err_valid
);
  localparam int unsigned RW = $clog2(2 * K);
  localparam logic [RW-1:0] PRESET = RW'(K - 1);

  logic [RW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= PRESET;
      reading   <= PRESET;
      err       <= '0;
      err_valid <= 1'b0;
    end else begin
      err_valid <= 1'b0;
      if (cycle_end) begin
        reading   <= cnt;
        err       <= signed'({1'b0, cnt}) - signed'({1'b0, PRESET});
        err_valid <= seen;
        cnt       <= PRESET;
      end else if (ref_tick && ck_q) begin
        if (seen) cnt <= cnt + 1'b1;   // late gate
        else      cnt <= cnt - 1'b1;   // early gate
      end
    end
  end

  // The window never holds more than M reference ticks.
  initial assert (M <= K - 1) else $error("M must not exceed K-1");
endmodule
