// sd_decision: speech declaration with hangover.
//
// Speech is declared when N consecutive sample magnitudes exceed the current
// threshold CT. The detector then stays in the active state for at least the
// next H samples; every further qualifying run restarts the hangover, which
// bridges low-level stretches inside a talk spurt. speech drives the carrier
// enable of the transmitter.
//
// Follows the text: N consecutive samples (1 to 4 to be tried) and a
// 100-200 ms hangover (H = 1600 samples = 200 ms at 8 kHz here). N = 3 is
// this design's choice: with the threshold near 3 noise standard deviations,
// N = 1 lets a single noise peak every few hundred samples restart the
// 200 ms hangover, so the carrier would never drop in noise. Timing: speech updates one clk after in_valid.
module sd_decision #(
  parameter int unsigned MW = 10,
  parameter int unsigned TW = 12,
  parameter int unsigned N  = 3,
  parameter int unsigned H  = 1600
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [MW-1:0] mag,
  input  logic [TW-1:0] ct,
  output logic          speech,
  output logic          onset       // one clk: a qualifying run completed
);
  logic [$clog2(N+1)-1:0] run;
  logic [$clog2(H+1)-1:0] hang;
  logic                   above;

  assign above = (TW > MW) ? ({{(TW > MW ? TW - MW : 0){1'b0}}, mag} > ct) : (mag > MW'(ct));

  always_ff @(posedge clk) begin
    if (rst) begin
      run   <= '0;
      hang  <= '0;
      onset <= 1'b0;
    end else begin
      onset <= 1'b0;
      if (in_valid) begin
        if (above) begin
          if (run == ($clog2(N+1))'(N - 1) || N == 1) begin
            hang  <= ($clog2(H+1))'(H);
            onset <= 1'b1;
            run   <= ($clog2(N+1))'(N - 1);
          end else begin
            run <= run + 1'b1;
          end
        end else begin
          run <= '0;
          if (hang != 0) hang <= hang - 1'b1;
        end
      end
    end
  end

  assign speech = (hang != 0);
endmodule
