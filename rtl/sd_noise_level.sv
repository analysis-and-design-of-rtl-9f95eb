// sd_noise_level: "almost surely noise" detection and threshold update.
//
// Keeps the current noise level estimate CNLE. A segment is almost surely
// noise (asn = 1) when the constancy flag c is set and p(n) <= CNLE; then
// CNLE is reset to p(n) and the detection threshold CT is reset to
// 3*sqrt(pi/2)*CNLE, three standard deviations of gaussian noise whose mean
// magnitude is CNLE, realised with shifts as 4*CNLE - CNLE/4 = 3.75*CNLE.
// Otherwise CNLE grows by DELTA each sample, so it follows a rising noise
// floor, and CT is held.
//
// The text states the increase two ways: "for every sample p(n) that exceeds
// the current CNLE" and "if ASN != 1, CNLE(n) = CNLE(n-1) + delta"; the second
// (the rule given with the threshold reset) is followed. CNLE starts at full
// scale so the first noise segment sets it; CT starts at CT_INIT = 0, so the
// carrier stays on until the noise floor has been measured. DELTA is this
// design's choice. Values carry F fraction bits; ct_int is CT in input units.
// Timing: registers update one clk after in_valid.
module sd_noise_level #(
  parameter int unsigned PW     = 18,
  parameter int unsigned F      = 8,
  parameter int unsigned DELTA  = 1,
  parameter int unsigned CT_INIT = 0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  logic [PW-1:0]   p,
  input  logic            c,
  output logic [PW-1:0]   cnle,
  output logic [PW+1:0]   ct,        // threshold, F fraction bits
  output logic [PW-F+1:0] ct_int,    // threshold in sample units
  output logic            asn
);
  logic          asn_n;
  logic [PW:0]   cnle_inc;

  assign asn_n    = c && (p <= cnle);
  assign cnle_inc = {1'b0, cnle} + (PW+1)'(DELTA);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnle <= '1;
      ct   <= (PW+2)'(CT_INIT);
      asn  <= 1'b0;
    end else if (in_valid) begin
      asn <= asn_n;
      if (asn_n) begin
        cnle <= p;
        ct   <= ({2'b00, p} << 2) - (PW+2)'(p >> 2);
      end else begin
        cnle <= cnle_inc[PW] ? '1 : cnle_inc[PW-1:0];
      end
    end
  end

  assign ct_int = ct[PW+1:F];
endmodule
