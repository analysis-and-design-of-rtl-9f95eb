// tb_speech_detector: speech detector on synthetic noise and talk spurts.
//
// Input at 8 kHz (one sample every 4 clks): gaussian-like background noise
// (sum of four uniform variables, sigma about 20) on a dc offset of 60, with
// two 0.6 s "talk spurts" of noise-like speech of sigma about 200, and then
// a doubling of the background noise. Checks:
//  * p(n) against a bit-exact model of the high-pass and the level filter,
//    computed here from the same samples (every sample);
//  * an ASN segment is found in the first second, after which CNLE is near
//    sqrt(2/pi)*sigma (mean magnitude of gaussian noise) and CT = 3.75*CNLE;
//  * speech is declared through most of each spurt and seldom in noise;
//  * the hangover keeps speech on for H samples after a spurt;
//  * after the noise doubles, CNLE and CT follow it up.
`timescale 1ns/1ps
module tb_speech_detector;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0;
  logic signed [9:0] x = '0;
  logic speech, onset, asn, c;
  logic [17:0] p, cnle;
  logic [11:0] ct_int;

  speech_detector dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------- independent model of high-pass + p(n) -------------
  longint m_dc = 0, m_p = 0;
  int p_mism = 0, p_cmp = 0;
  function automatic int sat10(int v);
    return v > 511 ? 511 : (v < -512 ? -512 : v);
  endfunction
  task automatic model_step(input int xs);
    int hp, mg;
    longint d;
    hp = sat10(xs - int'(m_dc >>> 8));
    m_dc = m_dc + (((longint'(xs) <<< 8) - m_dc) >>> 5);
    mg = hp < 0 ? -hp : hp;
    d = (longint'(mg) <<< 8) - m_p;
    m_p = m_p + (d >>> 7);
    if (m_p > (64 <<< 8)) m_p = 64 <<< 8;
    if (m_p < 0) m_p = 0;
  endtask

  // ------------- stimulus -------------
  int sigma_n = 20;
  bit in_spurt = 0;
  function automatic int gauss(int s);
    int a;
    a = $urandom_range(0, 2000) + $urandom_range(0, 2000) + $urandom_range(0, 2000)
      + $urandom_range(0, 2000) - 4000;
    // four uniforms of +/-1000 give sigma 1155
    return (a * s) / 1155;
  endfunction

  int n = 0;
  int sp_in = 0, sp_in_on = 0, sp_out = 0, sp_out_on = 0;
  int asn_cnt = 0;
  task automatic sample();
    int v;
    v = 60 + gauss(sigma_n) + (in_spurt ? gauss(200) : 0);
    v = sat10(v);
    @(posedge clk);
    x <= 10'(v);
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    model_step(v);
    @(posedge clk);
    @(posedge clk);
    @(negedge clk);
    p_cmp++;
    if (longint'(p) != m_p) p_mism++;
    if (asn) asn_cnt++;
    n++;
  endtask

  int cnle1, ct1, t_end, on_after, k;
  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    // 1.5 s of noise
    repeat (12000) sample();
    cnle1 = int'(cnle) / 256; ct1 = int'(ct_int);
    $display("after noise: asn=%0d CNLE=%0d CT=%0d (expected about 16 and 60)", asn_cnt, cnle1, ct1);
    check(asn_cnt > 0, "almost-surely-noise segment found in background noise");
    check(cnle1 >= 11 && cnle1 <= 21, "CNLE near sqrt(2/pi)*sigma");
    check(ct_int >= 12'(cnle1 * 3) && ct_int <= 12'(cnle1 * 4 + 4), "CT = 3.75 * CNLE");
    // two spurts of 0.6 s, 1.2 s apart
    for (int s = 0; s < 2; s++) begin
      in_spurt = 1;
      repeat (4800) begin
        sample();
        sp_in++; if (speech) sp_in_on++;
      end
      in_spurt = 0;
      // hangover: still on 1000 samples after the spurt
      on_after = 0;
      repeat (1000) sample();
      on_after = speech;
      check(on_after == 1, "hangover holds speech after a spurt");
      repeat (1000) sample();
      check(speech == 0, "speech released after the hangover");
      repeat (7600) begin
        sample();
        sp_out++; if (speech) sp_out_on++;
      end
    end
    $display("activity in spurts %0d/%0d, in noise %0d/%0d", sp_in_on, sp_in, sp_out_on, sp_out);
    check(sp_in_on * 10 > sp_in * 9, "speech declared through the spurts");
    check(sp_out_on * 10 < sp_out, "noise seldom declared speech");
    // noise doubles: estimate must follow
    sigma_n = 40;
    k = asn_cnt;
    repeat (24000) sample();
    $display("after noise step: CNLE=%0d CT=%0d", int'(cnle) / 256, ct_int);
    check(int'(cnle) / 256 >= 25 && int'(cnle) / 256 <= 40, "CNLE follows a rising noise floor");
    check(asn_cnt > k, "new ASN segments after the noise step");
    $display("p(n) model mismatches %0d of %0d", p_mism, p_cmp);
    check(p_mism == 0, "p(n) matches the bit-exact model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
