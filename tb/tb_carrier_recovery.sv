// tb_carrier_recovery: closed-loop test of the Costas + AFC carrier loop.
//
// A numerically generated hard-limited IF is applied at 465 kHz and then
// stepped to 445 kHz, the +/-10 kHz steps used in the laboratory test of the
// loop. The test checks that the AFC pulls in, that the oscillator word ends
// within a small error of the IF, that the Costas arm settles at a lock point
// (|I| near full scale, Q near zero), and the acquisition time against the
// 4 ms reported for a clean input (allowed up to 10 ms here). A last step
// is made with band-limited gaussian noise at a carrier-to-noise ratio of
// 10 dB, for which 8 ms was reported (allowed up to 20 ms here). The text
// frequency-modulates the carrier with the noise; here the noise is added to
// the IF before the hard limiter instead, which is this testbench's choice.
// Finally a TFM-modulated carrier (16 kb/s random data) is applied 10 kHz
// below; no acquisition time is quoted for it, so the test checks that the
// oscillator's mean frequency settles on the carrier and its wander stays
// within 4 kHz.
`timescale 1ns/1ps
module tb_carrier_recovery;
  localparam real CLK_HZ = 9.6e6;
  logic clk = 0, rst = 1;
  always #52.083 clk = ~clk;

  logic if_in, acq, afc_en;
  logic u1, u2, fd_up, fd_dn, afc_wrap, pd_valid, i_sign;
  logic [7:0] afc_code;
  logic signed [19:0] costas_ctrl;
  logic signed [9:0] pd_err, i_val, q_val;
  logic [23:0] fcw;

  carrier_recovery dut (.*);

  // IF generator: 32-bit phase accumulator, MSB is the hard-limited IF.
  logic [31:0] if_acc = 32'h1234_5678;
  longint unsigned if_inc;
  always_ff @(posedge clk) if_acc <= if_acc + if_inc[31:0];
  // Noisy mode: sin(phase) plus gaussian noise low-pass filtered to about
  // 25 kHz (the channel width), then hard limited; carrier-to-noise ratio
  // 10 dB (noise variance 0.05 against carrier power 0.5).
  bit noisy = 0;
  real nf = 0.0, w;
  localparam real NA = 0.98377;           // exp(-2*pi*25 kHz / 9.6 MHz)
  localparam real SIGMA_N = 0.2236;       // noise standard deviation
  always @(posedge clk) begin
    w = (real'($urandom_range(0, 1000)) + real'($urandom_range(0, 1000))
       + real'($urandom_range(0, 1000)) + real'($urandom_range(0, 1000)) - 2000.0) / 577.35;
    nf = NA * nf + w * SIGMA_N * $sqrt(1.0 - NA * NA);
  end
  assign if_in = noisy ? ($sin(6.283185307 * real'(if_acc) / 4294967296.0) + nf > 0.0)
                       : if_acc[31];
  // TFM mode: every 600 clocks (one 16 kb/s bit) a random data bit enters a
  // three-bit window and the IF frequency is set to fc + 4 kHz * (a[n-1]/4 +
  // a[n]/2 + a[n+1]/4), so each bit turns the phase by at most pi/2, with
  // the smoothing of tamed frequency modulation.
  bit tfm = 0;
  real tfm_fc;
  int a_m1 = 1, a_0 = -1, a_p1 = 1, bit_t = 0;
  always @(posedge clk) if (tfm) begin
    if (bit_t == 599) begin
      bit_t = 0;
      a_m1 = a_0; a_0 = a_p1; a_p1 = $urandom_range(0, 1) ? 1 : -1;
      if_inc = inc_for(tfm_fc + 4.0e3 * (0.25 * a_m1 + 0.5 * a_0 + 0.25 * a_p1));
    end else bit_t++;
  end
  function automatic longint unsigned inc_for(real f);
    return longint'(f / CLK_HZ * 4294967296.0);
  endfunction

  int checks = 0, failures = 0;
  int up_cnt = 0, dn_cnt = 0;
  always_ff @(posedge clk) begin
    if (fd_up) up_cnt <= up_cnt + 1;
    if (fd_dn) dn_cnt <= dn_cnt + 1;
  end

  function automatic real fcw_hz();
    return real'(fcw) * CLK_HZ / 16777216.0 / 4.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Cycles until the oscillator stays within 100 Hz of f for 1 ms.
  task automatic acquire(input real f, output int cycles);
    int stable = 0;
    cycles = 0;
    while (stable < 9600 && cycles < 200000) begin
      @(posedge clk);
      cycles++;
      if (fcw_hz() - f < 100.0 && f - fcw_hz() < 100.0) stable++;
      else stable = 0;
    end
    cycles -= stable;
  endtask

  int cyc;
  int up0, dn0;
  real favg, fmin, fmax;
  initial begin
    acq = 1; afc_en = 1;
    if_inc = inc_for(465.0e3);
    repeat (10) @(posedge clk);
    rst = 0;
    up0 = up_cnt; dn0 = dn_cnt;
    acquire(465.0e3, cyc);
    $display("465 kHz: acquired after %0d cycles (%0.2f ms), afc=%0d ctrl=%0d f=%0.1f",
             cyc, cyc / 9600.0, afc_code, costas_ctrl, fcw_hz());
    check(cyc < 96000, "acquisition of +10 kHz within 10 ms");
    check(up_cnt - up0 > 20, "frequency comparator gave up pulses for IF above VCO");
    check(int'(afc_code) > 128, "AFC counter moved up");
    // narrow the loop and look at the lock point
    acq = 0;
    repeat (48000) @(posedge clk);
    check(fcw_hz() > 464.95e3 && fcw_hz() < 465.05e3, "tracking: oscillator on 465 kHz");
    @(posedge pd_valid); @(negedge clk);
    $display("I=%0d Q=%0d", i_val, q_val);
    check((i_val > 200 || i_val < -200) && q_val < 60 && q_val > -60, "Costas lock point");
    // step down 20 kHz
    acq = 1;
    if_inc = inc_for(445.0e3);
    up0 = up_cnt; dn0 = dn_cnt;
    acquire(445.0e3, cyc);
    $display("445 kHz: acquired after %0d cycles (%0.2f ms), afc=%0d ctrl=%0d f=%0.1f",
             cyc, cyc / 9600.0, afc_code, costas_ctrl, fcw_hz());
    check(cyc < 96000, "acquisition of a -20 kHz step within 10 ms");
    check(dn_cnt - dn0 > 20, "frequency comparator gave down pulses for IF below VCO");
    check(int'(afc_code) < 128, "AFC counter moved down");
    // noisy input, C/N = 10 dB: +20 kHz step
    noisy = 1;
    if_inc = inc_for(465.0e3);
    acquire(465.0e3, cyc);
    $display("465 kHz, C/N 10 dB: acquired after %0d cycles (%0.2f ms), afc=%0d",
             cyc, cyc / 9600.0, afc_code);
    check(cyc < 192000, "acquisition with C/N = 10 dB within 20 ms");
    // TFM-modulated input, clean, carrier stepped 10 kHz down. The biphase
    // arms cannot hold a phase lock on TFM, so the oscillator wanders with
    // the data; after 10 ms its 10 ms mean must be within 1 kHz of the
    // carrier and its excursions stay well inside the 10 kHz step.
    noisy = 0;
    tfm_fc = 455.0e3;
    tfm = 1;
    repeat (96000) @(posedge clk);
    favg = 0.0; fmin = 1.0e9; fmax = 0.0;
    repeat (96000) begin
      @(posedge clk);
      favg += fcw_hz() / 96000.0;
      if (fcw_hz() < fmin) fmin = fcw_hz();
      if (fcw_hz() > fmax) fmax = fcw_hz();
    end
    $display("TFM at 455 kHz, 10-20 ms: oscillator mean %0.1f Hz, range %0.1f..%0.1f Hz, afc=%0d",
             favg, fmin, fmax, afc_code);
    check(fmin > 451.0e3 && fmax < 459.0e3, "TFM input: oscillator stays within 4 kHz of the carrier");
    check(favg > 454.0e3 && favg < 456.0e3, "TFM input: mean oscillator frequency on the carrier");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_900_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
