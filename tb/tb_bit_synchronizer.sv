// tb_bit_synchronizer: closed-loop test of the early/late-gate clock
// synchronizer.
//
// NRZ data at 16 kb/s (600 master clocks per bit) is generated with a known
// transition timing. Timing error of the recovered clock = (time from a data
// transition to the next in-phase rising edge) - T/2; it is zero in lock.
// Phase 1: pattern 0011..., initial phase step of pi (transitions land on the
// sampling edge); the number of transitions until the error first falls in
// the +/-1 reference tick dead zone is counted against the 20 transitions
// reported for the original circuit (30 allowed). Phase 2: random data with a
// 0.195 % rate offset, first-order loop; the loop must stay locked (error
// below T/4) with a net delaying correction. Phase 3: same offset, integrator on; the
// loop must stay locked with its mean error inside one reference tick, and
// the integral path must be seen correcting the clock on its own. Phase 4:
// the other two offsets of the laboratory test, 0.273 % and 0.35 %: the loop
// must track, with a phase ripple that grows with the offset. Phase 5:
// a pi/2 step of the 0011 pattern must be pulled in within 20 transitions.
`timescale 1ns/1ps
module tb_bit_synchronizer;
  logic clk = 0, rst = 1;
  always #52.083 clk = ~clk;

  logic data_in = 0, int_en = 0;
  logic ck_i, ck_q, bit_strobe, data_out, err_valid, corr_valid, corr_applied, trans;
  logic signed [5:0] err;
  logic signed [5:0] corr;
  logic [3:0] phase12;
  logic [4:0] reading;

  bit_synchronizer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- data generator ----------------
  real    period = 600.0;
  real    t_next;           // cycle number of the next bit boundary
  longint cyc = 0;
  int     mode = 0;         // 0: 0011 pattern, 1: random
  int     bitno = 0;
  longint t_tr = -1;        // cycle of last data transition
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (real'(cyc) >= t_next) begin
      logic nb;
      t_next = t_next + period;
      bitno++;
      nb = (mode == 0) ? bitno[1] : 1'($urandom_range(0, 1));
      if (nb != data_in) t_tr = cyc;
      data_in <= nb;
    end
  end

  // ---------------- timing error measurement ----------------
  longint last_tr_used = -1;
  int     e;                 // last timing error, clocks
  bit     e_new = 0;
  int     n_tr = 0;          // transitions measured
  always @(posedge clk) begin
    e_new <= 0;
    if (bit_strobe && t_tr >= 0 && t_tr != last_tr_used) begin
      e = int'(cyc - t_tr) - 300;
      last_tr_used = t_tr;
      e_new <= 1;
      n_tr++;
    end
  end

  int n_corr = 0, n_applied = 0, n_sat = 0, n_int = 0;
  logic signed [5:0] last_err, last_corr;
  always @(posedge clk) begin
    if (err_valid) last_err <= err;
    if (corr_valid) last_corr <= corr;
    if (corr_valid && int_en && last_err == 0 && corr != 0) n_int++;
    if (corr_valid) n_corr++;
    if (corr_applied) n_applied++;
    if (err_valid && (err == 12 || err == -12)) n_sat++;
  end

  int sum_k;
  int lock_at, start_tr, maxe, sum_e, cnt_e;
  real mean2, mean3;
  real offs[2] = '{0.273, 0.35};
  real means[2];
  int maxes[2], max2;
  initial begin
    t_next = 1000.0;
    repeat (20) @(posedge clk);
    rst = 0;
    // ---- phase 1: pi step, 0011 pattern ----
    // the /12 counter starts with ck_i rising at reset release; put data
    // transitions right on it
    t_next = 20.0 + 600.0 * 4;
    @(posedge clk);
    start_tr = n_tr;
    lock_at = -1;
    while (lock_at < 0 && n_tr - start_tr < 200) begin
      @(posedge clk);
      if (e_new) begin
        if (n_tr - start_tr <= 3) $display("first errors: %0d", e);
        if (e <= 25 && e >= -25) lock_at = n_tr - start_tr;
      end
    end
    $display("pi step: dead zone reached after %0d transitions", lock_at);
    check(lock_at > 0 && lock_at <= 30, "acquisition of a pi phase step within 30 transitions");
    check(n_sat > 0, "discriminator saturated outside +/-T/4");
    // stays in lock
    maxe = 0;
    repeat (100 * 600) begin
      @(posedge clk);
      if (e_new && (e > maxe || -e > maxe)) maxe = (e > 0) ? e : -e;
    end
    $display("locked, max |error| %0d clocks", maxe);
    check(maxe <= 40, "stays in dead zone without offset");
    // ---- phase 2: random data, 0.195 % offset, first order ----
    mode = 1;
    period = 600.0 * 1.00195;
    repeat (100 * 600) @(posedge clk);
    maxe = 0; sum_e = 0; cnt_e = 0; sum_k = 0;
    repeat (400 * 600) begin
      @(posedge clk);
      if (corr_applied) sum_k += int'(last_corr);
      if (e_new) begin
        sum_e += e; cnt_e++;
        if (e > maxe || -e > maxe) maxe = (e > 0) ? e : -e;
      end
    end
    mean2 = real'(sum_e) / cnt_e;
    max2 = maxe;
    $display("first order, offset 0.195%%: mean error %0.1f, max %0d clocks", mean2, maxe);
    check(maxe < 150, "first-order loop tracks a 0.195 % offset");
    $display("net correction over 400 bits: %0d steps", sum_k);
    check(sum_k > 40, "slow data: net positive (delaying) corrections");
    // ---- phase 3: integrator on ----
    int_en = 1;
    repeat (200 * 600) @(posedge clk);
    maxe = 0; sum_e = 0; cnt_e = 0;
    repeat (400 * 600) begin
      @(posedge clk);
      if (e_new) begin
        sum_e += e; cnt_e++;
        if (e > maxe || -e > maxe) maxe = (e > 0) ? e : -e;
      end
    end
    mean3 = real'(sum_e) / cnt_e;
    $display("second order: mean error %0.1f, max %0d clocks", mean3, maxe);
    check(maxe < 150, "second-order loop tracks");
    check((mean3 < 0 ? -mean3 : mean3) < 25.0, "second-order loop mean error inside one reference tick");
    check(n_int > 0, "integral path moved the clock with zero discriminator error");
    check(n_applied > 0 && n_applied <= n_corr, "corrections applied once each");
    // ---- phase 4: offsets 0.273 % and 0.35 %, first order ----
    int_en = 0;
    foreach (offs[i]) begin
      period = 600.0 * (1.0 + offs[i] / 100.0);
      repeat (100 * 600) @(posedge clk);
      maxe = 0; sum_e = 0; cnt_e = 0;
      repeat (400 * 600) begin
        @(posedge clk);
        if (e_new) begin
          sum_e += e; cnt_e++;
          if (e > maxe || -e > maxe) maxe = (e > 0) ? e : -e;
        end
      end
      means[i] = real'(sum_e) / cnt_e;
      $display("first order, offset %0.3f%%: mean error %0.1f, max %0d clocks", offs[i], means[i], maxe);
      check(maxe < 150, "first-order loop tracks the offset");
      maxes[i] = maxe;
    end
    check(maxes[1] > max2 && maxes[0] >= max2, "phase ripple grows with the frequency offset");
    // ---- phase 5: pi/2 step, 0011 pattern, no offset ----
    period = 600.0; mode = 0;
    repeat (200 * 600) @(posedge clk);
    t_next = t_next + 150.0;
    start_tr = n_tr; lock_at = -1;
    while (lock_at < 0 && n_tr - start_tr < 200) begin
      @(posedge clk);
      if (e_new && n_tr - start_tr > 1 && e <= 25 && e >= -25) lock_at = n_tr - start_tr;
    end
    $display("pi/2 step: dead zone reached after %0d transitions", lock_at);
    check(lock_at > 0 && lock_at <= 20, "acquisition of a pi/2 phase step within 20 transitions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
