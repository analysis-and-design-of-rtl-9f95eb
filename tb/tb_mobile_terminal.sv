// tb_mobile_terminal: end-to-end run of the whole terminal at its default
// parameters, in real time (9.6 MHz clock, 16 kb/s data, 8 kHz speech).
//
// Four stimulus threads run side by side:
//  * carrier: a hard-limited IF 8 kHz above 455 kHz is acquired with the AFC
//    and the wide Costas bandwidth, the loop is switched to the narrow
//    tracking bandwidth, the AFC is switched off and must hold its code, the
//    IF steps to 445 kHz and is re-acquired, and finally an IF 80 kHz high,
//    outside the AFC range, drives the AFC integrator to its end so that it
//    presets to mid-scale;
//  * data: random NRZ data at 16 kb/s whose bit edges start half a bit away
//    from the recovered clock; the synchroniser must pull in (first order)
//    and then hold lock with the integrator switched in;
//  * speech: 1.5 s of background noise, a 0.6 s talk spurt and 0.4 s of
//    noise, sampled at 8 kHz;
//  * keying: in voice mode the carrier follows the speech decision; then a
//    data packet of 1000 bits is requested while the channel is busy, must
//    wait, and is sent when the channel frees.
// Every mechanism is counted and a failure is counted for any that never
// occurred. Checks use values worked out here: IF frequencies, data
// transition times and the noise statistics of the stimulus.
`timescale 1ns/1ps
module tb_mobile_terminal;
  import mt_pkg::*;
  localparam real CLK_HZ = 9.6e6;
  logic clk = 0, rst = 1;
  always #52.083 clk = ~clk;

  logic if_in, cr_acq = 1, cr_afc_en = 1;
  logic cr_u1, cr_u2, cr_afc_wrap, cr_fd_up, cr_fd_dn, cr_i_sign;
  logic [7:0] cr_afc_code;
  logic signed [19:0] cr_ctrl;
  logic [23:0] cr_fcw;
  logic signed [9:0] cr_i_val, cr_q_val;
  logic rx_data = 0, bs_int_en = 0;
  logic rx_clk, rx_clk_q, rx_strobe, rx_bit, bs_err_valid, bs_corr_applied;
  logic signed [5:0] bs_err, bs_corr;
  logic [3:0] bs_phase12;
  logic spk_valid = 0;
  logic signed [SAMPLE_W-1:0] spk_x = 0;
  logic voice_mode = 0, data_req = 0, chan_busy = 0, pkt_done = 0;
  logic speech, speech_onset, sd_asn, carrier_on, data_grant;
  logic [17:0] sd_cnle;
  logic [11:0] sd_ct;
  tx_state_e tx_state;

  mobile_terminal dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // ---------------- IF generator ----------------
  logic [31:0] if_acc = 32'h1234_5678;
  int unsigned if_inc;
  real f_if;
  always_ff @(posedge clk) if_acc <= if_acc + if_inc;
  assign if_in = if_acc[31];
  task automatic set_if(input real f);
    f_if = f;
    if_inc = 32'(longint'(f / CLK_HZ * 4294967296.0));
  endtask
  function automatic real osc_hz();
    return real'(cr_fcw) * CLK_HZ / 16777216.0 / 4.0;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_up = 0, n_dn = 0, n_wrap = 0, n_bw = 0, n_afc_off = 0, n_lock = 0;
  int n_sat = 0, n_applied = 0, n_int = 0, n_bs_lock = 0;
  int n_onset = 0, n_asn = 0, n_release = 0;
  int n_voice = 0, n_defer = 0, n_data = 0, n_pkt = 0;
  logic speech_d = 0;
  tx_state_e st_d = TX_IDLE;
  always @(posedge clk) if (!rst) begin
    n_up += int'(cr_fd_up);
    n_dn += int'(cr_fd_dn);
    n_wrap += int'(cr_afc_wrap);
    if (bs_err_valid && (bs_err == 12 || bs_err == -12)) n_sat++;
    n_applied += int'(bs_corr_applied);
    n_onset += int'(speech_onset);
    if (spk_valid) n_asn += int'(sd_asn);
    if (speech_d && !speech) n_release++;
    speech_d <= speech;
    if (st_d != TX_VOICE && tx_state == TX_VOICE) n_voice++;
    if (st_d != TX_DATA && tx_state == TX_DATA) n_data++;
    if (st_d == TX_DATA && tx_state == TX_IDLE) n_pkt++;
    if (tx_state == TX_IDLE && data_req && chan_busy) n_defer++;
    st_d <= tx_state;
  end

  // ---------------- carrier thread ----------------
  int stable, t0;
  logic [7:0] code_hold;
  task automatic acquire(input real f, input int max_cycles, output int cyc);
    stable = 0; cyc = 0;
    while (stable < 9600 && cyc < max_cycles) begin
      @(posedge clk); cyc++;
      if (osc_hz() - f < 100.0 && f - osc_hz() < 100.0) stable++; else stable = 0;
    end
    cyc -= stable;
  endtask
  task automatic carrier_thread();
    int c;
    set_if(463_000.0);
    acquire(463_000.0, 200_000, c);
    $display("carrier: 463 kHz acquired after %0.2f ms", real'(c) / 9600.0);
    check(c < 96_000, "acquisition within 10 ms");
    @(negedge clk); cr_acq = 0; n_bw++;
    repeat (48_000) @(posedge clk);
    $display("carrier: tracking, I %0d Q %0d", cr_i_val, cr_q_val);
    if ((cr_i_val > 200 || cr_i_val < -200) && cr_q_val < 60 && cr_q_val > -60) n_lock++;
    check(osc_hz() - 463_000.0 < 100.0 && 463_000.0 - osc_hz() < 100.0, "tracking holds the frequency");
    @(negedge clk); cr_afc_en = 0; code_hold = cr_afc_code;
    repeat (48_000) @(posedge clk);
    if (cr_afc_code == code_hold) n_afc_off++;
    check(cr_afc_code == code_hold, "AFC code frozen while disabled");
    @(negedge clk); cr_afc_en = 1; cr_acq = 1; set_if(445_000.0);
    acquire(445_000.0, 200_000, c);
    $display("carrier: 445 kHz re-acquired after %0.2f ms", real'(c) / 9600.0);
    check(c < 96_000, "re-acquisition within 10 ms");
    @(negedge clk); cr_acq = 0; n_bw++;
    repeat (48_000) @(posedge clk);
    if ((cr_i_val > 200 || cr_i_val < -200) && cr_q_val < 60 && cr_q_val > -60) n_lock++;
    // outside the AFC range: the integrator runs to its end and presets
    @(negedge clk); cr_acq = 1; set_if(535_000.0);
    repeat (300_000) @(posedge clk);
    $display("carrier: 535 kHz, AFC presets %0d", n_wrap);
    set_if(455_000.0);
  endtask

  // ---------------- data thread ----------------
  longint cyc = 0, t_tr = -1, t_used = -1;
  real t_next = 10.0;         // bit edges half a bit off the recovered clock
  int bitno = 0, e, emax_late = 0, nmeas = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (real'(cyc) >= t_next) begin
      logic nb;
      t_next = t_next + 600.0;
      bitno++;
      nb = 1'($urandom_range(0, 1));
      if (nb != rx_data) t_tr = cyc;
      rx_data <= nb;
    end
    // timing error: recovered sampling edge against mid-bit
    if (rx_strobe && t_tr >= 0 && t_tr != t_used) begin
      e = int'(cyc - t_tr) - 300;
      t_used = t_tr;
      nmeas++;
      if (bitno > 1500) begin
        if (e > emax_late || -e > emax_late) emax_late = e < 0 ? -e : e;
      end
    end
  end
  logic signed [5:0] last_err = 0;
  always @(posedge clk) begin
    if (bs_err_valid) last_err <= bs_err;
    if (bs_corr_applied && bs_int_en) n_int++;
  end

  // ---------------- speech thread ----------------
  function automatic int gauss(int s);
    int a;
    a = $urandom_range(0, 2000) + $urandom_range(0, 2000) + $urandom_range(0, 2000)
      + $urandom_range(0, 2000) - 4000;
    return (a * s) / 1155;
  endfunction
  bit in_spurt = 0;
  int sp_on = 0, sp_n = 0;
  task automatic speech_sample();
    int v;
    v = 60 + gauss(20) + (in_spurt ? gauss(200) : 0);
    v = v > 511 ? 511 : (v < -512 ? -512 : v);
    @(negedge clk); spk_x = 10'(v); spk_valid = 1;
    @(negedge clk); spk_valid = 0;
    repeat (1198) @(negedge clk);
  endtask
  task automatic speech_thread();
    voice_mode = 1;
    repeat (12000) speech_sample();
    $display("speech: CNLE %0d CT %0d after 1.5 s of noise", sd_cnle >> 8, sd_ct);
    check((sd_cnle >> 8) >= 11 && (sd_cnle >> 8) <= 21, "noise level near the mean noise magnitude");
    in_spurt = 1;
    repeat (4800) begin speech_sample(); sp_n++; sp_on += int'(speech && carrier_on); end
    in_spurt = 0;
    $display("speech: carrier keyed for %0d of %0d spurt samples", sp_on, sp_n);
    check(sp_on * 10 > sp_n * 9, "carrier keyed through the spurt");
    repeat (3200) speech_sample();
    check(!speech && tx_state == TX_IDLE, "carrier released after the hangover");
    voice_mode = 0;
  endtask

  // ---------------- keying of a data packet ----------------
  task automatic packet_thread();
    @(negedge clk); data_req = 1; chan_busy = 1;
    repeat (20_000) @(negedge clk);
    check(tx_state == TX_IDLE, "packet waits while the channel is busy");
    chan_busy = 0;
    @(negedge clk); @(negedge clk);
    check(tx_state == TX_DATA && carrier_on, "packet sent when the channel frees");
    data_req = 0;
    t0 = int'(cyc);
    repeat (1000) @(posedge rx_strobe);
    @(negedge clk); pkt_done = 1;
    @(negedge clk); pkt_done = 0;
    @(negedge clk);
    check(tx_state == TX_IDLE && !carrier_on, "carrier released at the end of the packet");
    $display("packet: %0d clocks on air", int'(cyc) - t0);
    check(int'(cyc) - t0 >= 599_400 && int'(cyc) - t0 <= 600_600, "1000 bits at 16 kb/s = 600000 clocks");
  endtask

  initial begin
    set_if(455_000.0);
    repeat (5) @(posedge clk);
    rst = 0;
    fork
      carrier_thread();
      begin
        repeat (1_200_000) @(posedge clk);   // 2000 bits, first order
        check(n_sat > 0, "discriminator saturated during pull-in");
        bs_int_en = 1;
      end
      speech_thread();
    join
    packet_thread();
    $display("data: max timing error %0d clocks over %0d transitions", emax_late, nmeas);
    check(emax_late < 60, "bit clock within 36 degrees of mid-bit");
    if (emax_late < 60) n_bs_lock++;
    $display("counts: fd_up %0d fd_dn %0d afc_preset %0d bw_switch %0d afc_off %0d lock %0d",
              n_up, n_dn, n_wrap, n_bw, n_afc_off, n_lock);
    $display("counts: bs_sat %0d bs_applied %0d bs_int %0d bs_lock %0d",
              n_sat, n_applied, n_int, n_bs_lock);
    $display("counts: onset %0d asn %0d release %0d voice %0d defer %0d data %0d pkt %0d",
              n_onset, n_asn, n_release, n_voice, n_defer, n_data, n_pkt);
    check(n_up > 0, "frequency comparator up pulses");
    check(n_dn > 0, "frequency comparator down pulses");
    check(n_wrap > 0, "AFC preset to mid-scale");
    check(n_bw > 0, "acquisition to tracking bandwidth switch");
    check(n_afc_off > 0, "AFC disabled");
    check(n_lock > 0, "Costas lock");
    check(n_sat > 0, "discriminator saturation");
    check(n_applied > 0, "clock corrections applied");
    check(n_int > 0, "integrator in the loop");
    check(n_bs_lock > 0, "bit synchroniser lock");
    check(n_onset > 0, "speech onset");
    check(n_asn > 0, "noise-level update");
    check(n_release > 0, "hangover release");
    check(n_voice > 0, "carrier keyed by speech");
    check(n_defer > 0, "packet deferred by a busy channel");
    check(n_data > 0 && n_pkt > 0, "data packet sent");
    finish_tb();
  end
  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
