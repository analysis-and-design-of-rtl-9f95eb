// tb_bs_dvco: the data clock period must be 600 master clocks (9.6 MHz /
// 16 kHz) with 24 reference ticks per bit and the mid-phase clock a quarter
// period (150 clocks) behind; a correction k must lengthen the period it acts
// in by exactly 5k clocks (one 1.92 MHz period, 3 degrees, per step), with k
// limited to -9 .. +6.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_bs_dvco;
  logic clk = 0, rst = 1, corr_valid = 0;
  logic signed [5:0] corr = 0;
  logic tick_sys, ref_tick, ck_i, ck_q, bit_strobe, applied;
  logic [3:0] phase12;
  always #5 clk = ~clk;
  bs_dvco dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  int last_k = 0, k_cur = 0, k_next = 0, t = 0, t_last = -1, refs = 0, sys = 0;
  int a_cur = 0, a_next = 0, nbits = 0, napplied = 0;
  logic ck_q_d = 0;
  function automatic int clampk(input int k);
    return k > 6 ? 6 : (k < -9 ? -9 : k);
  endfunction
  always @(posedge clk) if (!rst) begin
    t++;
    refs += int'(ref_tick);
    sys  += int'(tick_sys);
    ck_q_d <= ck_q;
    if (ck_q && !ck_q_d && t_last > 0 && a_cur == 0)
      check(t - t_last == 150, "mid-phase clock a quarter period behind");
    if (applied) begin
      napplied++;
      if (bit_strobe) begin k_next += clampk(last_k); a_next++; end
      else begin k_cur += clampk(last_k); a_cur++; end
    end
    if (bit_strobe) begin
      if (t_last >= 0) begin
        check(t - t_last == 600 + 5 * k_cur, "bit period = 600 + 5k clocks");
        if (a_cur == 0) check(refs == 24, "24 reference ticks per bit");
        if (a_cur == 0) check(sys == 120, "120 system ticks per bit");
        nbits++;
      end
      t_last = t; refs = 0; sys = 0;
      k_cur = k_next; k_next = 0; a_cur = a_next; a_next = 0;
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3000) @(posedge clk);
    for (int i = 0; i < 150; i++) begin
      repeat ($urandom_range(300, 1300)) @(posedge clk);
      @(negedge clk);
      last_k = int'($urandom_range(0, 24)) - 12;
      corr = 6'(last_k); corr_valid = 1;
      @(negedge clk); corr_valid = 0;
    end
    repeat (2000) @(posedge clk);
    $display("bits %0d, corrections applied %0d", nbits, napplied);
    check(napplied == 150, "every correction applied once");
    finish_tb();
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
