// tb_elg_discriminator: synthetic bit periods of 24 reference ticks with the
// 12-tick mid-phase window; a transition at a random tick (or none) must give
// err = (window ticks after it) - (window ticks before it), saturating at
// +/-12 for transitions outside the window, and no valid output in a
// period without a transition.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_elg_discriminator;
  logic clk = 0, rst = 1, ref_tick = 0, ck_q = 0, seen = 0, cycle_end = 0;
  logic [4:0] reading;
  logic signed [5:0] err;
  logic err_valid;
  always #5 clk = ~clk;
  elg_discriminator dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  int p, xu, xd, nsat_p = 0, nsat_n = 0, nvalid = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      p = $urandom_range(0, 25);     // 24, 25: no transition
      xu = 0; xd = 0;
      for (int k = 0; k < 24; k++) begin
        @(negedge clk);
        ck_q = (k >= 6 && k < 18);
        if (k == p) seen = 1;
        ref_tick = 1;
        if (ck_q) begin if (seen) xu++; else xd++; end
        @(negedge clk); ref_tick = 0;
        repeat (2) @(negedge clk);
      end
      @(negedge clk); cycle_end = 1; ck_q = 0;
      @(negedge clk); cycle_end = 0;
      #1;
      check(err_valid == (p < 24), "valid only after a transition");
      if (p < 24) begin
        check(int'(err) == xu - xd, "err = late minus early window ticks");
        nvalid++;
        if (err == 12) nsat_p++;
        if (err == -12) nsat_n++;
      end
      seen = 0;
    end
    check(nsat_p > 50 && nsat_n > 50, "saturation reached both ways");
    $display("valid %0d, +sat %0d, -sat %0d", nvalid, nsat_p, nsat_n);
    finish_tb();
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
