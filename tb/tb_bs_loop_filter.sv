// tb_bs_loop_filter: random discriminator errors against a reference of the
// N = 2 averager and the optional integrator; one correction per two
// errors, negated and limited to the 6-bit range; switching the integrator off must clear it.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_bs_loop_filter;
  logic clk = 0, rst = 1, int_en = 0, err_valid = 0;
  logic signed [5:0] err = 0, corr;
  logic corr_valid;
  always #5 clk = ~clk;
  bs_loop_filter dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  int acc = 0, n = 0, integ = 0, d, w, e, ncorr = 0, nerr = 0;
  int exp_q[$];
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i % 2000 == 0) int_en = ~int_en;
      err_valid = ($urandom_range(0, 2) == 0);
      e = int'($urandom_range(0, 24)) - 12;
      // bias so that the integral grows
      if (i % 4000 < 2000) e = (e + 12) / 2;
      err = 6'(e);
      if (!int_en) integ = 0;
      if (err_valid) begin
        nerr++;
        if (n == 1) begin
          d = (acc + e) >>> 1;
          if (int_en) begin integ = integ + d; w = d + (integ >>> 4); end
          else w = d;
          exp_q.push_back(-w > 31 ? 31 : (-w < -32 ? -32 : -w));
          acc = 0; n = 0;
        end else begin acc += e; n++; end
      end
      @(posedge clk); #1;
      if (corr_valid) begin
        ncorr++;
        if (exp_q.size() > 0) begin w = exp_q.pop_front(); if (int'(corr) != w) $display("corr %0d exp %0d int_en %0d", corr, w, int_en); check(int'(corr) == w, "correction = -(mean + integral)"); end
        else check(0, "unexpected correction");
      end
    end
    check(exp_q.size() == 0 && ncorr == nerr / 2, "one correction per N = 2 errors");
    finish_tb();
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
