// tb_costas_loop_filter: random detector errors and bandwidth switches
// against a reference proportional-plus-integral filter; then a long run of
// full-scale error must saturate the integral and the output instead of
// wrapping, and switching the bandwidth must keep the integral.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_costas_loop_filter;
  logic clk = 0, rst = 1, acq = 1, err_valid = 0;
  logic signed [9:0]  err = 0;
  logic signed [19:0] ctrl;
  always #5 clk = ~clk;
  costas_loop_filter dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  longint integ = 0, e_ctrl = 0, kp, ki, s;
  function automatic longint sat(input longint v, input int w);
    longint hi = (64'sd1 <<< (w - 1)) - 1;
    longint lo = -(64'sd1 <<< (w - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction
  task automatic step(input int e, input bit a, input bit v);
    @(negedge clk);
    err = 10'(e); acq = a; err_valid = v;
    if (v) begin
      kp = a ? 6221 : 1165; ki = a ? 294 : 10;
      s = kp * e + integ;
      e_ctrl = sat(s >>> 8, 20);
      integ = sat(integ + ki * e, 32);
    end
    @(posedge clk); #1;
    check(longint'(ctrl) == e_ctrl, "output matches reference filter");
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++)
      step(int'($urandom_range(0, 200)) - 100, (i / 500) % 2 == 0, $urandom_range(0, 3) == 0);
    for (int i = 0; i < 16000; i++) step(511, 1, 1);
    check(ctrl == 20'sh7FFFF, "output saturates at full positive scale");
    for (int i = 0; i < 40000; i++) step(-512, 1, 1);
    check(ctrl == -20'sh80000, "output saturates at full negative scale");
    for (int i = 0; i < 200; i++) step(0, 0, 1);
    check(ctrl == -20'sh80000, "integral held over bandwidth switch");
    finish_tb();
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
