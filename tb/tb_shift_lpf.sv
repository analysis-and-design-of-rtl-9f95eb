// tb_shift_lpf: random samples against the reference recursion
// y += (x*2^F - y) / 2^S; a step must reach 1 - 1/e of its height after
// 2^S samples (the filter time constant); the output saturates at YMAX.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_shift_lpf;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [9:0] x = 0;
  logic [17:0] y, y2;
  always #5 clk = ~clk;
  shift_lpf dut (.*);
  shift_lpf #(.YMAX(64 << 8)) dut_sat (.clk, .rst, .in_valid, .x, .y(y2));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  longint m = 0, m2 = 0, ym;
  real frac;
  task automatic sample(input int v);
    @(negedge clk); x = 10'(v); in_valid = 1;
    m  = m  + (((longint'(v) <<< 8) - m) >>> 7);
    m2 = m2 + (((longint'(v) <<< 8) - m2) >>> 7);
    if (m2 > (64 << 8)) m2 = 64 << 8;
    @(negedge clk); in_valid = 0;
    check(longint'(y) == m && longint'(y2) == m2, "matches reference recursion");
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) sample($urandom_range(0, 1023));
    for (int i = 0; i < 2000; i++) sample(0);
    check(y == 0, "decays to zero");
    for (int i = 0; i < 128; i++) sample(1000);
    frac = real'(y) / (1000.0 * 256.0);
    $display("step after 2^S samples: %f", frac);
    check(frac > 0.62 && frac < 0.645, "time constant 2^S samples");
    check(y2 == 18'(64 << 8), "saturates at YMAX");
    finish_tb();
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
