// tb_sd_highpass: random samples against a reference of the dc-tracking
// high-pass (dc += (x - dc)/2^S, y = x - dc, |y|); a constant input must be
// removed and a tone well above the corner must pass; output one clk after
// in_valid.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_sd_highpass;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [9:0] x = 0, y;
  logic [9:0] mag;
  logic out_valid;
  always #5 clk = ~clk;
  sd_highpass dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  longint dc = 0, hp;
  int ey;
  task automatic sample(input int v);
    @(negedge clk); x = 10'(v); in_valid = 1;
    hp = longint'(v) - (dc >>> 8);
    ey = hp > 511 ? 511 : (hp < -512 ? -512 : int'(hp));
    dc = dc + (((longint'(v) <<< 8) - dc) >>> 5);
    @(posedge clk); #1 in_valid = 0;
    check(out_valid, "output one clk after input");
    check(int'(y) == ey && int'(mag) == (ey < 0 ? -ey : ey), "matches reference high-pass");
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) sample(int'($urandom_range(0, 1023)) - 512);
    for (int i = 0; i < 600; i++) sample(300);
    check(mag <= 1, "constant removed");
    for (int i = 0; i < 400; i++) sample(300 + ((i % 4) < 2 ? 100 : -100));
    check(mag >= 90, "2 kHz tone passes");
    finish_tb();
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
