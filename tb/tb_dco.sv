// tb_dco: the oscillator word must be the nominal 4x455 kHz word plus the
// AFC and Costas corrections, clamped at the ends, and the carry rate counted
// over 10 ms must equal word*f_clk/2^24 (the quadrature clock runs at four
// times the carrier).
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_dco;
  logic clk = 0, rst = 1;
  logic [7:0] afc_code = 128;
  logic signed [19:0] costas_ctrl = 0;
  logic tick;
  logic [23:0] fcw;
  always #52.083 clk = ~clk;
  dco dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  localparam longint FCW0 = (4 * 455000 * (64'd1 << 24) + 4_800_000) / 9_600_000;
  longint e_fcw;
  int ticks, e_ticks;
  task automatic measure(input int a, input int c);
    afc_code = 8'(a); costas_ctrl = 20'(c);
    e_fcw = FCW0 + (a - 128) * 3000 + c;
    if (e_fcw < 0) e_fcw = 0;
    if (e_fcw > 24'hFFFFFF) e_fcw = 24'hFFFFFF;
    #1 check(longint'(fcw) == e_fcw, "control word = nominal + AFC*gain + Costas");
    @(posedge clk);
    ticks = 0;
    repeat (96000) begin @(posedge clk); ticks += int'(tick); end
    e_ticks = int'((e_fcw * 96000) >> 24);
    $display("afc %0d ctrl %0d: %0d ticks in 10 ms, expected %0d", a, c, ticks, e_ticks);
    check(ticks >= e_ticks - 1 && ticks <= e_ticks + 1, "tick rate = word * f_clk / 2^24");
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    measure(128, 0);
    check(ticks >= 18199 && ticks <= 18201, "nominal 4 x 455 kHz");
    measure(200, 0);
    measure(10, 0);
    measure(128, 123456);
    measure(128, -200000);
    measure(0, -524288);
    measure(255, 524287);
    finish_tb();
  end
  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
