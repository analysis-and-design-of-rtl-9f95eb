// tb_sd_constancy: random power estimates against a reference of the
// long-term average (2^11 samples) and the mean-deviation filter (2^10);
// a steady level must be judged constant (c = 1) and a level that jumps
// between two values must not.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_sd_constancy;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [17:0] p = 0, p_lt, dev;
  logic c;
  always #5 clk = ~clk;
  sd_constancy dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  longint lt = 0, dv = 0, plt, ad, edev;
  bit ec;
  function automatic longint lpf(input longint y, input longint x, input int s);
    longint n = y + ((((x <<< 8)) - y) >>> s);
    return n < 0 ? 0 : n;
  endfunction
  task automatic sample(input int v);
    @(negedge clk); p = 18'(v); in_valid = 1;
    plt = lt >>> 8;
    ad = (v > plt) ? v - plt : plt - v;
    @(negedge clk); in_valid = 0;
    lt = lpf(lt, v, 11);
    dv = lpf(dv, ad, 10);
    plt = lt >>> 8; edev = dv >>> 8;
    ec = (longint'(p) - (edev <<< 3)) > 0;
    check(longint'(p_lt) == plt && longint'(dev) == edev && c == ec, "matches reference filters");
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) sample($urandom_range(0, 5000));
    for (int i = 0; i < 20000; i++) sample(3000 + $urandom_range(0, 200));
    check(c == 1, "steady level judged constant");
    for (int i = 0; i < 8000; i++) sample((i / 200) % 2 ? 6000 : 200);
    check(c == 0, "jumping level judged not constant");
    finish_tb();
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
