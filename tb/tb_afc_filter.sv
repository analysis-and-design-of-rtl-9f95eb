// tb_afc_filter: random up/down pulses against a reference counter with the
// mid-scale preset at both ends; the hold input must freeze the count.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_afc_filter;
  logic clk = 0, rst = 1, en = 1, up = 0, dn = 0;
  logic [7:0] code;
  logic wrap;
  always #5 clk = ~clk;
  afc_filter dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  int m = 128, wraps = 0, mw;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      check(int'(code) == m, "count matches reference");
      // drift upward in the first half, downward in the second
      up = ($urandom_range(0, 99) < (i < 10000 ? 70 : 30));
      dn = ($urandom_range(0, 99) < 40);
      en = ($urandom_range(0, 9) != 0);
      @(posedge clk);
      mw = 0;
      if (m == 0 || m == 255) begin m = 128; mw = 1; wraps++; end
      else if (en && up && !dn) m++;
      else if (en && dn && !up) m--;
      #1 check(wrap == mw, "wrap pulse on preset");
    end
    $display("presets seen: %0d", wraps);
    check(wraps >= 2, "both ends reached and preset");
    finish_tb();
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
