// tb_phase_shifter_90: the twisted ring must step 00,10,11,01 on each tick,
// hold without tick, give a period of four ticks and keep u2 one tick
// behind u1 (90 degrees).
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_phase_shifter_90;
  logic clk = 0, rst = 1, tick = 0;
  logic u1, u2;
  always #5 clk = ~clk;
  phase_shifter_90 dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  int st = 0;            // model state index in the sequence
  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
  logic u1_prev_tick;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check({u1, u2} == 2'b00, "reset state 00");
    for (int i = 0; i < 400; i++) begin
      tick = ($urandom_range(0, 2) == 0);
      u1_prev_tick = u1;
      @(posedge clk);
      if (tick) st = (st + 1) % 4;
      @(negedge clk);
      check({u1, u2} == seq[st], "state sequence 00-10-11-01");
      if (tick) check(u2 == u1_prev_tick, "u2 is u1 one tick later");
    end
    finish_tb();
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
