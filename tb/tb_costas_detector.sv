// tb_costas_detector: square-wave IF and VCO signals (period 32 clks) at a
// swept phase offset. I and Q are checked against agreement counts made here
// over the same window, the error against sign(I)*(-Q); the error must be
// positive for a small IF lead, negative for a small lag, zero at 0 and pi,
// and repeat with period pi (saw-tooth).
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_costas_detector;
  logic clk = 0, rst = 1;
  logic if_in = 0, u1 = 0, u2 = 0;
  logic signed [9:0] i_val, q_val, err;
  logic valid;
  always #5 clk = ~clk;
  costas_detector dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  int ph = 0;     // IF lead in 1/32 cycle
  int t = 0;
  int ia = 0, qa = 0, ei, eq, ee;
  int err_at [32];
  always @(negedge clk) begin
    if (!rst) begin
      t++;
      if_in = ((t + ph) % 32) < 16;
      u1    = (t % 32) < 16;
      u2    = ((t + 32 - 8) % 32) < 16;
    end
  end
  always @(posedge clk) if (!rst) begin
    ia += (if_in == u1); qa += (if_in == u2);
  end
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int p = 0; p < 32; p++) begin
      ph = p;
      @(posedge valid);      // discard the window that saw the change
      ia = 0; qa = 0;
      @(posedge valid);
      #1;
      // the window that ended: counts include this edge's sample
      ei = 2 * ia - 256; eq = 2 * qa - 256;
      ee = (ei >= 0) ? -eq : eq;
      check(int'(i_val) == ei && int'(q_val) == eq, "I and Q agreement counts");
      check(int'(err) == ee, "error = hard-limited I times Q");
      err_at[p] = int'(err);
      ia = 0; qa = 0;
    end
    check(err_at[0] == 0 && err_at[16] == 0, "zero error at 0 and pi");
    check(err_at[2] > 0 && err_at[30] < 0, "sign: positive when IF leads");
    // p = 8 has I = 0 exactly, where the sign decision is a tie
    for (int p = 0; p < 16; p++) if (p != 8) check(err_at[p] == err_at[p + 16], "period pi");
    check(err_at[7] > err_at[2], "saw-tooth rises towards pi/2");
    finish_tb();
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
