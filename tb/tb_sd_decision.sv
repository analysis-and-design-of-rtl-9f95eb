// tb_sd_decision: random magnitudes and thresholds against a reference of
// the rule "speech once N = 3 consecutive samples exceed the threshold, held
// for H = 1600 samples (200 ms at 8 kHz) after the last such sample"; then
// directed runs of N-1 samples (no detection) and an exact hangover count.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_sd_decision;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [9:0] mag = 0;
  logic [11:0] ct = 0;
  logic speech, onset;
  always #5 clk = ~clk;
  sd_decision dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  int run = 0, hang = 0, held;
  bit eon;
  task automatic sample(input int m, input int t);
    @(negedge clk); mag = 10'(m); ct = 12'(t); in_valid = 1;
    eon = 0;
    if (m > t) begin
      if (run == 2) begin hang = 1600; eon = 1; end else run++;
    end else begin run = 0; if (hang != 0) hang--; end
    @(posedge clk); #1 in_valid = 0;
    check(speech == (hang != 0) && onset == eon, "matches reference decision");
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 30000; i++)
      sample($urandom_range(0, 1023), (i / 3000) % 2 ? 900 : 500);
    for (int i = 0; i < 2000; i++) sample(0, 100);
    check(!speech, "released in silence");
    for (int i = 0; i < 50; i++) begin sample(200, 100); sample(200, 100); sample(0, 100); end
    check(!speech, "runs of N-1 samples ignored");
    sample(200, 100); sample(200, 100); sample(200, 100);
    check(speech, "N samples detect speech");
    held = 0;
    while (speech) begin sample(0, 100); held++; end
    $display("hangover %0d samples", held);
    check(held == 1600, "hangover 1600 samples");
    finish_tb();
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
