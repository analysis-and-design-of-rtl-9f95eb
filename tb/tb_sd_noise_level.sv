// tb_sd_noise_level: random power and constancy inputs against a reference of
// the noise-level update: when the level is constant and not above the
// estimate, the estimate takes it (ASN) and the threshold becomes 3.75 times
// it; otherwise the estimate rises by delta per sample, saturating.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_sd_noise_level;
  logic clk = 0, rst = 1, in_valid = 0, c = 0;
  logic [17:0] p = 0, cnle;
  logic [19:0] ct;
  logic [11:0] ct_int;
  logic asn;
  always #5 clk = ~clk;
  sd_noise_level dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  longint mc = 262143, mt = 0;
  bit ma;
  int nasn = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    #1 check(cnle == 18'h3FFFF && ct == 0, "reset state");
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      c = $urandom_range(0, 1);
      p = (i < 10000) ? 18'($urandom_range(0, 262143)) : 18'($urandom_range(0, 8000));
      if (in_valid) begin
        ma = c && (longint'(p) <= mc);
        if (ma) begin mc = p; mt = 4 * longint'(p) - longint'(p) / 4; nasn++; end
        else mc = (mc + 1 > 262143) ? 262143 : mc + 1;
      end
      @(posedge clk); #1;
      if (in_valid) check(asn == ma, "ASN decision");
      check(longint'(cnle) == mc && longint'(ct) == mt && longint'(ct_int) == (mt >> 8), "estimate and threshold");
    end
    $display("ASN updates %0d", nasn);
    check(nasn > 100, "ASN updates occurred");
    finish_tb();
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
