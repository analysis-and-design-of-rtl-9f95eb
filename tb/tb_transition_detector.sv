// tb_transition_detector: random NRZ data against a reference of the delay
// flip-flop, the XOR and the set/reset stretcher; the pulse must last at most
// one 1.92 MHz period (5 master clocks) and the stretched level must hold until
// the in-phase clock edge.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_transition_detector;
  logic clk = 0, rst = 1, tick_sys = 0, data_in = 0, bit_strobe = 0;
  logic trans, seen;
  always #5 clk = ~clk;
  transition_detector dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  logic m_dly = 0, m_seen = 0;
  int pre = 0, plen = 0, ntr = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk);
      tick_sys = (pre == 4);
      pre = (pre + 1) % 5;
      bit_strobe = (i % 600 == 599);
      if (i % 150 == 17 && $urandom_range(0, 1) == 1) data_in = ~data_in;
      #1;
      check(trans == (data_in ^ m_dly), "transition pulse = data xor delayed data");
      if (trans) plen++; else begin
        if (plen > 0) begin check(plen >= 1 && plen <= 5, "pulse lasts at most one reference period"); ntr++; end
        plen = 0;
      end
      @(posedge clk);
      if (trans) m_seen = 1; else if (bit_strobe) m_seen = 0;
      if (tick_sys) m_dly = data_in;
      #1 check(seen == m_seen, "stretched level held until in-phase edge");
    end
    check(ntr > 100, "transitions seen");
    finish_tb();
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
