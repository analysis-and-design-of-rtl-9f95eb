// tb_rot_freq_comparator: directed quadrant pairs give exactly one pulse of
// the right sign; then square-wave carriers at a known frequency offset give
// a pulse count equal to the number of beat cycles (rate proportional to the
// frequency error), up for an IF above the VCO, down for below, none for
// equal frequencies.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_rot_freq_comparator;
  logic clk = 0, rst = 1;
  logic if_in = 0, u1 = 0, u2 = 0;
  logic fd_up, fd_dn;
  always #5 clk = ~clk;
  rot_freq_comparator dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  int ups = 0, dns = 0;
  always @(posedge clk) begin
    if (fd_up) ups++;
    if (fd_dn) dns++;
    if (fd_up && fd_dn) begin failures++; $display("FAIL: both pulses"); end
  end

  task automatic edge_at(input logic a, input logic b);
    @(negedge clk); u1 = a; u2 = b; if_in = 0;
    @(negedge clk); if_in = 1;
    @(negedge clk); if_in = 1;
    @(negedge clk); if_in = 0;
  endtask

  // phase accumulators for the VCO (quadrant from two MSBs) and IF
  int unsigned vacc, iacc;
  task automatic run_offset(input int unsigned vinc, input int unsigned iinc, input int ncyc);
    vacc = 0; iacc = 32'h4000_0000;
    repeat (ncyc) begin
      @(negedge clk);
      vacc += vinc; iacc += iinc;
      // u1 = carrier, u2 = carrier one quarter later (lagging)
      case (vacc[31:30])
        2'd0: {u1, u2} = 2'b00;
        2'd1: {u1, u2} = 2'b10;
        2'd2: {u1, u2} = 2'b11;
        default: {u1, u2} = 2'b01;
      endcase
      if_in = iacc[31];
    end
  endtask

  int e_beats;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // directed
    edge_at(0, 1); ups = 0; dns = 0;
    edge_at(1, 1); repeat (3) @(posedge clk);
    check(ups == 1 && dns == 0, "(0,1)->(1,1) gives one up pulse");
    ups = 0; dns = 0;
    edge_at(0, 1); repeat (3) @(posedge clk);
    check(dns == 1 && ups == 0, "(1,1)->(0,1) gives one down pulse");
    ups = 0; dns = 0;
    edge_at(1, 0); edge_at(1, 0); edge_at(0, 0); edge_at(1, 0); edge_at(0, 0); repeat (3) @(posedge clk);
    check(ups == 0 && dns == 0, "other steps give no pulse");
    // IF above VCO: IF at 1/40 of clk, VCO 2.5 % lower
    ups = 0; dns = 0;
    run_offset(32'd104715837, 32'd107374182, 200000);
    // beat cycles = (fif - fvco) * cycles / 2^32
    e_beats = int'((64'd107374182 - 64'd104715837) * 200000 / 64'h1_0000_0000);
    $display("IF above: up %0d down %0d expected %0d", ups, dns, e_beats);
    check(ups >= e_beats - 2 && ups <= e_beats + 2 && dns == 0, "IF above VCO: one up pulse per beat");
    ups = 0; dns = 0;
    run_offset(32'd107374182, 32'd102005473, 200000);
    e_beats = int'((64'd107374182 - 64'd102005473) * 200000 / 64'h1_0000_0000);
    $display("IF below: up %0d down %0d expected %0d", ups, dns, e_beats);
    check(dns >= e_beats - 2 && dns <= e_beats + 2 && ups == 0, "IF below VCO: one down pulse per beat");
    ups = 0; dns = 0;
    run_offset(32'd107374182, 32'd107374182, 100000);
    check(ups == 0 && dns == 0, "equal frequencies: no pulses");
    finish_tb();
  end
  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
