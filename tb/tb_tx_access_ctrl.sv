// tb_tx_access_ctrl: random mode, speech, request, busy and end-of-packet
// inputs against a reference state machine; then directed cases: a voice
// spurt keys the carrier and releases it, a data request waits while the
// channel is busy and is granted when it frees, and voice has priority.
// Interface: no ports; the block runs on a free clock with a synchronous
// reset. Expected values come from a reference written here, independently
// of the RTL; the rates and constants checked are those of the design, the
// stimulus is this testbench's own.
`timescale 1ns/1ps
module tb_tx_access_ctrl;
  import mt_pkg::*;
  logic clk = 0, rst = 1;
  logic voice_mode = 0, speech = 0, data_req = 0, chan_busy = 0, pkt_done = 0;
  logic carrier_on, data_grant;
  tx_state_e state;
  always #5 clk = ~clk;
  tx_access_ctrl dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  tx_state_e m = TX_IDLE;
  int n_def = 0, n_v = 0, n_d = 0;
  task automatic cyc();
    @(posedge clk);
    case (m)
      TX_IDLE:  if (voice_mode && speech) m = TX_VOICE;
                else if (data_req && !chan_busy) m = TX_DATA;
                else if (data_req) n_def++;
      TX_VOICE: if (!(voice_mode && speech)) m = TX_IDLE;
      default:  if (pkt_done) m = TX_IDLE;
    endcase
    if (m == TX_VOICE) n_v++;
    if (m == TX_DATA) n_d++;
    #1 check(state == m && carrier_on == (m != TX_IDLE) && data_grant == (m == TX_DATA),
             "matches reference state machine");
  endtask
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      voice_mode = (i / 5000) % 2; speech = $urandom_range(0, 1);
      data_req = $urandom_range(0, 1); chan_busy = $urandom_range(0, 1);
      pkt_done = ($urandom_range(0, 15) == 0);
      cyc();
    end
    check(n_def > 100 && n_v > 100 && n_d > 100, "all states and deferrals reached");
    // directed
    @(negedge clk); voice_mode = 0; speech = 0; data_req = 0; chan_busy = 0; pkt_done = 1; cyc();
    @(negedge clk); pkt_done = 0; data_req = 1; chan_busy = 1;
    repeat (20) cyc();
    check(state == TX_IDLE, "request deferred while channel busy");
    @(negedge clk); chan_busy = 0; cyc();
    check(state == TX_DATA && data_grant, "granted when channel frees");
    @(negedge clk); data_req = 0; pkt_done = 1; cyc();
    @(negedge clk); pkt_done = 0; voice_mode = 1; speech = 1; data_req = 1; cyc();
    check(state == TX_VOICE && carrier_on && !data_grant, "speech keys the carrier first");
    @(negedge clk); speech = 0; data_req = 0; cyc();
    check(state == TX_IDLE && !carrier_on, "carrier released after the spurt");
    finish_tb();
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
endmodule
