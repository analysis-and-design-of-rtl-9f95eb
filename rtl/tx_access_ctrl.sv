// tx_access_ctrl: transmitter keying of the mixed voice/data terminal.
//
// Voice and data share one channel; data packets go into the silent gaps.
// In a voice call (voice_mode = 1, channel assigned by the base station) the
// carrier is on only while the speech detector declares speech, so the
// channel is free in the gaps. A pending data packet (data_req) is sent only
// when the channel is sensed free: no busy indication from the base station
// (chan_busy = 0) and no own talk spurt. Once a packet has started it runs to
// pkt_done, and a talk spurt that starts meanwhile waits for it (the packet
// is short, 1000-2000 bits, i.e. 60-125 ms at 16 kb/s).
//
// The rules "carrier suppressed when no speech" and "data only when a gap is
// detected" are from the text. The state machine, the priority of a running
// packet over a new talk spurt and the handshake (data_req held until
// pkt_done, data_grant while sending) are this design's.
//
// Timing: state changes one clk after its cause; carrier_on follows state.
module tx_access_ctrl
  import mt_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      voice_mode,
  input  logic      speech,
  input  logic      data_req,
  input  logic      chan_busy,
  input  logic      pkt_done,
  output logic      carrier_on,
  output logic      data_grant,
  output tx_state_e state
);
  always_ff @(posedge clk) begin
    if (rst) state <= TX_IDLE;
    else begin
      unique case (state)
        TX_IDLE:
          if (voice_mode && speech)                state <= TX_VOICE;
          else if (data_req && !chan_busy)         state <= TX_DATA;
        TX_VOICE:
          if (!(voice_mode && speech))             state <= TX_IDLE;
        TX_DATA:
          if (pkt_done)                            state <= TX_IDLE;
        default:                                   state <= TX_IDLE;
      endcase
    end
  end

  assign carrier_on = (state != TX_IDLE);
  assign data_grant = (state == TX_DATA);

  // A packet is never started on a busy channel.
  assert property (@(posedge clk) disable iff (rst)
    (state == TX_IDLE && chan_busy) |=> state != TX_DATA)
    else $error("data packet started on a busy channel");
endmodule
