// Main state machine of the redundancy management block.
//
// It sends each message on channel 1 and, when channel 1 cannot deliver it,
// aborts it there and sends the same message on channel 2. States, as in the
// state diagram and table of the design:
//   idle1  wait for chan_1_tx_request, then ask channel 1 to send (wait1)
//   wait1  wait until channel 1 has taken the message (chan_1_need_to_tx=1)
//   ch1    channel 1 sending: chan_1_tx_success -> idle1;
//          chan_1_node_error_passive -> abort1
//   abort1 raise chan_1_abort_send, go to wait2
//   wait2  wait until the abort has taken effect (chan_1_need_to_tx=0)
//   idle2  coming from wait2, go straight to wait3 with the same message;
//          otherwise wait for chan_2_tx_request
//   wait3  wait until channel 2 has taken the message (chan_2_need_to_tx=1)
//   ch2    channel 2 sending: chan_2_tx_success -> idle2;
//          chan_2_node_error_passive -> abort2
//   abort2 raise chan_2_abort_send, go to wait4
//   wait4  when chan_2_need_to_tx=0: to idle1 if channel 1 has recovered,
//          otherwise back to idle2 and latch the failure
// chan_x_tx_start is a one-clock request to channel x, issued on entry to
// wait1 or wait3. tx_channel is 1 while channel 2 is the current channel.
// transmission_ack pulses one clock on a successful transmission, tx_fail
// when a message was lost on both channels, switched when channel 1 gives up
// a message to channel 2. While enable is low (normal mode) the machine stays
// in idle1 and does nothing.
// The states and their transitions follow the document. Two conditions are
// this design's reading: the diagram labels both arrows out of wait1
// "need_to_tx=0", so wait1 uses the sense of wait3; and it labels wait4 as
// staying while chan_2_need_to_tx=0 and leaving on 1, which would never end
// once the abort has cleared need_to_tx, so wait4 uses the sense of wait2
// and the state table ("if abort the message ... successfully").
module rmb_main_fsm
  import can_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       chan_1_tx_request,
  input  logic       chan_2_tx_request,
  input  logic       chan_1_need_to_tx,
  input  logic       chan_2_need_to_tx,
  input  logic       chan_1_tx_success,
  input  logic       chan_2_tx_success,
  input  logic       chan_1_node_error_passive,
  input  logic       chan_2_node_error_passive,
  input  logic       chan_1_ok,
  output logic       chan_1_tx_start,
  output logic       chan_2_tx_start,
  output logic       chan_1_abort_send,
  output logic       chan_2_abort_send,
  output logic       tx_channel,
  output logic       transmission_ack,
  output logic       tx_fail,
  output logic       switched,
  output logic       failure_latched,
  input  logic       clear_failure,
  output rmb_state_t state
);

  rmb_state_t st, nx;
  logic from_wait2;

  always_comb begin
    nx = st;
    unique case (st)
      RM_IDLE1:  if (chan_1_tx_request) nx = RM_WAIT1;
      RM_WAIT1:  if (chan_1_need_to_tx) nx = RM_CH1;
      RM_CH1:    if (chan_1_tx_success) nx = RM_IDLE1;
                 else if (chan_1_node_error_passive) nx = RM_ABORT1;
      RM_ABORT1: nx = RM_WAIT2;
      RM_WAIT2:  if (!chan_1_need_to_tx) nx = RM_IDLE2;
      RM_IDLE2:  if (from_wait2 || chan_2_tx_request) nx = RM_WAIT3;
      RM_WAIT3:  if (chan_2_need_to_tx) nx = RM_CH2;
      RM_CH2:    if (chan_2_tx_success) nx = RM_IDLE2;
                 else if (chan_2_node_error_passive) nx = RM_ABORT2;
      RM_ABORT2: nx = RM_WAIT4;
      RM_WAIT4:  if (!chan_2_need_to_tx) nx = chan_1_ok ? RM_IDLE1 : RM_IDLE2;
      default:   nx = RM_IDLE1;
    endcase
    if (!enable) nx = RM_IDLE1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= RM_IDLE1;
      from_wait2 <= 1'b0;
      chan_1_tx_start <= 1'b0; chan_2_tx_start <= 1'b0;
      transmission_ack <= 1'b0; tx_fail <= 1'b0; switched <= 1'b0;
      failure_latched <= 1'b0;
    end else begin
      st <= nx;
      if (st == RM_WAIT2) from_wait2 <= 1'b1;
      else if (st == RM_IDLE2) from_wait2 <= 1'b0;
      chan_1_tx_start  <= enable && (st == RM_IDLE1) && (nx == RM_WAIT1);
      chan_2_tx_start  <= enable && (st == RM_IDLE2) && (nx == RM_WAIT3);
      transmission_ack <= enable && (((st == RM_CH1) && chan_1_tx_success) ||
                                     ((st == RM_CH2) && chan_2_tx_success));
      tx_fail          <= enable && (st == RM_WAIT4) && !chan_2_need_to_tx;
      switched         <= enable && (st == RM_WAIT2) && !chan_1_need_to_tx;
      if (clear_failure) failure_latched <= 1'b0;
      else if (enable && st == RM_WAIT4 && !chan_2_need_to_tx && !chan_1_ok) failure_latched <= 1'b1;
    end
  end

  assign chan_1_abort_send = (st == RM_ABORT1);
  assign chan_2_abort_send = (st == RM_ABORT2);
  assign tx_channel = (st inside {RM_IDLE2, RM_WAIT3, RM_CH2, RM_ABORT2, RM_WAIT4});
  assign state = st;

endmodule
