// Redundancy management block (RMB).
//
// In redundancy mode (red_mode=1) the block owns transmission: a request from
// the message buffer goes through the main state machine, which sends the
// message on the current channel and moves it to the other channel when the
// current one turns error passive. Two auxiliary monitors report whether each
// channel is valid; the main machine returns to channel 1 only when channel 2
// fails and channel 1 has recovered. In normal mode (red_mode=0) the block
// stays out of the way: a request goes to the channel chosen by chan_sel, and
// success and abort of that channel are passed back unchanged.
//
// A free-running time counter is latched into tx_time when a message has been
// sent and into switch_time when the machine switches channels, so software
// can measure the channel switching time. All results (tx_done,
// transmission_ack, tx_success, tx_fail, switched) are one-clock pulses.
// ready is high when a new request would be accepted. Structure (main machine,
// two auxiliary machines, glue, latched time counter) follows the document;
// normal-mode routing, the host abort (normal mode only) and the widths are
// this design's own.
module rmb
  import can_pkg::*;
#(
  parameter int unsigned TIME_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              red_mode,
  input  logic              chan_sel,      // normal mode: 0 = channel 1, 1 = channel 2
  input  logic              tx_req,        // one-clock request, only while ready
  input  logic              host_abort,    // normal mode abort
  input  logic              clear_failure,
  output logic              ready,
  output logic              tx_done,
  output logic              tx_success,
  output logic              transmission_ack,
  output logic              tx_fail,
  output logic              switched,
  output logic              tx_channel,
  output logic              failure_latched,
  output rmb_state_t        state,
  output logic [1:0]        chan_ok,
  output logic [1:0]        fail_seen,     // channel has failed since the last clear_failure
  output logic [TIME_W-1:0] tx_time,
  output logic [TIME_W-1:0] switch_time,
  // channel side
  output logic [1:0]        ch_tx_req,
  output logic [1:0]        ch_abort,
  input  logic [1:0]        ch_need_to_tx,
  input  logic [1:0]        ch_tx_success,
  input  logic [1:0]        ch_error_passive,
  input  logic [1:0]        ch_bus_off
);

  logic [TIME_W-1:0] time_cnt;
  logic [1:0] need_q;
  logic start1, start2, abort1, abort2, fsm_ack, fsm_fail, fsm_tx_channel;
  chan_mon_state_t mon1, mon2;

  rmb_chan_monitor u_mon1 (
    .clk, .rst_n, .error_passive(ch_error_passive[0]), .bus_off(ch_bus_off[0]),
    .clear(clear_failure), .chan_ok(chan_ok[0]), .fail_seen(fail_seen[0]), .mon_state(mon1)
  );
  rmb_chan_monitor u_mon2 (
    .clk, .rst_n, .error_passive(ch_error_passive[1]), .bus_off(ch_bus_off[1]),
    .clear(clear_failure), .chan_ok(chan_ok[1]), .fail_seen(fail_seen[1]), .mon_state(mon2)
  );

  // An error-passive or bus-off channel cannot deliver: both count as failed.
  rmb_main_fsm u_fsm (
    .clk, .rst_n, .enable(red_mode),
    .chan_1_tx_request(tx_req), .chan_2_tx_request(tx_req),
    .chan_1_need_to_tx(ch_need_to_tx[0]), .chan_2_need_to_tx(ch_need_to_tx[1]),
    .chan_1_tx_success(ch_tx_success[0]), .chan_2_tx_success(ch_tx_success[1]),
    .chan_1_node_error_passive(mon1 != CM_VALID), .chan_2_node_error_passive(mon2 != CM_VALID),
    .chan_1_ok(chan_ok[0]),
    .chan_1_tx_start(start1), .chan_2_tx_start(start2),
    .chan_1_abort_send(abort1), .chan_2_abort_send(abort2),
    .tx_channel(fsm_tx_channel), .transmission_ack(fsm_ack), .tx_fail(fsm_fail),
    .switched, .failure_latched, .clear_failure, .state
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      time_cnt <= '0; tx_time <= '0; switch_time <= '0; need_q <= '0;
    end else begin
      time_cnt <= time_cnt + 1'b1;
      need_q <= ch_need_to_tx;
      if (tx_success) tx_time <= time_cnt;
      if (switched) switch_time <= time_cnt;
    end
  end

  wire sel_need    = chan_sel ? ch_need_to_tx[1] : ch_need_to_tx[0];
  wire sel_need_q  = chan_sel ? need_q[1] : need_q[0];
  wire sel_success = chan_sel ? ch_tx_success[1] : ch_tx_success[0];

  always_comb begin
    if (red_mode) begin
      ch_tx_req        = {start2, start1};
      ch_abort         = {abort2, abort1};
      tx_channel       = fsm_tx_channel;
      transmission_ack = fsm_ack;
      tx_success       = fsm_ack;
      tx_fail          = fsm_fail;
      tx_done          = fsm_ack || fsm_fail;
      ready            = (state == RM_IDLE1) || (state == RM_IDLE2);
    end else begin
      ch_tx_req        = {tx_req && chan_sel, tx_req && !chan_sel};
      ch_abort         = {host_abort && chan_sel, host_abort && !chan_sel};
      tx_channel       = chan_sel;
      transmission_ack = sel_success;
      tx_success       = sel_success;
      tx_fail          = sel_need_q && !sel_need && !sel_success;
      tx_done          = sel_need_q && !sel_need;
      ready            = !sel_need && !sel_need_q;
    end
  end

endmodule
