// Dual redundancy CAN-bus controller (top level).
//
// Two complete CAN 2.0 channels, each with its own bit stream processor and
// bit timing logic, sit on two independent buses. A redundancy management
// block decides on which channel a message goes out: in redundancy mode every
// message is tried on the current channel and, when that channel turns error
// passive, aborted there and sent again on the other one without any help
// from the host. Messages and state live in two byte-wide RAMs behind a memory
// controller that shares them between the host bus and the controller.
//
// Host interface (all synchronous to clk):
//   host_wr / host_rd with host_mem_sel (0 = memory 1, 1 = memory 2),
//   host_addr and host_wdata; read data on host_rdata one clock after host_rd.
//   Memory 1: transmit slots of 16 bytes. Memory 2: received-message ring and,
//   in its last slot, a status block (see msg_buf_ctrl).
//   tx_cmd with tx_slot starts sending a message of memory 1 (while tx_busy
//   is low); red_mode selects redundancy mode, chan_sel the channel in normal
//   mode; tx_abort aborts in normal mode; chan_reset restarts a channel with
//   cleared error counters; rx_release frees the oldest received message.
// Result pulses: tx_success and transmission_ack (message sent), tx_fail
// (lost on both channels, or aborted in normal mode), switched (moved to
// channel 2). Bus lines: canN_tx drives, canN_rx reads (1 = recessive).
// The block structure follows the document's block diagram; the host
// interface and memory layout are this design's own.
module drcc_top
  import can_pkg::*;
#(
  parameter int unsigned BRP    = 2,
  parameter int unsigned TSEG1  = 5,
  parameter int unsigned TSEG2  = 2,
  parameter int unsigned SJW    = 1,
  parameter int unsigned AW     = 8,
  parameter int unsigned TIME_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // host address/data bus
  input  logic              host_wr,
  input  logic              host_rd,
  input  logic              host_mem_sel,
  input  logic [AW-1:0]     host_addr,
  input  logic [7:0]        host_wdata,
  output logic [7:0]        host_rdata,
  // host control and status
  input  logic              red_mode,
  input  logic              chan_sel,
  input  logic              tx_cmd,
  input  logic [AW-5:0]     tx_slot,
  input  logic              tx_abort,
  input  logic [1:0]        chan_reset,
  input  logic              clear_failure,
  input  logic [28:0]       acc_code,
  input  logic [28:0]       acc_mask,
  input  logic              rx_release,
  output logic              tx_busy,
  output logic              tx_success,
  output logic              transmission_ack,
  output logic              tx_fail,
  output logic              switched,
  output logic              tx_channel,
  output logic              failure_latched,
  output rmb_state_t        rmb_state,
  output logic [TIME_W-1:0] tx_time,
  output logic [TIME_W-1:0] switch_time,
  output logic [AW-5:0]     rx_rd_slot,
  output logic [AW-4:0]     rx_count,
  output logic              rx_overflow,
  output logic [8:0]        tec1, tec2,
  output logic [7:0]        rec1, rec2,
  output logic [1:0]        error_passive,
  output logic [1:0]        bus_off,
  output logic              mem_req,
  output logic [1:0]        chan_fail_seen, // channel has failed since clear_failure
  output logic [1:0]        ev_tx_error,    // per-channel one-clock event strobes
  output logic [1:0]        ev_ack_error,
  output logic [1:0]        ev_arb_lost,
  output logic [1:0]        ev_rx_error,
  output logic [1:0]        ch_transmitting,
  output bsp_state_t        ch1_state,
  output bsp_state_t        ch2_state,
  // CAN buses
  input  logic              can1_rx,
  output logic              can1_tx,
  input  logic              can2_rx,
  output logic              can2_tx
);

  can_frame_t tx_frame, rx_frame1, rx_frame2;
  logic       buf_tx_req, rmb_ready, tx_done;
  logic [1:0] ch_tx_req, ch_abort, ch_need, ch_succ, rx_valid, chan_ok;
  logic [7:0][7:0] status;

  // memories and memory controller
  logic          rd21, wr22, gnt2;
  logic [AW-1:0] buf_addr, addr_m1, addr_m2;
  logic [7:0]    buf_wdata, buf_rdata, wdata_m1, wdata_m2, rdata_m1, rdata_m2;
  logic          wr1, rd1, wr2, rd2;

  mem_cntrl #(.AW(AW)) u_mem_cntrl (
    .clk, .rst_n,
    .wr11(host_wr && !host_mem_sel), .wr12(host_wr && host_mem_sel),
    .rd11(host_rd && !host_mem_sel), .rd12(host_rd && host_mem_sel),
    .addr_r1(host_addr), .wdata_r1(host_wdata), .rdata_r1(host_rdata),
    .wr21(1'b0), .wr22, .rd21, .rd22(1'b0),
    .addr_r2(buf_addr), .wdata_r2(buf_wdata), .rdata_r2(buf_rdata), .gnt2,
    .wr1, .rd1, .wr2, .rd2, .addr_m1, .addr_m2, .wdata_m1, .wdata_m2,
    .rdata_m1, .rdata_m2, .mem_req
  );

  msg_ram #(.AW(AW)) u_mem1 (.clk, .we(wr1), .re(rd1), .addr(addr_m1), .wdata(wdata_m1), .rdata(rdata_m1));
  msg_ram #(.AW(AW)) u_mem2 (.clk, .we(wr2), .re(rd2), .addr(addr_m2), .wdata(wdata_m2), .rdata(rdata_m2));

  assign status[0] = tec1[7:0];
  assign status[1] = rec1;
  assign status[2] = tec2[7:0];
  assign status[3] = rec2;
  assign status[4] = {tec2[8], tec1[8], bus_off[1], error_passive[1], bus_off[0],
                      error_passive[0], tx_channel, failure_latched};
  assign status[5] = {chan_ok, 2'b00, rmb_state};
  assign status[6] = switch_time[TIME_W-1 -: 8];
  assign status[7] = switch_time[7:0];

  msg_buf_ctrl #(.AW(AW)) u_buf (
    .clk, .rst_n, .tx_cmd, .tx_slot, .tx_busy, .rx_release, .rx_rd_slot, .rx_count,
    .rx_overflow, .tx_frame, .tx_req(buf_tx_req), .rmb_ready, .tx_done, .rx_valid,
    .rx_frame1, .rx_frame2, .status, .rd21, .wr22, .addr(buf_addr), .wdata(buf_wdata),
    .gnt2, .rdata(buf_rdata)
  );

  rmb #(.TIME_W(TIME_W)) u_rmb (
    .clk, .rst_n, .red_mode, .chan_sel, .tx_req(buf_tx_req), .host_abort(tx_abort),
    .clear_failure, .ready(rmb_ready), .tx_done, .tx_success, .transmission_ack,
    .tx_fail, .switched, .tx_channel, .failure_latched, .state(rmb_state), .chan_ok,
    .fail_seen(chan_fail_seen), .tx_time, .switch_time, .ch_tx_req, .ch_abort, .ch_need_to_tx(ch_need),
    .ch_tx_success(ch_succ), .ch_error_passive(error_passive), .ch_bus_off(bus_off)
  );

  can_channel #(.BRP(BRP), .TSEG1(TSEG1), .TSEG2(TSEG2), .SJW(SJW)) u_ch1 (
    .clk, .rst_n, .soft_rst(chan_reset[0]), .can_rx(can1_rx), .can_tx(can1_tx),
    .tx_req(ch_tx_req[0]), .tx_frame, .abort_req(ch_abort[0]), .need_to_tx(ch_need[0]),
    .tx_success(ch_succ[0]), .tx_error(ev_tx_error[0]), .ack_error(ev_ack_error[0]),
    .arb_lost(ev_arb_lost[0]), .acc_code, .acc_mask, .rx_valid(rx_valid[0]),
    .rx_frame(rx_frame1), .rx_error(ev_rx_error[0]), .tec(tec1), .rec(rec1),
    .error_passive(error_passive[0]), .bus_off(bus_off[0]),
    .transmitting(ch_transmitting[0]), .state(ch1_state)
  );

  can_channel #(.BRP(BRP), .TSEG1(TSEG1), .TSEG2(TSEG2), .SJW(SJW)) u_ch2 (
    .clk, .rst_n, .soft_rst(chan_reset[1]), .can_rx(can2_rx), .can_tx(can2_tx),
    .tx_req(ch_tx_req[1]), .tx_frame, .abort_req(ch_abort[1]), .need_to_tx(ch_need[1]),
    .tx_success(ch_succ[1]), .tx_error(ev_tx_error[1]), .ack_error(ev_ack_error[1]),
    .arb_lost(ev_arb_lost[1]), .acc_code, .acc_mask, .rx_valid(rx_valid[1]),
    .rx_frame(rx_frame2), .rx_error(ev_rx_error[1]), .tec(tec2), .rec(rec2),
    .error_passive(error_passive[1]), .bus_off(bus_off[1]),
    .transmitting(ch_transmitting[1]), .state(ch2_state)
  );

endmodule
