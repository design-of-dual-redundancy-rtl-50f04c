// One CAN channel of the controller: a bit stream processor driven by its own
// bit timing logic, as each channel box of the block diagram shows (BSP with
// message management, error detection and handling, recovery management,
// acknowledgement and serialisation, next to the BTL). The bus lines are
// can_tx (1 = recessive) and can_rx; the host-side signals are those of
// can_bsp. Timing: one bit lasts BRP*(1+TSEG1+TSEG2) clocks; defaults are
// this design's own choice.
module can_channel
  import can_pkg::*;
#(
  parameter int unsigned BRP   = 2,
  parameter int unsigned TSEG1 = 5,
  parameter int unsigned TSEG2 = 2,
  parameter int unsigned SJW   = 1,
  parameter bit          SAM   = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst,
  input  logic        can_rx,
  output logic        can_tx,
  input  logic        tx_req,
  input  can_frame_t  tx_frame,
  input  logic        abort_req,
  output logic        need_to_tx,
  output logic        tx_success,
  output logic        tx_error,
  output logic        ack_error,
  output logic        arb_lost,
  input  logic [28:0] acc_code,
  input  logic [28:0] acc_mask,
  output logic        rx_valid,
  output can_frame_t  rx_frame,
  output logic        rx_error,
  output logic [8:0]  tec,
  output logic [7:0]  rec,
  output logic        error_passive,
  output logic        bus_off,
  output logic        transmitting,
  output bsp_state_t  state
);

  logic sample, rx_bit, tx_point, bus_idle;

  can_btl #(.BRP(BRP), .TSEG1(TSEG1), .TSEG2(TSEG2), .SJW(SJW), .SAM(SAM)) u_btl (
    .clk, .rst_n, .rx(can_rx), .hard_sync_en(bus_idle), .tx_dominant(!can_tx),
    .sample, .rx_bit, .tx_point
  );

  can_bsp u_bsp (
    .clk, .rst_n, .soft_rst, .sample, .rx_bit, .tx_point, .tx(can_tx), .bus_idle,
    .tx_req, .tx_frame, .abort_req, .need_to_tx, .tx_success, .tx_error, .ack_error,
    .arb_lost, .transmitting, .acc_code, .acc_mask, .rx_valid, .rx_frame, .rx_error,
    .tec, .rec, .error_passive, .bus_off, .state
  );

endmodule
