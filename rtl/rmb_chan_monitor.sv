// Auxiliary state machine of the redundancy management block: one per
// channel. It watches the fault-confinement state of its channel's BSP and
// reports to the main state machine whether the channel is valid. States:
// VALID (error active), PASSIVE (error passive: the channel has failed to
// deliver, and the main machine will switch away), BUS_OFF. The channel is
// valid again only when its BSP is error active once more. fail_seen latches
// that the channel has ever left VALID, until clear. The document gives the
// job of this machine (watch a channel, report its state); the three states
// are this design's own. Timing: chan_ok follows its inputs by one clock.
module rmb_chan_monitor
  import can_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            error_passive,
  input  logic            bus_off,
  input  logic            clear,
  output logic            chan_ok,
  output logic            fail_seen,
  output chan_mon_state_t mon_state
);

  chan_mon_state_t st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= CM_VALID;
      fail_seen <= 1'b0;
    end else begin
      unique case (st)
        CM_VALID:   if (bus_off) st <= CM_BUS_OFF; else if (error_passive) st <= CM_PASSIVE;
        CM_PASSIVE: if (bus_off) st <= CM_BUS_OFF; else if (!error_passive) st <= CM_VALID;
        CM_BUS_OFF: if (!bus_off) st <= error_passive ? CM_PASSIVE : CM_VALID;
        default:    st <= CM_VALID;
      endcase
      if (clear) fail_seen <= 1'b0;
      else if (st != CM_VALID) fail_seen <= 1'b1;
    end
  end

  assign chan_ok   = (st == CM_VALID);
  assign mon_state = st;

endmodule
