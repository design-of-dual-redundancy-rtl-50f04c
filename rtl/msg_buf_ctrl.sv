// Message buffer logic: moves messages between the two RAMs and the channels.
//
// Memory 1 holds transmit messages in 16-byte slots, memory 2 a ring of
// received messages in slots 0..RX_SLOTS-1 and a status block in the last
// slot. A message takes 13 bytes: byte 0 = {IDE, RTR, 2'b00, DLC}, bytes 1..4
// = {identifier, 3'b000} most significant byte first (a standard identifier
// is in identifier bits 28..18), bytes 5..12 = data bytes 0..7. A received
// message has a 14th byte, the channel it came from (1 or 2).
//
// tx_cmd (one clock, while tx_busy is low) names a slot of memory 1. The
// logic reads the 13 bytes through the memory controller (two clocks per
// byte), then, as soon as the redundancy block is ready, presents the message
// on tx_frame and pulses tx_req; tx_busy stays high until tx_done. A frame
// received by either channel is held in a one-frame holding register and
// written into the ring (channel 1 first when both wait); if the ring is
// full, or a second frame arrives while the holding register of that channel
// is full, it is dropped and rx_overflow
// is set until the next rx_release. rx_release frees the oldest slot, shown on
// rx_rd_slot. When there is nothing else to do, the eight status bytes are
// copied into the status block (bytes STATUS_BASE..STATUS_BASE+7) over and
// over, so the host reads the controller state from memory 2.
// Writes come first, then a pending transmit load, then status. The use of
// the RAMs (transmit buffer, receive buffer, state registers) follows the
// document; the layout and the order are this design's own.
module msg_buf_ctrl
  import can_pkg::*;
#(
  parameter int unsigned AW       = 8,
  parameter int unsigned RX_SLOTS = 2**(AW-4) - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // host commands
  input  logic            tx_cmd,
  input  logic [AW-5:0]   tx_slot,
  output logic            tx_busy,
  input  logic            rx_release,
  output logic [AW-5:0]   rx_rd_slot,
  output logic [AW-4:0]   rx_count,
  output logic            rx_overflow,
  // redundancy block / channels
  output can_frame_t      tx_frame,
  output logic            tx_req,
  input  logic            rmb_ready,
  input  logic            tx_done,
  input  logic [1:0]      rx_valid,
  input  can_frame_t      rx_frame1,
  input  can_frame_t      rx_frame2,
  input  logic [7:0][7:0] status,
  // memory controller, requester 2
  output logic            rd21, wr22,
  output logic [AW-1:0]   addr,
  output logic [7:0]      wdata,
  input  logic            gnt2,
  input  logic [7:0]      rdata
);

  localparam logic [AW-5:0] STATUS_SLOT = (AW-4)'(2**(AW-4) - 1);

  typedef enum logic [2:0] {B_IDLE, B_LOAD_REQ, B_LOAD_WAIT, B_RX_WR, B_STAT_WR} buf_state_t;

  buf_state_t      st;
  logic [3:0]      idx;
  logic [12:0][7:0] tbytes;
  logic            cmd_pend, loaded, inflight;
  logic [AW-5:0]   cmd_slot, wr_slot;
  logic [1:0]      hold_v;
  can_frame_t      hold [2];
  logic            src;          // holding register being written

  function automatic logic [7:0] frame_byte(input can_frame_t f, input logic [3:0] i);
    logic [31:0] idw;
    idw = {f.id, 3'b000};
    unique case (i)
      4'd0:    frame_byte = {f.ide, f.rtr, 2'b00, f.dlc};
      4'd1:    frame_byte = idw[31:24];
      4'd2:    frame_byte = idw[23:16];
      4'd3:    frame_byte = idw[15:8];
      4'd4:    frame_byte = idw[7:0];
      default: frame_byte = f.data[3'(i - 4'd5)];
    endcase
  endfunction

  always_comb begin
    tx_frame.ide = tbytes[0][7];
    tx_frame.rtr = tbytes[0][6];
    tx_frame.dlc = tbytes[0][3:0];
    tx_frame.id  = {tbytes[1], tbytes[2], tbytes[3], tbytes[4][7:3]};
    for (int k = 0; k < 8; k++) tx_frame.data[k] = tbytes[5+k];
  end

  assign tx_busy = cmd_pend || loaded || inflight;

  wire ring_full = (rx_count == (AW-3)'(RX_SLOTS));

  always_comb begin
    rd21 = 1'b0; wr22 = 1'b0; addr = '0; wdata = '0;
    unique case (st)
      B_LOAD_REQ: begin rd21 = 1'b1; addr = {cmd_slot, idx}; end
      B_RX_WR: begin
        wr22 = 1'b1; addr = {wr_slot, idx};
        wdata = (idx == 4'd13) ? {7'd0, 1'b1} + {7'd0, src} : frame_byte(hold[src], idx);
      end
      B_STAT_WR: begin wr22 = 1'b1; addr = {STATUS_SLOT, idx}; wdata = status[idx[2:0]]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; idx <= '0; tbytes <= '0; cmd_pend <= 1'b0; loaded <= 1'b0;
      inflight <= 1'b0; cmd_slot <= '0; wr_slot <= '0; rx_rd_slot <= '0;
      rx_count <= '0; rx_overflow <= 1'b0; hold_v <= '0; hold[0] <= '0; hold[1] <= '0;
      src <= 1'b0; tx_req <= 1'b0;
    end else begin
      logic freed, added;
      freed = 1'b0; added = 1'b0;
      tx_req <= 1'b0;

      if (tx_cmd && !tx_busy) begin
        cmd_pend <= 1'b1;
        cmd_slot <= tx_slot;
      end
      if (loaded && rmb_ready && !tx_req) begin
        tx_req   <= 1'b1;
        loaded   <= 1'b0;
        inflight <= 1'b1;
      end
      if (tx_done) inflight <= 1'b0;

      for (int c = 0; c < 2; c++) begin
        if (rx_valid[c]) begin
          if (hold_v[c]) rx_overflow <= 1'b1;
          else begin
            hold[c]   <= (c == 0) ? rx_frame1 : rx_frame2;
            hold_v[c] <= 1'b1;
          end
        end
      end

      unique case (st)
        B_IDLE: begin
          idx <= '0;
          if (hold_v != 2'b00) begin
            if (ring_full) begin
              rx_overflow <= 1'b1;
              hold_v <= 2'b00;
            end else begin
              src <= !hold_v[0];
              st  <= B_RX_WR;
            end
          end else if (cmd_pend) st <= B_LOAD_REQ;
          else st <= B_STAT_WR;
        end
        B_LOAD_REQ: if (gnt2) st <= B_LOAD_WAIT;
        B_LOAD_WAIT: begin
          tbytes[idx] <= rdata;
          if (idx == 4'd12) begin
            st <= B_IDLE; cmd_pend <= 1'b0; loaded <= 1'b1;
          end else begin
            idx <= idx + 1'b1; st <= B_LOAD_REQ;
          end
        end
        B_RX_WR: if (gnt2) begin
          if (idx == 4'd13) begin
            st <= B_IDLE;
            hold_v[src] <= 1'b0;
            wr_slot <= (wr_slot == (AW-4)'(RX_SLOTS - 1)) ? '0 : wr_slot + 1'b1;
            added = 1'b1;
          end else idx <= idx + 1'b1;
        end
        B_STAT_WR: if (gnt2) begin
          if (idx == 4'd7) st <= B_IDLE;
          else idx <= idx + 1'b1;
        end
        default: st <= B_IDLE;
      endcase

      if (rx_release && rx_count != '0) begin
        freed = 1'b1;
        rx_rd_slot <= (rx_rd_slot == (AW-4)'(RX_SLOTS - 1)) ? '0 : rx_rd_slot + 1'b1;
        rx_overflow <= 1'b0;
      end
      rx_count <= rx_count + (AW-3)'(added) - (AW-3)'(freed);
    end
  end

endmodule
