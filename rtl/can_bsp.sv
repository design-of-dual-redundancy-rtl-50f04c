// Bit stream processor (BSP) of one CAN channel, CAN 2.0A and 2.0B.
//
// The BSP works on the bit strobes of the bit timing logic. At every sample
// point it takes the received bit, removes stuff bits, runs the CRC-15, parses
// the frame field by field (standard and extended format, data and remote
// frames), and detects bit, stuff, CRC, form and acknowledgement errors. The
// same parser follows the frames this node sends: the transmitter compares
// every bit it sent with the bit on the bus, loses arbitration quietly when it
// sent recessive and reads dominant inside the arbitration field, and takes
// any other difference as a bit error. At every transmit point it puts the
// next bit on the line: start of frame, the fields of the latched message,
// stuff bits, its CRC, the dominant acknowledgement of a receiver that found
// no CRC error, or an active (dominant) or passive (recessive) error flag.
//
// Fault confinement follows CAN 2.0: a transmitter that signals an error adds
// 8 to its transmit error counter (an error-passive transmitter that only
// missed the acknowledgement adds nothing), a receiver adds 1 to its receive
// error counter, a successful transmission or reception takes 1 off. Above
// 127 the node is error passive, above 255 bus off; it returns from bus off
// after 128 runs of 11 recessive bits. A failed frame is sent again
// automatically until it succeeds or is aborted. An error-passive node that
// has transmitted waits 8 more bits (suspend transmission) before it may
// start again. A node with a frame waiting that samples a dominant third
// intermission bit takes it as start of frame and sends its identifier from
// the next bit. Overload frames are not generated: a dominant bit in the
// first two intermission bits is also taken as a start of frame.
//
// Interface: tx_req (one clock) latches tx_frame and raises need_to_tx, which
// falls after a successful transmission (tx_success, one clock) or after an
// abort (abort_req): an abort takes effect at once when no frame of this node
// is on the bus, otherwise when that frame ends in error or success. A frame
// received from another node whose identifier matches acc_code on the bits
// set in acc_mask is presented on rx_frame with rx_valid for one clock.
// soft_rst puts the node back to bus integration with both counters cleared.
// The protocol behaviour is that of CAN 2.0, which the document builds on;
// the interface signals are this design's own.
module can_bsp
  import can_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst,
  // bit timing
  input  logic        sample,
  input  logic        rx_bit,
  input  logic        tx_point,
  output logic        tx,          // bit driven on the bus
  output logic        bus_idle,    // hard synchronisation allowed
  // transmit side
  input  logic        tx_req,
  input  can_frame_t  tx_frame,
  input  logic        abort_req,
  output logic        need_to_tx,
  output logic        tx_success,
  output logic        tx_error,    // this node signalled an error while transmitting
  output logic        ack_error,
  output logic        arb_lost,
  output logic        transmitting,
  // receive side
  input  logic [28:0] acc_code,
  input  logic [28:0] acc_mask,
  output logic        rx_valid,
  output can_frame_t  rx_frame,
  output logic        rx_error,    // this node signalled an error while receiving
  // fault confinement
  output logic [8:0]  tec,
  output logic [7:0]  rec,
  output logic        error_passive,
  output logic        bus_off,
  output bsp_state_t  state
);

  bsp_state_t  st;
  logic [6:0]  cnt;
  logic [7:0]  boff_runs;
  logic        pending, abort_pend, tx_active, was_tx, flag_passive;
  can_frame_t  frm;
  logic [2:0]  stuff_cnt;
  logic        last_bit;
  logic [14:0] crc;
  logic        crc_bad;
  logic [28:0] r_id;
  logic        r_ide, r_rtr;
  logic [3:0]  r_dlc, r_nbytes;
  logic [7:0][7:0] r_data;
  logic        nb;

  assign state         = st;
  assign need_to_tx    = pending;
  assign transmitting  = tx_active;
  assign bus_off       = (st == BS_BUS_OFF);
  assign error_passive = !bus_off && (tec > 9'd127 || rec > 8'd127);
  assign bus_idle      = (st == BS_IDLE) || (st == BS_SUSPEND) || (st == BS_IFS);

  wire in_stuffed = (st inside {[BS_ID_A:BS_CRC]}) || (st == BS_CRC_DEL);
  wire stuff_next = in_stuffed && (stuff_cnt == 3'd5);

  // Next bit to drive, for the field named by the current state
  always_comb begin
    nb = 1'b1;
    if (stuff_next) begin
      nb = tx_active ? !last_bit : 1'b1;
    end else begin
      unique case (st)
        BS_IDLE:     nb = !(pending && !abort_pend);
        BS_ERR_FLAG: nb = flag_passive;
        BS_ACK:      nb = tx_active || crc_bad;
        default: begin
          if (tx_active) begin
            unique case (st)
              BS_ID_A:    nb = frm.id[5'd28 - 5'(cnt)];
              BS_SRR_RTR: nb = frm.ide ? 1'b1 : frm.rtr;
              BS_IDE:     nb = frm.ide;
              BS_ID_B:    nb = frm.id[5'd17 - 5'(cnt)];
              BS_RTR_B:   nb = frm.rtr;
              BS_R1, BS_R0: nb = 1'b0;
              BS_DLC:     nb = frm.dlc[2'd3 - 2'(cnt)];
              BS_DATA:    nb = frm.data[cnt[5:3]][3'd7 - cnt[2:0]];
              BS_CRC:     nb = crc[4'd14 - 4'(cnt)];
              default:    nb = 1'b1;
            endcase
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx <= 1'b1;
    else if (soft_rst) tx <= 1'b1;
    else if (tx_point) tx <= nb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= BS_INTEGRATE; cnt <= '0; boff_runs <= '0;
      pending <= 1'b0; abort_pend <= 1'b0; tx_active <= 1'b0; was_tx <= 1'b0;
      flag_passive <= 1'b0; frm <= '0; stuff_cnt <= '0; last_bit <= 1'b1;
      crc <= '0; crc_bad <= 1'b0; r_id <= '0; r_ide <= 1'b0; r_rtr <= 1'b0;
      r_dlc <= '0; r_nbytes <= '0; r_data <= '0;
      tec <= '0; rec <= '0;
      tx_success <= 1'b0; tx_error <= 1'b0; ack_error <= 1'b0; arb_lost <= 1'b0;
      rx_valid <= 1'b0; rx_frame <= '0; rx_error <= 1'b0;
    end else if (soft_rst) begin
      st <= BS_INTEGRATE; cnt <= '0; boff_runs <= '0;
      pending <= 1'b0; abort_pend <= 1'b0; tx_active <= 1'b0; was_tx <= 1'b0;
      tec <= '0; rec <= '0;
      tx_success <= 1'b0; tx_error <= 1'b0; ack_error <= 1'b0; arb_lost <= 1'b0;
      rx_valid <= 1'b0; rx_error <= 1'b0;
    end else begin
      tx_success <= 1'b0; tx_error <= 1'b0; ack_error <= 1'b0; arb_lost <= 1'b0;
      rx_valid <= 1'b0; rx_error <= 1'b0;

      // host requests
      if (tx_req && !pending) begin
        frm <= tx_frame;
        pending <= 1'b1;
        abort_pend <= 1'b0;
      end else if (abort_req && pending) begin
        abort_pend <= 1'b1;
      end
      if (abort_pend && !tx_active && !(st == BS_IDLE && !tx)) begin
        pending <= 1'b0;
        abort_pend <= 1'b0;
      end

      if (sample) begin
        logic b, sent, err, ackerr, go_sof, frame_ok, lost;
        logic [3:0] dlc_full, nbytes;
        b = rx_bit;
        sent = tx;
        err = 1'b0; ackerr = 1'b0; go_sof = 1'b0; frame_ok = 1'b0; lost = 1'b0;
        dlc_full = '0; nbytes = '0;

        if (stuff_next) begin
          // stuff bit: must be the complement of the previous five
          if (tx_active && sent != b) err = 1'b1;
          else if (b == last_bit) err = 1'b1;
          else begin
            last_bit <= b;
            stuff_cnt <= 3'd1;
          end
        end else begin
          if (tx_active && sent != b) begin
            if (sent && (st inside {BS_ID_A, BS_SRR_RTR, BS_IDE, BS_ID_B, BS_RTR_B})) lost = 1'b1;
            else if (!(st == BS_ACK && sent)) err = 1'b1;
          end
          if (st inside {[BS_ID_A:BS_CRC]}) begin
            if (b == last_bit) stuff_cnt <= stuff_cnt + 3'd1;
            else stuff_cnt <= 3'd1;
            last_bit <= b;
          end
          if (st inside {[BS_ID_A:BS_DATA]}) crc <= crc15_next(crc, b);

          unique case (st)
            BS_INTEGRATE: begin
              if (!b) cnt <= '0;
              else if (cnt == 7'd10) begin st <= BS_IDLE; cnt <= '0; end
              else cnt <= cnt + 1'b1;
            end
            BS_BUS_OFF: begin
              if (!b) cnt <= '0;
              else if (cnt == 7'd10) begin
                cnt <= '0;
                if (boff_runs == 8'd127) begin
                  st <= BS_IDLE; tec <= '0; rec <= '0; boff_runs <= '0;
                end else boff_runs <= boff_runs + 1'b1;
              end else cnt <= cnt + 1'b1;
            end
            BS_IDLE: if (!b) go_sof = 1'b1;
            BS_SUSPEND: begin
              if (!b) go_sof = 1'b1;
              else if (cnt == 7'd7) begin st <= BS_IDLE; cnt <= '0; end
              else cnt <= cnt + 1'b1;
            end
            BS_IFS: begin
              if (!b) go_sof = 1'b1;
              else if (cnt == 7'd2) begin
                st <= (was_tx && error_passive) ? BS_SUSPEND : BS_IDLE;
                cnt <= '0;
              end else cnt <= cnt + 1'b1;
            end
            BS_ID_A: begin
              r_id[5'd28 - 5'(cnt)] <= b;
              if (cnt == 7'd10) begin st <= BS_SRR_RTR; cnt <= '0; end
              else cnt <= cnt + 1'b1;
            end
            BS_SRR_RTR: begin r_rtr <= b; st <= BS_IDE; end
            BS_IDE: begin
              r_ide <= b;
              st <= b ? BS_ID_B : BS_R0;
              cnt <= '0;
            end
            BS_ID_B: begin
              r_id[5'd17 - 5'(cnt)] <= b;
              if (cnt == 7'd17) begin st <= BS_RTR_B; cnt <= '0; end
              else cnt <= cnt + 1'b1;
            end
            BS_RTR_B: begin r_rtr <= b; st <= BS_R1; end
            BS_R1:    st <= BS_R0;
            BS_R0:    begin st <= BS_DLC; cnt <= '0; end
            BS_DLC: begin
              r_dlc[2'd3 - 2'(cnt)] <= b;
              if (cnt == 7'd3) begin
                dlc_full = {r_dlc[3:1], b};
                nbytes = data_bytes(dlc_full, r_rtr);
                r_nbytes <= nbytes;
                st <= (nbytes == 4'd0) ? BS_CRC : BS_DATA;
                cnt <= '0;
              end else cnt <= cnt + 1'b1;
            end
            BS_DATA: begin
              r_data[cnt[5:3]][3'd7 - cnt[2:0]] <= b;
              if (cnt == {r_nbytes[3:0], 3'b000} - 7'd1) begin st <= BS_CRC; cnt <= '0; end
              else cnt <= cnt + 1'b1;
            end
            BS_CRC: begin
              if (b != crc[4'd14 - 4'(cnt)]) crc_bad <= 1'b1;
              if (cnt == 7'd14) begin st <= BS_CRC_DEL; cnt <= '0; end
              else cnt <= cnt + 1'b1;
            end
            BS_CRC_DEL: begin
              if (!b) err = 1'b1;
              st <= BS_ACK;
            end
            BS_ACK: begin
              if (tx_active && b) begin err = 1'b1; ackerr = 1'b1; end
              st <= BS_ACK_DEL;
            end
            BS_ACK_DEL: begin
              if (!b || (crc_bad && !tx_active)) err = 1'b1;
              st <= BS_EOF; cnt <= '0;
            end
            BS_EOF: begin
              if (!b && !(cnt == 7'd6 && !tx_active)) err = 1'b1;
              else if (cnt == 7'd6) begin
                frame_ok = 1'b1;
                st <= BS_IFS; cnt <= '0;
              end else cnt <= cnt + 1'b1;
            end
            BS_ERR_FLAG: begin
              if (cnt == 7'd5) begin st <= BS_ERR_WAIT; cnt <= '0; end
              else cnt <= cnt + 1'b1;
            end
            BS_ERR_WAIT: if (b) begin st <= BS_ERR_DELIM; cnt <= 7'd1; end
            BS_ERR_DELIM: begin
              if (!b) begin st <= BS_ERR_WAIT; cnt <= '0; end
              else if (cnt == 7'd7) begin st <= BS_IFS; cnt <= '0; end
              else cnt <= cnt + 1'b1;
            end
            default: st <= BS_INTEGRATE;
          endcase
        end

        if (lost) begin
          tx_active <= 1'b0;
          arb_lost <= 1'b1;
        end

        if (go_sof) begin
          // start of frame: every node starts parsing, the sender also sends
          st <= BS_ID_A; cnt <= '0;
          // a node that sent the SOF transmits; so does a node with a frame
          // waiting that sees a dominant third intermission bit (CAN 2.0)
          tx_active <= pending && !abort_pend && (!sent || (st == BS_IFS && cnt == 7'd2));
          stuff_cnt <= 3'd1; last_bit <= 1'b0;
          crc <= crc15_next(15'h0, 1'b0);
          crc_bad <= 1'b0;
          r_id <= '0; r_ide <= 1'b0; r_rtr <= 1'b0; r_dlc <= '0; r_data <= '0;
        end

        if (frame_ok) begin
          was_tx <= tx_active;
          tx_active <= 1'b0;
          if (tx_active) begin
            tx_success <= 1'b1;
            pending <= 1'b0;
            abort_pend <= 1'b0;
            if (tec != '0) tec <= tec - 1'b1;
          end else begin
            if (rec > 8'd127) rec <= 8'd120;
            else if (rec != '0) rec <= rec - 1'b1;
            if (((r_id ^ acc_code) & acc_mask) == '0) begin
              rx_valid <= 1'b1;
              rx_frame.id   <= r_id;
              rx_frame.ide  <= r_ide;
              rx_frame.rtr  <= r_rtr;
              rx_frame.dlc  <= r_dlc;
              rx_frame.data <= r_data;
            end
          end
        end

        if (err && !(st inside {BS_ERR_FLAG, BS_ERR_WAIT, BS_ERR_DELIM, BS_INTEGRATE, BS_BUS_OFF})) begin
          flag_passive <= error_passive;
          was_tx <= tx_active;
          tx_active <= 1'b0;
          cnt <= '0;
          st <= BS_ERR_FLAG;
          if (tx_active) begin
            tx_error <= 1'b1;
            ack_error <= ackerr;
            if (abort_pend) begin pending <= 1'b0; abort_pend <= 1'b0; end
            if (!(error_passive && ackerr)) begin
              if (tec + 9'd8 > 9'd255 || tec > 9'd247) begin
                tec <= 9'd256;
                st <= BS_BUS_OFF;
                boff_runs <= '0;
              end else tec <= tec + 9'd8;
            end
          end else begin
            rx_error <= 1'b1;
            if (rec != 8'd255) rec <= rec + 1'b1;
          end
        end
      end
    end
  end

endmodule
