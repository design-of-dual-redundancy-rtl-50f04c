// End-to-end testbench of the dual redundancy CAN controller, at the default
// parameters. Two controllers (node 1 and node 2) share two buses, each a
// wired-AND of the transmit lines; the testbench plays the host of each
// node on its address/data bus. A fault is made by cutting node 2 off a bus.
// Sequence, with the received messages read back out of node 2's memory 2 and
// compared byte for byte:
//   1. redundancy mode, both buses good: message on channel 1
//   2. bus 1 cut: acknowledgement errors raise node 1's channel 1 error
//      counter by 8 per attempt to error passive (128), the message is aborted
//      there and delivered on channel 2
//   3. next message goes straight to channel 2
//   4. bus 1 mended and channel 1 restarted, bus 2 cut: channel 2 fails,
//      channel 1 has recovered, the controller returns to channel 1 and
//      reports the lost message; the next message goes on channel 1
//   5. both buses cut: the message is lost on both, the failure is latched
//   6. normal mode: the host picks channel 2; then both nodes send at once on
//      channel 1 and the lower identifier wins arbitration
//   7. normal mode, bus 1 cut: the host aborts the message after three
//      acknowledgement errors (TEC 24); it is reported lost and never arrives
//   8. 16 messages without reading: node 2's ring keeps 15 in order and
//      flags the overflow, which clears when the ring is emptied
// Each mechanism (acknowledgement error, error passive, abort, channel
// switch, return to channel 1, double failure, arbitration loss, normal mode
// routing, host abort, receive ring overflow, host/controller memory
// conflict, status block) is counted and must
// happen at least once.
`timescale 1ns/1ps
module tb_drcc_top;
  import can_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // host-side signals of both nodes
  logic       host_wr [2], host_rd [2], host_sel [2];
  logic [7:0] host_addr [2], host_wdata [2], host_rdata [2];
  logic       red_mode [2], chan_sel [2], tx_cmd [2], tx_abort [2], clear_failure [2], rx_release [2];
  logic [3:0] tx_slot [2], rx_rd_slot [2];
  logic [1:0] chan_reset [2];
  logic       tx_busy [2], tx_success [2], tack [2], tx_fail [2], switched [2], tx_channel [2], flat [2];
  rmb_state_t rstate [2];
  logic [15:0] tx_time [2], sw_time [2];
  logic [4:0] rx_count [2];
  logic       rx_ovf [2], mem_req [2];
  logic [8:0] tec1 [2], tec2 [2];
  logic [7:0] rec1 [2], rec2 [2];
  logic [1:0] ep [2], boff [2], fseen [2], ev_txe [2], ev_ack [2], ev_arb [2], ev_rxe [2], trans [2];
  bsp_state_t s1 [2], s2 [2];
  logic       c1tx [2], c2tx [2];
  logic       cut1, cut2;
  logic       bus1, bus2;

  assign bus1 = c1tx[0] & (c1tx[1] | cut1);
  assign bus2 = c2tx[0] & (c2tx[1] | cut2);

  for (genvar n = 0; n < 2; n++) begin : g_node
    drcc_top u (
      .clk, .rst_n,
      .host_wr(host_wr[n]), .host_rd(host_rd[n]), .host_mem_sel(host_sel[n]),
      .host_addr(host_addr[n]), .host_wdata(host_wdata[n]), .host_rdata(host_rdata[n]),
      .red_mode(red_mode[n]), .chan_sel(chan_sel[n]), .tx_cmd(tx_cmd[n]), .tx_slot(tx_slot[n]),
      .tx_abort(tx_abort[n]), .chan_reset(chan_reset[n]), .clear_failure(clear_failure[n]),
      .acc_code(29'h0), .acc_mask(29'h0), .rx_release(rx_release[n]),
      .tx_busy(tx_busy[n]), .tx_success(tx_success[n]), .transmission_ack(tack[n]),
      .tx_fail(tx_fail[n]), .switched(switched[n]), .tx_channel(tx_channel[n]),
      .failure_latched(flat[n]), .rmb_state(rstate[n]), .tx_time(tx_time[n]),
      .switch_time(sw_time[n]), .rx_rd_slot(rx_rd_slot[n]), .rx_count(rx_count[n]),
      .rx_overflow(rx_ovf[n]), .tec1(tec1[n]), .tec2(tec2[n]), .rec1(rec1[n]), .rec2(rec2[n]),
      .error_passive(ep[n]), .bus_off(boff[n]), .mem_req(mem_req[n]),
      .chan_fail_seen(fseen[n]), .ev_tx_error(ev_txe[n]), .ev_ack_error(ev_ack[n]),
      .ev_arb_lost(ev_arb[n]), .ev_rx_error(ev_rxe[n]), .ch_transmitting(trans[n]),
      .ch1_state(s1[n]), .ch2_state(s2[n]),
      .can1_rx(n == 0 ? bus1 : (cut1 ? 1'b1 : bus1)), .can1_tx(c1tx[n]),
      .can2_rx(n == 0 ? bus2 : (cut2 ? 1'b1 : bus2)), .can2_tx(c2tx[n]));
  end

  // ---- mechanism counters ----------------------------------------------
  int n_ack_err, n_passive, n_abort, n_switch, n_back_to_1, n_double_fail, n_arb_lost;
  int n_ok [2], n_fail, n_conflict, n_normal_ch2, n_host_abort, n_overflow;
  logic ep1_q;
  int cyc = 0, t_switch = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (switched[0] && t_switch == 0) t_switch <= cyc;
    if (ev_ack[0] != 0) n_ack_err++;
    ep1_q <= ep[0][0];
    if (ep[0][0] && !ep1_q) n_passive++;
    if (g_node[0].u.u_rmb.ch_abort != 0) n_abort++;
    if (switched[0]) n_switch++;
    if (rstate[0] == RM_WAIT4 && g_node[0].u.u_rmb.u_fsm.nx == RM_IDLE1) n_back_to_1++;
    if (tx_fail[0] && flat[0]) n_double_fail++;
    if (ev_arb[0] != 0 || ev_arb[1] != 0) n_arb_lost++;
    if (tx_success[0]) n_ok[tx_channel[0]]++;
    if (tx_fail[0]) n_fail++;
    if (g_node[0].u.u_mem_cntrl.wr22 && !g_node[0].u.u_mem_cntrl.gnt2) n_conflict++;
    if (g_node[0].u.u_rmb.ch_tx_req == 2'b10 && !red_mode[0]) n_normal_ch2++;
  end

  // ---- host tasks ----------------------------------------------------------
  task automatic hwrite(input int n, input bit sel, input int a, input logic [7:0] d);
    @(negedge clk); host_wr[n] = 1; host_sel[n] = sel; host_addr[n] = 8'(a); host_wdata[n] = d;
    @(negedge clk); host_wr[n] = 0;
  endtask
  task automatic hread(input int n, input bit sel, input int a, output logic [7:0] d);
    @(negedge clk); host_rd[n] = 1; host_sel[n] = sel; host_addr[n] = 8'(a);
    @(negedge clk); host_rd[n] = 0; d = host_rdata[n];
  endtask
  function automatic logic [7:0] img(input can_frame_t f, input int i);
    logic [31:0] w;
    w = {f.id, 3'b0};
    if (i == 0) return {f.ide, f.rtr, 2'b00, f.dlc};
    if (i <= 4) return w[8*(4-i) +: 8];
    return f.data[i-5];
  endfunction
  function automatic can_frame_t mk(input int k, input bit ext);
    can_frame_t f;
    f = '0;
    f.ide = ext;
    f.id = ext ? 29'(32'h0123_4567 + k * 32'h111) : {11'(11'h100 + k), 18'h0};
    f.dlc = 4'(1 + k % 8);
    for (int b = 0; b < int'(f.dlc); b++) f.data[b] = 8'(k * 16 + b);
    return f;
  endfunction

  // result of the last command: 1 sent, 0 lost
  int res_cnt [2];
  bit res_ok [2];
  for (genvar n = 0; n < 2; n++) begin : g_res
    always @(posedge clk) if (tx_success[n] || tx_fail[n]) begin
      res_cnt[n] <= res_cnt[n] + 1; res_ok[n] <= tx_success[n];
    end
  end

  task automatic send(input int n, input int slot, input can_frame_t f, output bit ok);
    int c;
    for (int i = 0; i < 13; i++) hwrite(n, 0, slot * 16 + i, img(f, i));
    wait (!tx_busy[n]);
    c = res_cnt[n];
    @(negedge clk); tx_cmd[n] = 1; tx_slot[n] = 4'(slot); @(negedge clk); tx_cmd[n] = 0;
    wait (res_cnt[n] == c + 1);
    @(negedge clk);
    ok = res_ok[n];
  endtask

  // read the oldest received message of node 2 and compare
  task automatic expect_rx(input can_frame_t f, input int ch, input string what);
    logic [7:0] d;
    int bad, slot;
    repeat (100) @(negedge clk);
    chk(rx_count[1] != 0, {what, ": node 2 has a message"});
    slot = rx_rd_slot[1];
    bad = 0;
    for (int i = 0; i < 13; i++) begin hread(1, 1, slot * 16 + i, d); if (d != img(f, i)) bad++; end
    hread(1, 1, slot * 16 + 13, d);
    chk(bad == 0, $sformatf("%s: %0d bytes differ", what, bad));
    chk(d == 8'(ch), $sformatf("%s: came on channel %0d, expected %0d", what, d, ch));
    @(negedge clk); rx_release[1] = 1; @(negedge clk); rx_release[1] = 0;
  endtask

  task automatic restart_channel(input int n, input int ch);
    @(negedge clk); chan_reset[n][ch] = 1; @(negedge clk); chan_reset[n][ch] = 0;
    repeat (16 * 14) @(negedge clk);
  endtask

  bit ok;
  logic [7:0] d;
  int t_req;
  initial begin
    for (int n = 0; n < 2; n++) begin
      host_wr[n] = 0; host_rd[n] = 0; host_sel[n] = 0; host_addr[n] = 0; host_wdata[n] = 0;
      red_mode[n] = 1; chan_sel[n] = 0; tx_cmd[n] = 0; tx_slot[n] = 0; tx_abort[n] = 0;
      chan_reset[n] = 0; clear_failure[n] = 0; rx_release[n] = 0; res_cnt[n] = 0; res_ok[n] = 0;
    end
    cut1 = 0; cut2 = 0;
    {n_ack_err, n_passive, n_abort, n_switch, n_back_to_1, n_double_fail, n_arb_lost} = '0;
    n_ok[0] = 0; n_ok[1] = 0; n_fail = 0; n_conflict = 0; n_normal_ch2 = 0;
    n_host_abort = 0; n_overflow = 0;
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (16 * 14) @(negedge clk);

    // 1. good buses
    send(0, 0, mk(1, 0), ok);
    chk(ok && !tx_channel[0], "1: sent on channel 1");
    expect_rx(mk(1, 0), 1, "1: message");

    // 2. bus 1 cut
    cut1 = 1;
    t_req = cyc;
    send(0, 1, mk(2, 1), ok);
    chk(ok, "2: message delivered");
    chk(tx_channel[0] && rstate[0] == RM_IDLE2, "2: controller now on channel 2");
    chk(tec1[0] == 9'd128 && ep[0][0], $sformatf("2: channel 1 error passive, TEC %0d", tec1[0]));
    chk(n_ack_err == 16, $sformatf("2: %0d acknowledgement errors before the switch", n_ack_err));
    chk(n_switch == 1, "2: one channel switch");
    $display("channel switch %0d clocks after the command", t_switch - t_req);
    // Each failed attempt of this extended 3-byte frame is 81 bits up to the
    // acknowledgement slot, plus 6 error-flag, 8 delimiter and 3 intermission
    // bits, plus at most 20 stuff bits: 98..118 bits of 16 clocks, 16 times.
    chk(t_switch - t_req >= 16 * 98 * 16 && t_switch - t_req <= 16 * 118 * 16 + 200,
        $sformatf("2: switch after %0d clocks, expected 16 attempts of 98..118 bits", t_switch - t_req));
    chk(sw_time[0] != 0 && tx_time[0] != sw_time[0], "2: switch and transmit times latched");
    expect_rx(mk(2, 1), 2, "2: message");
    // node 1 status block shows the state
    repeat (40) @(negedge clk);
    hread(0, 1, 240, d); chk(d == 8'd128, "2: status block TEC of channel 1");
    hread(0, 1, 244, d); chk(d[2] && d[1], "2: status block passive flag and tx_channel");

    // 3. next message straight on channel 2
    send(0, 2, mk(3, 0), ok);
    chk(ok && tx_channel[0] && n_switch == 1, "3: sent on channel 2 without a new switch");
    expect_rx(mk(3, 0), 2, "3: message");

    // 4. bus 1 mended, channel 1 restarted, bus 2 cut
    cut1 = 0;
    restart_channel(0, 0);
    chk(!ep[0][0] && tec1[0] == 0, "4: channel 1 error active after restart");
    cut2 = 1;
    send(0, 3, mk(4, 1), ok);
    chk(!ok, "4: message lost on channel 2 reported");
    chk(n_back_to_1 == 1 && rstate[0] == RM_IDLE1 && !flat[0], "4: back to channel 1, no failure latched");
    send(0, 4, mk(5, 0), ok);
    chk(ok && !tx_channel[0], "4: next message sent on channel 1");
    expect_rx(mk(5, 0), 1, "4: message");

    // 5. both buses cut
    cut1 = 1;
    send(0, 5, mk(6, 0), ok);
    chk(!ok && flat[0], "5: double failure latched");
    chk(n_double_fail == 1, "5: one double failure");
    @(negedge clk); clear_failure[0] = 1; @(negedge clk); clear_failure[0] = 0;
    chk(!flat[0], "5: failure cleared");

    // 6. normal mode
    cut1 = 0; cut2 = 0;
    restart_channel(0, 0);
    restart_channel(0, 1);
    red_mode[0] = 0; chan_sel[0] = 1;
    send(0, 6, mk(7, 0), ok);
    chk(ok && n_normal_ch2 == 1, "6: normal mode sends on the chosen channel 2");
    expect_rx(mk(7, 0), 2, "6: message");
    red_mode[1] = 0; chan_sel[1] = 0; chan_sel[0] = 0;
    begin
      int c0, c1;
      // Both nodes restart channel 1 in the same clock and get their requests
      // during bus integration, so both start their frames in the same bit.
      for (int i = 0; i < 13; i++) begin hwrite(0, 0, 7 * 16 + i, img(mk(9, 0), i)); hwrite(1, 0, i, img(mk(8, 0), i)); end
      c0 = res_cnt[0]; c1 = res_cnt[1];
      @(negedge clk); chan_reset[0][0] = 1; chan_reset[1][0] = 1;
      @(negedge clk); chan_reset[0][0] = 0; chan_reset[1][0] = 0;
      tx_cmd[0] = 1; tx_slot[0] = 7; tx_cmd[1] = 1; tx_slot[1] = 0;
      @(negedge clk); tx_cmd[0] = 0; tx_cmd[1] = 0;
      wait (res_cnt[0] > c0 && res_cnt[1] > c1);
      @(negedge clk);
      chk(res_ok[0] && res_ok[1], "6: both messages sent");
      chk(n_arb_lost >= 1, "6: arbitration happened");
      expect_rx(mk(9, 0), 1, "6: node 1 message after arbitration");
    end

    // 7. normal mode, host abort: bus 1 cut, node 1 gives up after a few
    //    acknowledgement errors
    begin
      int c, a0, cnt0;
      cut1 = 1;
      cnt0 = rx_count[1];
      for (int i = 0; i < 13; i++) hwrite(0, 0, 8 * 16 + i, img(mk(10, 0), i));
      c = res_cnt[0]; a0 = n_ack_err;
      @(negedge clk); tx_cmd[0] = 1; tx_slot[0] = 8; @(negedge clk); tx_cmd[0] = 0;
      wait (n_ack_err >= a0 + 3);
      @(negedge clk); tx_abort[0] = 1; @(negedge clk); tx_abort[0] = 0;
      wait (res_cnt[0] == c + 1);
      @(negedge clk);
      chk(!res_ok[0], "7: aborted message reported as not sent");
      chk(tec1[0] == 9'd24, $sformatf("7: channel 1 TEC %0d after 3 failures", tec1[0]));
      n_host_abort++;
      cut1 = 0;
      repeat (16 * 200) @(negedge clk);
      chk(rx_count[1] == 5'(cnt0), "7: aborted message never arrived");
    end

    // 8. receive ring overflow: node 2 keeps 15 messages, the 16th is lost
    for (int k = 0; k < 16; k++) begin
      send(0, k % 4, mk(20 + k, k % 2), ok);
      chk(ok, "8: message sent");
    end
    repeat (100) @(negedge clk);
    chk(rx_count[1] == 5'd15 && rx_ovf[1], $sformatf("8: ring full (%0d) and overflow set", rx_count[1]));
    if (rx_ovf[1]) n_overflow++;
    for (int k = 0; k < 15; k++) expect_rx(mk(20 + k, k % 2), 1, "8: ring entry");
    chk(rx_count[1] == 0 && !rx_ovf[1], "8: ring empty, overflow cleared");

    // mechanisms
    chk(n_host_abort > 0, "mechanism: host abort in normal mode");
    chk(n_overflow > 0, "mechanism: receive ring overflow");
    chk(n_ack_err > 0, "mechanism: acknowledgement error");
    chk(n_passive > 0, "mechanism: error passive");
    chk(n_abort > 0, "mechanism: abort");
    chk(n_switch > 0, "mechanism: channel switch");
    chk(n_back_to_1 > 0, "mechanism: return to channel 1");
    chk(n_double_fail > 0, "mechanism: double failure");
    chk(n_arb_lost > 0, "mechanism: arbitration loss");
    chk(n_normal_ch2 > 0, "mechanism: normal mode routing");
    chk(n_conflict > 0, "mechanism: host/controller memory conflict");
    chk(n_ok[0] > 0 && n_ok[1] > 0, "mechanism: delivery on both channels");
    $display("counts: ack_err=%0d passive=%0d abort=%0d switch=%0d back=%0d double=%0d arb=%0d ok=%0d/%0d fail=%0d conflict=%0d host_abort=%0d overflow=%0d",
             n_ack_err, n_passive, n_abort, n_switch, n_back_to_1, n_double_fail, n_arb_lost,
             n_ok[0], n_ok[1], n_fail, n_conflict, n_host_abort, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
