// Self-checking testbench of the redundancy management block. Each channel is
// a small behavioural model here: a request raises need_to_tx; a healthy
// channel reports success after 20 clocks, a broken one turns error passive
// after 30 clocks and keeps the message until it is aborted. Checks:
// redundancy mode with channel 1 broken (message moved to channel 2 and
// delivered, switch and transmit times latched from the time counter), the
// next message staying on channel 2, both channels broken (tx_fail, failure
// latched), and normal mode (request, success and abort routed to the chosen
// channel only).
`timescale 1ns/1ps
module tb_rmb;
  import can_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic red_mode, chan_sel, tx_req, host_abort, clr;
  logic ready, tx_done, tx_success, ack, tx_fail, switched, tx_channel, flat;
  rmb_state_t state;
  logic [1:0] chan_ok, fail_seen, ch_tx_req, ch_abort, need, succ, ep, boff;
  logic [15:0] tx_time, switch_time;
  logic [1:0] broken;

  rmb #(.TIME_W(16)) dut (
    .clk, .rst_n, .red_mode, .chan_sel, .tx_req, .host_abort, .clear_failure(clr), .ready,
    .tx_done, .tx_success, .transmission_ack(ack), .tx_fail, .switched, .tx_channel,
    .failure_latched(flat), .state, .chan_ok, .fail_seen, .tx_time, .switch_time,
    .ch_tx_req, .ch_abort, .ch_need_to_tx(need), .ch_tx_success(succ),
    .ch_error_passive(ep), .ch_bus_off(boff));

  // behavioural channels
  int busy [2];
  int reqs [2];
  // mirror of the block's time counter
  int tcnt;
  always @(posedge clk or negedge rst_n) if (!rst_n) tcnt <= 0; else tcnt <= tcnt + 1;
  for (genvar c = 0; c < 2; c++) begin : g_ch
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin need[c] <= 0; succ[c] <= 0; ep[c] <= 0; busy[c] <= 0; reqs[c] <= 0; end
      else begin
        succ[c] <= 0;
        if (!broken[c]) ep[c] <= 0;
        if (ch_tx_req[c] && !need[c]) begin need[c] <= 1; busy[c] <= 0; reqs[c] <= reqs[c] + 1; end
        else if (need[c]) begin
          busy[c] <= busy[c] + 1;
          if (ch_abort[c]) need[c] <= 0;
          else if (!broken[c] && busy[c] == 20) begin succ[c] <= 1; need[c] <= 0; end
          else if (broken[c] && busy[c] == 30) ep[c] <= 1;
        end
      end
    end
  end
  assign boff = 2'b00;

  // result monitor: every tx_done pulse is counted with its outcome
  int done_cnt = 0;
  int sw_cnt = 0, sw_t, last_t;
  bit last_ok, last_fail, last_ack;
  always @(posedge clk) if (tx_done) begin
    done_cnt <= done_cnt + 1;
    last_ok <= tx_success; last_fail <= tx_fail; last_ack <= ack;
    last_t <= tcnt;
  end
  always @(posedge clk) if (switched) begin sw_cnt <= sw_cnt + 1; sw_t <= tcnt; end
  task automatic wait_done();
    int n;
    n = done_cnt;
    wait (done_cnt == n + 1);
    @(negedge clk);
  endtask

  task automatic send();
    @(negedge clk iff ready);
    tx_req = 1; @(negedge clk); tx_req = 0;
  endtask

  initial begin
    red_mode = 1; chan_sel = 0; tx_req = 0; host_abort = 0; clr = 0; broken = 2'b00;
    repeat (3) @(negedge clk); rst_n = 1;
    // healthy channel 1
    send();
    wait_done();
    chk(last_ok && last_ack && !last_fail, "message delivered on channel 1");
    chk(tx_time == 16'(last_t), "tx_time latched on success");
    chk(reqs[0] == 1 && reqs[1] == 0, "only channel 1 used");
    // broken channel 1
    broken = 2'b01;
    send();
    wait (sw_cnt == 1);
    @(negedge clk);
    chk(switch_time == 16'(sw_t), "switch_time latched on the switch");
    wait_done();
    chk(last_ok && !last_fail, "message delivered on channel 2 after the switch");
    chk(tx_channel, "tx_channel shows channel 2");
    chk(reqs[0] == 2 && reqs[1] == 1, "message repeated on channel 2");
    chk(!chan_ok[0] && fail_seen[0], "channel 1 reported invalid");
    // next message stays on channel 2
    send();
    wait_done();
    chk(last_ok && reqs[1] == 2 && reqs[0] == 2, "next message sent on channel 2");
    // both broken
    broken = 2'b11;
    send();
    wait_done();
    chk(last_fail && !last_ok, "message lost on both channels");
    chk(flat, "failure latched");
    chk(state == RM_IDLE2, "stays on channel 2 while channel 1 is bad");
    // normal mode: channel 2 selected, then abort
    red_mode = 0; chan_sel = 1; broken = 2'b00;
    repeat (2) @(negedge clk); chk(state == RM_IDLE1, "main machine idle in normal mode");
    send();
    wait_done();
    chk(last_ok && reqs[1] == 4 && reqs[0] == 2, "normal mode: channel 2 used directly");
    chan_sel = 0; broken = 2'b01;
    send();
    repeat (5) @(negedge clk);
    chk(need[0], "normal mode: channel 1 busy");
    host_abort = 1; @(negedge clk); host_abort = 0;
    wait_done();
    chk(last_fail && !last_ok, "normal mode: abort reported as failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
