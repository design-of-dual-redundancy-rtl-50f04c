// Self-checking testbench of the main redundancy state machine. It walks
// every transition of the state diagram: a message delivered on channel 1;
// a message that fails on channel 1 (abort, wait for the abort, direct move
// to channel 2) and is delivered there; a new message on channel 2; a failure
// on channel 2 with channel 1 recovered (back to idle1) and without (back to
// idle2, failure latched); the stay-conditions of every wait state; and the
// disabled (normal) mode. Outputs are compared with the state table.
`timescale 1ns/1ps
module tb_rmb_main_fsm;
  import can_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic en, r1, r2, n1, n2, s1, s2, p1, p2, ok1, clr;
  logic st1, st2, ab1, ab2, txc, ack, fail, sw, flat;
  rmb_state_t state;
  rmb_main_fsm dut (
    .clk, .rst_n, .enable(en), .chan_1_tx_request(r1), .chan_2_tx_request(r2),
    .chan_1_need_to_tx(n1), .chan_2_need_to_tx(n2), .chan_1_tx_success(s1),
    .chan_2_tx_success(s2), .chan_1_node_error_passive(p1), .chan_2_node_error_passive(p2),
    .chan_1_ok(ok1), .chan_1_tx_start(st1), .chan_2_tx_start(st2),
    .chan_1_abort_send(ab1), .chan_2_abort_send(ab2), .tx_channel(txc),
    .transmission_ack(ack), .tx_fail(fail), .switched(sw), .failure_latched(flat),
    .clear_failure(clr), .state);

  task automatic step(); @(negedge clk); endtask
  task automatic expect_state(input rmb_state_t s, input string what);
    chk(state == s, $sformatf("%s: state %s, expected %s", what, state.name(), s.name()));
  endtask

  initial begin
    {en, r1, r2, n1, n2, s1, s2, p1, p2, clr} = '0; ok1 = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    en = 1;
    step(); expect_state(RM_IDLE1, "reset");
    step(); expect_state(RM_IDLE1, "idle1 holds without request");
    // message on channel 1
    r1 = 1; step(); r1 = 0;
    expect_state(RM_WAIT1, "request -> wait1");
    chk(st1 && !st2, "request forwarded to channel 1");
    chk(!txc, "tx_channel low on channel 1");
    step(); expect_state(RM_WAIT1, "wait1 holds while need_to_tx=0");
    n1 = 1; step(); expect_state(RM_CH1, "need_to_tx -> ch1");
    step(); expect_state(RM_CH1, "ch1 holds while sending");
    s1 = 1; n1 = 0; step(); s1 = 0;
    expect_state(RM_IDLE1, "success -> idle1");
    chk(ack, "transmission_ack pulse");
    step(); chk(!ack, "transmission_ack lasts one clock");
    // message fails on channel 1
    r1 = 1; step(); r1 = 0; n1 = 1; step(); expect_state(RM_CH1, "second message in ch1");
    p1 = 1; ok1 = 0; step();
    expect_state(RM_ABORT1, "error passive -> abort1");
    chk(ab1, "chan_1_abort_send in abort1");
    step(); expect_state(RM_WAIT2, "abort1 -> wait2");
    chk(!ab1, "abort lasts one state");
    step(); expect_state(RM_WAIT2, "wait2 holds while need_to_tx=1");
    n1 = 0; step(); expect_state(RM_IDLE2, "abort done -> idle2");
    chk(sw, "switched pulse");
    chk(txc, "tx_channel high on channel 2");
    step(); expect_state(RM_WAIT3, "idle2 goes straight to wait3 after wait2");
    chk(st2, "same message requested on channel 2");
    step(); expect_state(RM_WAIT3, "wait3 holds while need_to_tx=0");
    n2 = 1; step(); expect_state(RM_CH2, "need_to_tx -> ch2");
    s2 = 1; n2 = 0; step(); s2 = 0;
    expect_state(RM_IDLE2, "success on channel 2 -> idle2");
    chk(ack, "transmission_ack for channel 2");
    step(); step(); expect_state(RM_IDLE2, "idle2 holds without chan_2_tx_request");
    // next message goes to channel 2 directly
    r2 = 1; step(); r2 = 0;
    expect_state(RM_WAIT3, "chan_2_tx_request -> wait3");
    n2 = 1; step(); expect_state(RM_CH2, "ch2");
    // channel 2 fails, channel 1 still bad -> idle2 and failure latched
    p2 = 1; step(); expect_state(RM_ABORT2, "error passive -> abort2");
    chk(ab2, "chan_2_abort_send in abort2");
    step(); expect_state(RM_WAIT4, "abort2 -> wait4");
    step(); expect_state(RM_WAIT4, "wait4 holds while need_to_tx=1");
    n2 = 0; step();
    expect_state(RM_IDLE2, "channel 1 not recovered -> idle2");
    chk(flat && fail, "failure latched and tx_fail pulse");
    clr = 1; step(); clr = 0; chk(!flat, "clear_failure");
    // channel 2 fails again, channel 1 recovered -> idle1
    p2 = 0;
    r2 = 1; step(); r2 = 0; n2 = 1; step(); expect_state(RM_CH2, "ch2 again");
    p2 = 1; ok1 = 1; p1 = 0; step(); step(); n2 = 0; step();
    expect_state(RM_IDLE1, "channel 1 recovered -> idle1");
    chk(!flat, "no failure latched when channel 1 is back");
    chk(!txc, "back on channel 1");
    // disabled: stays in idle1
    p2 = 0; en = 0; r1 = 1; step(); step(); r1 = 0;
    expect_state(RM_IDLE1, "disabled machine stays idle");
    chk(!st1, "no request issued when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
