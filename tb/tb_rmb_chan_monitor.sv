// Self-checking testbench of the channel monitor: valid -> passive -> valid,
// valid -> bus off -> passive -> valid, the one-clock delay of chan_ok, and
// the fail_seen latch with its clear.
`timescale 1ns/1ps
module tb_rmb_chan_monitor;
  import can_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic ep, bo, clr, ok, seen;
  chan_mon_state_t ms;
  rmb_chan_monitor dut (.clk, .rst_n, .error_passive(ep), .bus_off(bo), .clear(clr),
                        .chan_ok(ok), .fail_seen(seen), .mon_state(ms));
  initial begin
    ep = 0; bo = 0; clr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); chk(ok && !seen && ms == CM_VALID, "valid after reset");
    ep = 1; chk(ok, "chan_ok still high in the same clock");
    @(negedge clk); chk(!ok && ms == CM_PASSIVE, "error passive -> not valid");
    @(negedge clk); chk(seen, "fail_seen latched");
    ep = 0; @(negedge clk); chk(ok && ms == CM_VALID, "error active again -> valid");
    chk(seen, "fail_seen stays");
    clr = 1; @(negedge clk); clr = 0; chk(!seen, "fail_seen cleared");
    bo = 1; ep = 0; @(negedge clk); chk(!ok && ms == CM_BUS_OFF, "bus off");
    bo = 0; ep = 1; @(negedge clk); chk(!ok && ms == CM_PASSIVE, "bus off left to passive");
    ep = 0; @(negedge clk); chk(ok && ms == CM_VALID, "valid again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
