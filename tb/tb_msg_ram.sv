// Self-checking testbench of the message RAM: fills every byte with a
// pseudo-random pattern, reads it back with the one-clock read latency, and
// checks that rdata holds its value when no read is made.
`timescale 1ns/1ps
module tb_msg_ram;
  localparam int AW = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic we, re;
  logic [AW-1:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [2**AW];
  msg_ram #(.AW(AW)) dut (.clk, .we, .re, .addr, .wdata, .rdata);
  initial begin
    we = 0; re = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1; addr = AW'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 2**AW - 1; i >= 0; i--) begin
      @(negedge clk); re = 1; addr = AW'(i);
      @(negedge clk); re = 0;
      chk(rdata == model[i], $sformatf("byte %0d", i));
    end
    @(negedge clk); addr = 8'h10;
    @(negedge clk); chk(rdata == model[0], "rdata holds without a read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
