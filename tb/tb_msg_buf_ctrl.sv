// Self-checking testbench of the message buffer logic, run with the memory
// controller and two message RAMs it works through. The testbench is the
// host: it writes a message into a transmit slot of memory 1 and commands it,
// and checks the frame handed to the redundancy block, the request pulse and
// the busy flag; it hands received frames in and reads them back out of the
// ring in memory 2 (all 14 bytes), checks the status block, fills the ring to
// overflow, and frees slots again. Some reads of memory 2 are made while the
// logic is writing it, to exercise the host-first rule.
`timescale 1ns/1ps
module tb_msg_buf_ctrl;
  import can_pkg::*;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic host_wr, host_rd, host_sel;
  logic [AW-1:0] host_addr;
  logic [7:0] host_wdata, host_rdata;
  logic tx_cmd, tx_busy, rx_release, rx_overflow, tx_req, rmb_ready, tx_done;
  logic [AW-5:0] tx_slot, rx_rd_slot;
  logic [AW-4:0] rx_count;
  can_frame_t tx_frame, rxf1, rxf2;
  logic [1:0] rx_valid;
  logic [7:0][7:0] status;
  logic rd21, wr22, gnt2, wr1, rd1, wr2, rd2, mem_req;
  logic [AW-1:0] baddr, am1, am2;
  logic [7:0] bwdata, brdata, dm1, dm2, qm1, qm2;

  msg_buf_ctrl #(.AW(AW)) dut (
    .clk, .rst_n, .tx_cmd, .tx_slot, .tx_busy, .rx_release, .rx_rd_slot, .rx_count,
    .rx_overflow, .tx_frame, .tx_req, .rmb_ready, .tx_done, .rx_valid, .rx_frame1(rxf1),
    .rx_frame2(rxf2), .status, .rd21, .wr22, .addr(baddr), .wdata(bwdata), .gnt2, .rdata(brdata));
  mem_cntrl #(.AW(AW)) u_mc (
    .clk, .rst_n, .wr11(host_wr && !host_sel), .wr12(host_wr && host_sel),
    .rd11(host_rd && !host_sel), .rd12(host_rd && host_sel), .addr_r1(host_addr),
    .wdata_r1(host_wdata), .rdata_r1(host_rdata), .wr21(1'b0), .wr22, .rd21, .rd22(1'b0),
    .addr_r2(baddr), .wdata_r2(bwdata), .rdata_r2(brdata), .gnt2, .wr1, .rd1, .wr2, .rd2,
    .addr_m1(am1), .addr_m2(am2), .wdata_m1(dm1), .wdata_m2(dm2), .rdata_m1(qm1),
    .rdata_m2(qm2), .mem_req);
  msg_ram #(.AW(AW)) u_m1 (.clk, .we(wr1), .re(rd1), .addr(am1), .wdata(dm1), .rdata(qm1));
  msg_ram #(.AW(AW)) u_m2 (.clk, .we(wr2), .re(rd2), .addr(am2), .wdata(dm2), .rdata(qm2));

  task automatic hwrite(input bit sel, input int a, input logic [7:0] d);
    @(negedge clk); host_wr = 1; host_sel = sel; host_addr = AW'(a); host_wdata = d;
    @(negedge clk); host_wr = 0;
  endtask
  task automatic hread(input bit sel, input int a, output logic [7:0] d);
    @(negedge clk); host_rd = 1; host_sel = sel; host_addr = AW'(a);
    @(negedge clk); host_rd = 0; d = host_rdata;
  endtask

  // expected byte image of a frame, written out independently
  function automatic logic [7:0] img(input can_frame_t f, input int i);
    logic [31:0] w;
    w = {f.id, 3'b0};
    if (i == 0) return {f.ide, f.rtr, 2'b00, f.dlc};
    if (i <= 4) return w[8*(4-i) +: 8];
    return f.data[i-5];
  endfunction

  function automatic can_frame_t rnd_frame();
    can_frame_t f;
    f.id = 29'($urandom); f.ide = 1'($urandom); f.rtr = 0; f.dlc = 4'($urandom_range(0, 8));
    for (int k = 0; k < 8; k++) f.data[k] = 8'($urandom);
    return f;
  endfunction

  task automatic give_rx(input int ch, input can_frame_t f);
    @(negedge clk);
    if (ch == 1) rxf1 = f; else rxf2 = f;
    rx_valid[ch-1] = 1;
    @(negedge clk); rx_valid = 0;
  endtask

  task automatic check_slot(input int slot, input can_frame_t f, input int ch, input string what);
    logic [7:0] d;
    int bad;
    bad = 0;
    for (int i = 0; i < 13; i++) begin
      hread(1, slot * 16 + i, d);
      if (d != img(f, i)) bad++;
    end
    hread(1, slot * 16 + 13, d);
    chk(bad == 0 && d == 8'(ch), $sformatf("%s: ring slot %0d (%0d bytes wrong, channel %0d)", what, slot, bad, d));
  endtask

  can_frame_t f, g;
  logic [7:0] d;
  int reqs = 0;
  always @(posedge clk) if (tx_req) reqs <= reqs + 1;

  initial begin
    host_wr = 0; host_rd = 0; host_sel = 0; host_addr = 0; host_wdata = 0;
    tx_cmd = 0; tx_slot = 0; rx_release = 0; rmb_ready = 0; tx_done = 0; rx_valid = 0;
    rxf1 = '0; rxf2 = '0;
    for (int i = 0; i < 8; i++) status[i] = 8'(8'h30 + i);
    repeat (3) @(negedge clk); rst_n = 1;
    // transmit path
    f = rnd_frame();
    for (int i = 0; i < 13; i++) hwrite(0, 3 * 16 + i, img(f, i));
    @(negedge clk); tx_cmd = 1; tx_slot = 4'd3; @(negedge clk); tx_cmd = 0;
    chk(tx_busy, "busy after the command");
    repeat (60) @(negedge clk);
    chk(reqs == 0, "no request while the redundancy block is not ready");
    rmb_ready = 1;
    wait (reqs == 1); @(negedge clk); rmb_ready = 0;
    chk(tx_frame == f, "frame loaded from memory 1");
    @(negedge clk); tx_cmd = 1; tx_slot = 4'd5; @(negedge clk); tx_cmd = 0;
    repeat (60) @(negedge clk);
    chk(reqs == 1 && tx_frame == f, "command ignored while busy");
    chk(tx_busy, "busy until done");
    tx_done = 1; @(negedge clk); tx_done = 0;
    chk(!tx_busy, "idle after tx_done");
    // receive path
    f = rnd_frame(); g = rnd_frame();
    give_rx(2, f);
    give_rx(1, g);
    repeat (80) @(negedge clk);
    chk(rx_count == 2, $sformatf("two frames in the ring (%0d)", rx_count));
    // both were waiting when the logic came back from a status write:
    // channel 1 is served first
    check_slot(0, g, 1, "channel 1 frame");
    check_slot(1, f, 2, "channel 2 frame");
    // status block
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 8; i++) begin hread(1, 240 + i, d); if (d != 8'(8'h30 + i)) bad++; end
      chk(bad == 0, "status block copied into memory 2");
      status[3] = 8'hEE;
      repeat (40) @(negedge clk);
      hread(1, 243, d);
      chk(d == 8'hEE, "status block follows changes");
    end
    // release and overflow
    @(negedge clk); rx_release = 1; @(negedge clk); rx_release = 0;
    chk(rx_count == 1 && rx_rd_slot == 1, "release frees the oldest slot");
    for (int k = 0; k < 14; k++) begin
      give_rx(1 + (k % 2), rnd_frame());
      repeat (40) @(negedge clk);
    end
    chk(rx_count == 15 && !rx_overflow, "ring full with 15 frames");
    give_rx(1, rnd_frame());
    repeat (40) @(negedge clk);
    chk(rx_overflow && rx_count == 15, "overflow when the ring is full");
    @(negedge clk); rx_release = 1; @(negedge clk); rx_release = 0;
    chk(!rx_overflow && rx_count == 14, "release clears the overflow flag");
    // a frame arriving while the host keeps reading memory 2
    f = rnd_frame();
    fork
      give_rx(2, f);
      for (int i = 0; i < 30; i++) hread(1, 240, d);
    join
    repeat (40) @(negedge clk);
    chk(rx_count == 15, "frame stored despite host traffic");
    check_slot(1, f, 2, "frame written around host reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
