// Self-checking testbench of the bit timing logic (BRP=2, TSEG1=5, TSEG2=2,
// SJW=1: 16 clocks per bit). Checks, against numbers worked out from the
// segment lengths: the nominal bit period, the distance from transmit point
// to sample point, hard synchronisation on a falling edge while the bus is
// idle, a late edge lengthening the bit by SJW quanta, an early edge
// shortening it, no resynchronisation while the node sends dominant, and the
// three-sample majority (SAM=1) riding out a one-quantum glitch that a single
// sample (SAM=0) catches.
`timescale 1ns/1ps
module tb_can_btl;
  localparam int BRP = 2, TSEG1 = 5, TSEG2 = 2, SJW = 1;
  localparam int NBT = BRP * (1 + TSEG1 + TSEG2);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rx, hse, txd;
  logic sample, rx_bit, tx_point, sample3, rx_bit3, tx_point3;
  can_btl #(.BRP(BRP), .TSEG1(TSEG1), .TSEG2(TSEG2), .SJW(SJW), .SAM(1'b0)) dut (
    .clk, .rst_n, .rx, .hard_sync_en(hse), .tx_dominant(txd), .sample, .rx_bit, .tx_point);
  can_btl #(.BRP(BRP), .TSEG1(TSEG1), .TSEG2(TSEG2), .SJW(SJW), .SAM(1'b1)) dut3 (
    .clk, .rst_n, .rx, .hard_sync_en(hse), .tx_dominant(txd), .sample(sample3),
    .rx_bit(rx_bit3), .tx_point(tx_point3));

  // cycle counter and strobe times, all recorded in one process
  int cyc = 0;
  int last_sample = 0, sample_gap = 0, last_tp = 0, tp_gap = 0;
  always @(posedge clk) begin
    cyc++;
    if (sample) begin sample_gap = cyc - last_sample; last_sample = cyc; end
    if (tx_point) begin tp_gap = cyc - last_tp; last_tp = cyc; end
  end

  int t_edge, t_s;
  initial begin
    rx = 1; hse = 0; txd = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // nominal timing
    repeat (3) @(posedge clk iff tx_point); #1;
    for (int i = 0; i < 4; i++) begin
      @(posedge clk iff tx_point); #1;
      chk(tp_gap == NBT, $sformatf("nominal bit period %0d", tp_gap));
      @(posedge clk iff sample); #1;
      chk(last_sample - last_tp == (TSEG1 + 1) * BRP, $sformatf("transmit to sample point %0d", last_sample - last_tp));
      chk(rx_bit == 1'b1, "recessive bus sampled as 1");
    end
    // hard synchronisation at an odd place in the bit
    hse = 1;
    @(posedge clk iff sample); #1;
    repeat (5) @(posedge clk);
    @(negedge clk); rx = 0; t_edge = cyc;
    @(posedge clk iff sample); #1;
    #1 t_s = last_sample;
    // the edge is seen at the end of its quantum (1..BRP clocks), the sample
    // point lies TSEG1 quanta later and the strobe is registered (1 clock)
    chk(t_s - t_edge >= TSEG1 * BRP + 2 && t_s - t_edge <= TSEG1 * BRP + BRP + 1,
        $sformatf("hard sync: sample %0d clocks after the edge", t_s - t_edge));
    chk(rx_bit == 1'b0, "dominant bit sampled after hard sync");
    hse = 0;
    @(posedge clk iff sample); #1;
    @(negedge clk); rx = 1;
    repeat (2) @(posedge clk iff sample); #1;
    // late edge: one quantum after the start of bit -> bit longer by SJW quanta
    @(posedge clk iff tx_point); #1;
    repeat (BRP) @(posedge clk);
    @(negedge clk); rx = 0;
    @(posedge clk iff sample); #1;
    chk(sample_gap == NBT + SJW * BRP, $sformatf("late edge: sample gap %0d", sample_gap));
    @(posedge clk iff tx_point); #1;
    chk(tp_gap == NBT + SJW * BRP, $sformatf("late edge: bit period %0d", tp_gap));
    @(negedge clk); rx = 1;
    repeat (2) @(posedge clk iff sample); #1;
    // early edge: one quantum before the next bit -> next sample SJW quanta early
    @(posedge clk iff tx_point); #1;
    repeat (NBT - 2 * BRP) @(posedge clk);
    @(negedge clk); rx = 0;
    @(posedge clk iff sample); #1;
    chk(sample_gap == NBT - SJW * BRP, $sformatf("early edge: sample gap %0d", sample_gap));
    @(negedge clk); rx = 1;
    repeat (2) @(posedge clk iff sample); #1;
    // no resynchronisation while sending dominant
    txd = 1;
    @(posedge clk iff tx_point); #1;
    repeat (BRP) @(posedge clk);
    @(negedge clk); rx = 0;
    @(posedge clk iff sample); #1;
    chk(sample_gap == NBT, $sformatf("own dominant edge ignored: gap %0d", sample_gap));
    @(negedge clk); rx = 1;
    repeat (2) @(posedge clk iff sample); #1;
    // one-quantum glitch exactly at the sample quantum
    @(posedge clk iff tx_point); #1;
    repeat (TSEG1 * BRP - 1) @(posedge clk);
    @(negedge clk); rx = 0;
    repeat (BRP) @(negedge clk);
    rx = 1;
    @(posedge clk iff sample); #1;
    chk(rx_bit == 1'b0, "single sample catches the glitch");
    chk(rx_bit3 == 1'b1, "three-sample majority rides out the glitch");
    txd = 0;
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
