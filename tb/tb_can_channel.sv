// Self-checking testbench of a CAN channel (bit timing logic plus bit stream
// processor). Two channels share a wired-AND bus. Checks: standard and
// extended frames delivered with the right contents, the frame length in
// clocks (stuffed bit count worked out here, 16 clocks per bit), the
// acceptance filter (a rejected frame is still acknowledged but not
// delivered), and, with the second channel cut off the bus, the transmit
// error counter rising by 8 per failed attempt to error passive after 16
// attempts, followed by an abort.
`timescale 1ns/1ps
module tb_can_channel;
  import can_pkg::*;
  localparam int BIT_CLKS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [1:0] tx, tx_req, abort_req, need, succ, txerr, ackerr, arbl, rxv, rxerr, ep, boff, trans;
  can_frame_t txf [2];
  can_frame_t rxf [2];
  logic [8:0] tec [2];
  logic [7:0] rec [2];
  bsp_state_t state [2];
  logic [28:0] code [2];
  logic [28:0] mask [2];
  logic b_connected;
  logic bus;
  assign bus = tx[0] & (tx[1] | !b_connected);

  for (genvar n = 0; n < 2; n++) begin : g_ch
    can_channel u (
      .clk, .rst_n, .soft_rst(1'b0), .can_rx(n == 0 ? bus : (b_connected ? bus : 1'b1)),
      .can_tx(tx[n]), .tx_req(tx_req[n]), .tx_frame(txf[n]), .abort_req(abort_req[n]),
      .need_to_tx(need[n]), .tx_success(succ[n]), .tx_error(txerr[n]), .ack_error(ackerr[n]),
      .arb_lost(arbl[n]), .acc_code(code[n]), .acc_mask(mask[n]), .rx_valid(rxv[n]),
      .rx_frame(rxf[n]), .rx_error(rxerr[n]), .tec(tec[n]), .rec(rec[n]),
      .error_passive(ep[n]), .bus_off(boff[n]), .transmitting(trans[n]), .state(state[n]));
  end

  // stuffed length of a frame from SOF to the end of EOF, worked out here
  function automatic int frame_bits(input can_frame_t f);
    bit raw [$];
    int run, n, nbytes;
    bit last;
    raw.push_back(0);
    for (int i = 28; i >= 18; i--) raw.push_back(f.id[i]);
    if (f.ide) begin
      raw.push_back(1); raw.push_back(1);
      for (int i = 17; i >= 0; i--) raw.push_back(f.id[i]);
      raw.push_back(f.rtr); raw.push_back(0); raw.push_back(0);
    end else begin
      raw.push_back(f.rtr); raw.push_back(0); raw.push_back(0);
    end
    for (int i = 3; i >= 0; i--) raw.push_back(f.dlc[i]);
    nbytes = f.rtr ? 0 : (f.dlc > 8 ? 8 : int'(f.dlc));
    for (int k = 0; k < nbytes; k++) for (int i = 7; i >= 0; i--) raw.push_back(f.data[k][i]);
    begin
      bit [14:0] c;
      c = 0;
      foreach (raw[i]) begin
        bit fb;
        fb = raw[i] ^ c[14];
        c = c << 1;
        if (fb) c ^= 15'h4599;
      end
      for (int i = 14; i >= 0; i--) raw.push_back(c[i]);
    end
    n = 0; run = 0; last = 1;
    foreach (raw[i]) begin
      n++;
      if (i == 0 || raw[i] != last) run = 1; else run++;
      last = raw[i];
      if (run == 5) begin n++; last = !last; run = 1; end
    end
    return n + 10;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic xfer(input can_frame_t f, input bit accept, input string name);
    int t0, t1, nb;
    bit got;
    got = 0;
    @(negedge clk); txf[0] = f; tx_req[0] = 1; @(negedge clk); tx_req[0] = 0;
    wait (bus == 1'b0); t0 = cyc;
    while (!succ[0]) begin
      @(posedge clk); #1;
      if (rxv[1]) begin
        got = 1;
        chk(rxf[1].id == f.id && rxf[1].ide == f.ide && rxf[1].dlc == f.dlc &&
            rxf[1].data == f.data, {name, ": received contents"});
      end
    end
    t1 = cyc;
    nb = frame_bits(f);
    chk(t1 - t0 > (nb - 1) * BIT_CLKS && t1 - t0 <= nb * BIT_CLKS,
        $sformatf("%s: %0d clocks for %0d bits", name, t1 - t0, nb));
    chk(got == accept, $sformatf("%s: delivered=%0d, expected %0d", name, got, accept));
    repeat (20 * BIT_CLKS) @(posedge clk);
  endtask

  can_frame_t f;
  int attempts;
  initial begin
    tx_req = 0; abort_req = 0; b_connected = 1;
    txf[0] = '0; txf[1] = '0;
    code[0] = '0; mask[0] = '0;
    code[1] = {11'h123, 18'h0}; mask[1] = {11'h7FF, 18'h0};   // node B: only identifier 0x123
    repeat (4) @(posedge clk); rst_n = 1;
    repeat (15 * BIT_CLKS) @(posedge clk);
    f = '0; f.id = {11'h123, 18'h0}; f.dlc = 3; f.data[0] = 8'h01; f.data[1] = 8'h80; f.data[2] = 8'hFF;
    xfer(f, 1, "std frame accepted");
    f.id = {11'h124, 18'h0};
    xfer(f, 0, "std frame filtered out");
    chk(tec[0] == 0, "filtered frame still acknowledged");
    mask[1] = '0;
    f = '0; f.id = 29'h0ABCDEF1; f.ide = 1; f.dlc = 8;
    for (int k = 0; k < 8; k++) f.data[k] = 8'(k * 37);
    xfer(f, 1, "ext frame");
    // no receiver on the bus
    b_connected = 0;
    f = '0; f.id = {11'h321, 18'h0}; f.dlc = 1; f.data[0] = 8'h5A;
    @(negedge clk); txf[0] = f; tx_req[0] = 1; @(negedge clk); tx_req[0] = 0;
    attempts = 0;
    while (!ep[0] && attempts < 40) begin
      @(posedge clk iff txerr[0]);
      attempts++;
      chk(ackerr[0], "acknowledgement error");
      @(posedge clk); #1;
      chk(tec[0] == 9'(8 * attempts), $sformatf("TEC %0d after %0d attempts", tec[0], attempts));
    end
    chk(attempts == 16, $sformatf("error passive after %0d attempts", attempts));
    @(negedge clk); abort_req[0] = 1; @(negedge clk); abort_req[0] = 0;
    repeat (200 * BIT_CLKS) @(posedge clk);
    chk(!need[0], "abort ends the retransmissions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
