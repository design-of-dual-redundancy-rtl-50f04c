// Self-checking testbench of the bit stream processor.
//
// Two processors share a wired-AND bus; the testbench stands in for the bit
// timing logic and gives both the same transmit point and sample point every
// 8 clocks. It builds the expected bit stream of each frame on its own
// (fields, CRC-15 computed bit by bit here, stuff bits, delimiters, ACK, EOF)
// and compares it with the bus bit for bit, then checks the received frame,
// the success strobe and its bit count. Further tests: arbitration between
// the two nodes, acknowledgement errors with the error counter rising by 8
// per attempt up to error passive, abort, recovery to error active, bit errors
// driving a node bus off, and the return from bus off after 128 x 11
// recessive bits.
`timescale 1ns/1ps
module tb_can_bsp;
  import can_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bit strobes: transmit point at phase 0, sample point at phase 5 of 8
  logic [2:0] ph;
  logic tx_point, sample;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= '0; else ph <= ph + 1'b1;
  assign tx_point = (ph == 3'd0);
  assign sample   = (ph == 3'd5);

  logic [1:0] soft_rst, tx_req, abort_req, tx, bus_idle, need, succ, txerr, ackerr, arbl, trans;
  logic [1:0] rxv, rxerr, ep, boff;
  can_frame_t txf [2];
  can_frame_t rxf [2];
  logic [8:0] tec [2];
  logic [7:0] rec [2];
  bsp_state_t state [2];
  logic force_dom;
  logic bus;
  assign bus = tx[0] & tx[1] & !force_dom;

  for (genvar n = 0; n < 2; n++) begin : g_node
    can_bsp u (
      .clk, .rst_n, .soft_rst(soft_rst[n]), .sample, .rx_bit(bus), .tx_point, .tx(tx[n]),
      .bus_idle(bus_idle[n]), .tx_req(tx_req[n]), .tx_frame(txf[n]), .abort_req(abort_req[n]),
      .need_to_tx(need[n]), .tx_success(succ[n]), .tx_error(txerr[n]), .ack_error(ackerr[n]),
      .arb_lost(arbl[n]), .transmitting(trans[n]), .acc_code(29'h0), .acc_mask(29'h0),
      .rx_valid(rxv[n]), .rx_frame(rxf[n]), .rx_error(rxerr[n]), .tec(tec[n]), .rec(rec[n]),
      .error_passive(ep[n]), .bus_off(boff[n]), .state(state[n])
    );
  end

  // ---- independent frame model -------------------------------------------
  bit exp_bits [$];
  function automatic void build_frame(input can_frame_t f, input bit acked);
    bit raw [$];
    bit [14:0] c;
    int nbytes, run;
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
    for (int k = 0; k < nbytes; k++)
      for (int i = 7; i >= 0; i--) raw.push_back(f.data[k][i]);
    c = 0;
    foreach (raw[i]) begin
      bit fb;
      fb = raw[i] ^ c[14];
      c = c << 1;
      if (fb) c = c ^ 15'b100010110011001;
    end
    for (int i = 14; i >= 0; i--) raw.push_back(c[i]);
    exp_bits.delete();
    run = 0; last = 1;
    foreach (raw[i]) begin
      exp_bits.push_back(raw[i]);
      if (i == 0 || raw[i] != last) run = 1; else run++;
      last = raw[i];
      if (run == 5) begin
        exp_bits.push_back(!last);
        last = !last; run = 1;
      end
    end
    exp_bits.push_back(1); exp_bits.push_back(!acked); exp_bits.push_back(1);
    repeat (7) exp_bits.push_back(1);
  endfunction

  task automatic wait_bits(input int n);
    repeat (n) begin
      @(posedge clk iff sample);
    end
  endtask

  task automatic request(input int n, input can_frame_t f);
    @(negedge clk);
    txf[n] = f; tx_req[n] = 1;
    @(negedge clk);
    tx_req[n] = 0;
  endtask

  // Send frame from node s, capture the bus from SOF and compare.
  task automatic send_and_compare(input int s, input can_frame_t f, input string name);
    int nbits, mism, t_sof, t_ok;
    bit got_ok, got_rx;
    can_frame_t r;
    build_frame(f, 1'b1);
    request(s, f);
    // wait for SOF on the bus
    do @(posedge clk iff sample); while (bus !== 1'b0);
    t_sof = 0; mism = 0; nbits = 0; got_ok = 0; got_rx = 0; t_ok = -1;
    for (int i = 0; i < exp_bits.size(); i++) begin
      if (i > 0) @(posedge clk iff sample);
      if (bus !== exp_bits[i]) mism++;
      nbits++;
      // success/receive strobes arrive the clock after the sample
      @(posedge clk);
      if (succ[s]) begin got_ok = 1; t_ok = i; end
      if (rxv[1-s]) begin got_rx = 1; r = rxf[1-s]; end
    end
    chk(mism == 0, $sformatf("%s: %0d bus bits differ from the model", name, mism));
    chk(got_ok && t_ok == exp_bits.size() - 1,
        $sformatf("%s: tx_success at bit %0d, expected %0d", name, t_ok, exp_bits.size() - 1));
    chk(got_rx, {name, ": receiver got no frame"});
    if (got_rx) begin
      chk(r.id == f.id && r.ide == f.ide && r.rtr == f.rtr && r.dlc == f.dlc, {name, ": header"});
      for (int k = 0; k < (f.rtr ? 0 : int'(f.dlc)); k++)
        chk(r.data[k] == f.data[k], $sformatf("%s: data byte %0d", name, k));
    end
    chk(!need[s], {name, ": need_to_tx still high"});
    wait_bits(4);
  endtask

  can_frame_t f;
  int attempts, tec_prev;

  initial begin
    soft_rst = 0; tx_req = 0; abort_req = 0; force_dom = 0;
    txf[0] = '0; txf[1] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait_bits(14);
    chk(state[0] == BS_IDLE && state[1] == BS_IDLE, "nodes reach bus idle after integration");

    // 1. standard data frame
    f = '0; f.id = {11'h123, 18'h0}; f.dlc = 4'd2; f.data[0] = 8'hA5; f.data[1] = 8'h0F;
    send_and_compare(0, f, "std frame");
    // 2. extended data frame with 8 bytes (many stuff bits)
    f = '0; f.id = 29'h1ABCDEF0; f.ide = 1; f.dlc = 4'd8;
    for (int k = 0; k < 8; k++) f.data[k] = (k % 2) ? 8'h00 : 8'hFF;
    send_and_compare(1, f, "ext frame");
    // 3. remote frame
    f = '0; f.id = {11'h7F0, 18'h0}; f.rtr = 1; f.dlc = 4'd4;
    send_and_compare(0, f, "remote frame");
    chk(tec[0] == 0 && tec[1] == 0 && rec[0] == 0 && rec[1] == 0, "counters stay zero on clean traffic");

    // 4. arbitration: both start together, the lower identifier wins
    begin
      can_frame_t fa, fb;
      bit lost_seen, a_ok, b_ok;
      fa = '0; fa.id = {11'h100, 18'h0}; fa.dlc = 1; fa.data[0] = 8'h11;
      fb = '0; fb.id = {11'h0FF, 18'h0}; fb.dlc = 1; fb.data[0] = 8'h22;
      @(negedge clk);
      txf[0] = fa; txf[1] = fb; tx_req = 2'b11;
      @(negedge clk); tx_req = 0;
      lost_seen = 0; a_ok = 0; b_ok = 0;
      repeat (8 * 300) begin
        @(posedge clk);
        if (arbl[0]) lost_seen = 1;
        if (succ[1] && !a_ok) b_ok = 1;
        if (succ[0]) a_ok = 1;
      end
      chk(lost_seen, "node 0 (id 0x100) loses arbitration");
      chk(b_ok, "node 1 (id 0x0FF) sends first");
      chk(a_ok, "node 0 retransmits after losing arbitration");
      chk(tec[0] == 0, "arbitration loss is not an error");
    end

    // 5. no acknowledgement: node 1 held in reset; TEC rises by 8 per attempt
    soft_rst[1] = 1;
    f = '0; f.id = {11'h555, 18'h0}; f.dlc = 1; f.data[0] = 8'h3C;
    request(0, f);
    attempts = 0;
    while (!ep[0] && attempts < 40) begin
      @(posedge clk iff txerr[0]);
      attempts++;
      chk(ackerr[0], "transmit error is an acknowledgement error");
      @(posedge clk);
      chk(tec[0] == 9'(8 * attempts), $sformatf("TEC after %0d ack errors = %0d", attempts, tec[0]));
    end
    chk(attempts == 16 && tec[0] == 9'd128, $sformatf("error passive after %0d attempts", attempts));
    chk(ep[0], "node error passive above 127");
    // passive ack error leaves TEC unchanged
    @(posedge clk iff txerr[0]);
    @(posedge clk);
    chk(tec[0] == 9'd128, "error-passive ack error does not raise TEC");
    chk(need[0], "frame still pending (automatic retransmission)");
    // abort
    @(negedge clk); abort_req[0] = 1; @(negedge clk); abort_req[0] = 0;
    wait_bits(200);
    chk(!need[0], "abort clears need_to_tx");

    // 6. recovery: with a receiver present one success brings TEC to 127
    soft_rst[1] = 0;
    wait_bits(20);
    f = '0; f.id = {11'h066, 18'h0}; f.dlc = 0;
    request(0, f);
    @(posedge clk iff succ[0]);
    @(posedge clk);
    chk(tec[0] == 9'd127 && !ep[0], "successful transmission: TEC 127, error active again");

    // 7. bit errors in the data field drive node 0 bus off
    soft_rst[0] = 1; @(negedge clk); soft_rst[0] = 0;
    wait_bits(14);
    f = '0; f.id = {11'h2AA, 18'h0}; f.dlc = 2; f.data[0] = 8'hFF; f.data[1] = 8'hFF;
    request(0, f);
    attempts = 0;
    fork
      begin
        while (!boff[0] && attempts < 60) begin
          @(posedge clk iff txerr[0]); attempts++;
          @(posedge clk);
        end
      end
      begin
        while (!boff[0]) begin
          @(posedge clk);
          force_dom = (state[0] == BS_DATA);
        end
        force_dom = 0;
      end
    join
    chk(boff[0] && attempts == 32 && tec[0] == 9'd256, $sformatf("bus off after %0d bit errors", attempts));
    chk(tx[0] == 1'b1, "bus-off node sends recessive");
    // recovery needs 128 x 11 recessive bits; node 1 stays quiet
    wait_bits(128 * 11 - 20);
    chk(boff[0], "still bus off before 128 x 11 recessive bits");
    wait_bits(40);
    chk(!boff[0] && tec[0] == 0, "bus off recovered after 128 x 11 recessive bits");
    @(posedge clk iff succ[0]);
    chk(1'b1, "pending frame sent after bus-off recovery");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
