// Self-checking testbench of the memory controller. For every legal request
// pattern (each requester asks for at most one access per clock) it compares
// the memory strobes, the grant, mem_req and the address and data routing
// with a reference written out here, then checks that read data returns to
// the requester that read it.
`timescale 1ns/1ps
module tb_mem_cntrl;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic wr11, wr12, rd11, rd12, wr21, wr22, rd21, rd22, gnt2, wr1, rd1, wr2, rd2, mem_req;
  logic [AW-1:0] a1, a2, am1, am2;
  logic [7:0] d1, d2, dm1, dm2, q1, q2, qm1, qm2;
  mem_cntrl #(.AW(AW)) dut (
    .clk, .rst_n, .wr11, .wr12, .rd11, .rd12, .addr_r1(a1), .wdata_r1(d1), .rdata_r1(q1),
    .wr21, .wr22, .rd21, .rd22, .addr_r2(a2), .wdata_r2(d2), .rdata_r2(q2), .gnt2,
    .wr1, .rd1, .wr2, .rd2, .addr_m1(am1), .addr_m2(am2), .wdata_m1(dm1), .wdata_m2(dm2),
    .rdata_m1(qm1), .rdata_m2(qm2), .mem_req);

  initial begin
    {wr11, wr12, rd11, rd12, wr21, wr22, rd21, rd22} = '0;
    a1 = 8'h11; a2 = 8'h22; d1 = 8'hA1; d2 = 8'hB2; qm1 = 8'h5A; qm2 = 8'hC3;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int o1 = 0; o1 < 5; o1++)
      for (int o2 = 0; o2 < 5; o2++) begin
        // o = 0 none, 1 write mem1, 2 write mem2, 3 read mem1, 4 read mem2
        bit e_wr1, e_wr2, e_rd1, e_rd2, e_g, r1m1, r1m2, r2m1, r2m2;
        @(negedge clk);
        {wr11, wr12, rd11, rd12} = '0; {wr21, wr22, rd21, rd22} = '0;
        case (o1) 1: wr11 = 1; 2: wr12 = 1; 3: rd11 = 1; 4: rd12 = 1; default: ; endcase
        case (o2) 1: wr21 = 1; 2: wr22 = 1; 3: rd21 = 1; 4: rd22 = 1; default: ; endcase
        #1;
        r1m1 = (o1 == 1 || o1 == 3); r1m2 = (o1 == 2 || o1 == 4);
        r2m1 = (o2 == 1 || o2 == 3); r2m2 = (o2 == 2 || o2 == 4);
        e_g = (r2m1 && !r1m1) || (r2m2 && !r1m2);
        e_wr1 = (o1 == 1) || (o2 == 1 && !r1m1);
        e_rd1 = (o1 == 3) || (o2 == 3 && !r1m1);
        e_wr2 = (o1 == 2) || (o2 == 2 && !r1m2);
        e_rd2 = (o1 == 4) || (o2 == 4 && !r1m2);
        chk(wr1 == e_wr1 && rd1 == e_rd1 && wr2 == e_wr2 && rd2 == e_rd2,
            $sformatf("strobes for requests %0d/%0d", o1, o2));
        chk(gnt2 == e_g, $sformatf("grant for requests %0d/%0d", o1, o2));
        chk(mem_req == (o1 != 0 || o2 != 0), "mem_req");
        if (r1m1) chk(am1 == a1 && dm1 == d1, "memory 1 routed to host");
        else if (r2m1) chk(am1 == a2 && dm1 == d2, "memory 1 routed to requester 2");
        if (r1m2) chk(am2 == a1 && dm2 == d1, "memory 2 routed to host");
        else if (r2m2) chk(am2 == a2 && dm2 == d2, "memory 2 routed to requester 2");
      end
    // read data steering: host reads memory 2 while requester 2 reads memory 1
    @(negedge clk);
    {wr11, wr12, rd11, rd12, wr21, wr22, rd21, rd22} = '0;
    rd12 = 1; rd21 = 1;
    @(negedge clk); rd12 = 0; rd21 = 0;
    chk(q1 == qm2 && q2 == qm1, "read data returned to the right requester");
    rd11 = 1; rd22 = 1;
    @(negedge clk); rd11 = 0; rd22 = 0;
    chk(q1 == qm1 && q2 == qm2, "read data steering swapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
