// Memory controller between the two message RAMs and their two users.
//
// Requester 1 is the host address/data bus, requester 2 the message buffer
// logic of the controller. Request wrIJ / rdIJ means "requester I writes /
// reads memory J"; the controller turns them into the write and read strobes
// wr1, rd1, wr2, rd2 of memory 1 and memory 2 and routes the address and write
// data of the requester that owns each memory in that cycle. The host always
// wins; requester 2 is granted (gnt2) only when it does not want the memory the
// host is using, so both can work in the same cycle on different memories.
// mem_req is high while any request is active. Read data comes back one clock
// after the read strobe and is steered to each requester by a one-flop record
// of which memory it read. Signal names follow the document's memory
// controller; the host-first rule and the data steering are this design's own.
module mem_cntrl #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr11, wr12, rd11, rd12,
  input  logic [AW-1:0] addr_r1,
  input  logic [7:0]    wdata_r1,
  output logic [7:0]    rdata_r1,
  input  logic          wr21, wr22, rd21, rd22,
  input  logic [AW-1:0] addr_r2,
  input  logic [7:0]    wdata_r2,
  output logic [7:0]    rdata_r2,
  output logic          gnt2,
  output logic          wr1, rd1, wr2, rd2,
  output logic [AW-1:0] addr_m1, addr_m2,
  output logic [7:0]    wdata_m1, wdata_m2,
  input  logic [7:0]    rdata_m1, rdata_m2,
  output logic          mem_req
);

  logic r1_uses_m1, r1_uses_m2, r2_uses_m1, r2_uses_m2, r2_m1_ok, r2_m2_ok;
  logic r1_read_m2, r2_read_m2;

  assign r1_uses_m1 = wr11 || rd11;
  assign r1_uses_m2 = wr12 || rd12;
  assign r2_uses_m1 = wr21 || rd21;
  assign r2_uses_m2 = wr22 || rd22;
  assign r2_m1_ok   = r2_uses_m1 && !r1_uses_m1;
  assign r2_m2_ok   = r2_uses_m2 && !r1_uses_m2;
  assign gnt2       = r2_m1_ok || r2_m2_ok;

  assign wr1 = wr11 || (wr21 && r2_m1_ok);
  assign rd1 = rd11 || (rd21 && r2_m1_ok);
  assign wr2 = wr12 || (wr22 && r2_m2_ok);
  assign rd2 = rd12 || (rd22 && r2_m2_ok);

  assign addr_m1  = r1_uses_m1 ? addr_r1  : addr_r2;
  assign wdata_m1 = r1_uses_m1 ? wdata_r1 : wdata_r2;
  assign addr_m2  = r1_uses_m2 ? addr_r1  : addr_r2;
  assign wdata_m2 = r1_uses_m2 ? wdata_r1 : wdata_r2;

  assign mem_req = r1_uses_m1 || r1_uses_m2 || r2_uses_m1 || r2_uses_m2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_read_m2 <= 1'b0;
      r2_read_m2 <= 1'b0;
    end else begin
      if (rd11 || rd12) r1_read_m2 <= rd12;
      if ((rd21 && r2_m1_ok) || (rd22 && r2_m2_ok)) r2_read_m2 <= rd22;
    end
  end

  assign rdata_r1 = r1_read_m2 ? rdata_m2 : rdata_m1;
  assign rdata_r2 = r2_read_m2 ? rdata_m2 : rdata_m1;

endmodule
