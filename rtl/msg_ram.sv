// Byte-wide message memory (memory 1 or memory 2 of the controller).
// One port: a write stores wdata at addr on the clock edge; a read presents
// the byte at addr on rdata one clock later, where it stays until the next
// read. 2**AW bytes; the size is this design's own choice (the document gives
// none). Contents are not reset.
module msg_ram #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
