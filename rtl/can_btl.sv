// Bit timing logic (BTL) of one CAN channel.
//
// The system clock is divided by BRP into time quanta. A nominal bit is one
// synchronisation quantum, TSEG1 quanta (propagation and phase segment 1) and
// TSEG2 quanta (phase segment 2); the bus is sampled at the end of TSEG1. A
// recessive-to-dominant edge while hard_sync_en is high (bus idle) restarts
// the bit (hard synchronisation) and gives a transmit point at once, so that a
// node with a frame waiting starts it in the same bit as the node that caused
// the edge. Any other such edge, seen while the node is
// not itself sending a dominant bit, resynchronises: an edge inside TSEG1
// lengthens TSEG1, an edge inside TSEG2 shortens TSEG2, each by at most SJW
// quanta. With SAM=1 the bit value is the majority of the last three quanta of
// TSEG1, with SAM=0 the last quantum only.
//
// Outputs are one-clock strobes: sample (with rx_bit valid in the same cycle)
// and tx_point, the start of a new bit, at which the bit stream processor puts
// its next bit on the line. The job of this block (hard sync, resync, sample
// point and number of samples) follows the document; the segment lengths and
// the quantum-level implementation are this design's own, with a default of
// 8 quanta of 2 clocks per bit.
module can_btl #(
  parameter int unsigned BRP   = 2,   // clocks per time quantum
  parameter int unsigned TSEG1 = 5,   // quanta from sync segment to sample point
  parameter int unsigned TSEG2 = 2,   // quanta after the sample point
  parameter int unsigned SJW   = 1,   // resynchronisation jump width
  parameter bit          SAM   = 1'b0 // 1 = three samples per bit
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rx,           // bus level (1 = recessive)
  input  logic hard_sync_en, // bus idle: next falling edge is a start of frame
  input  logic tx_dominant,  // this node is sending a dominant bit
  output logic sample,       // sample point strobe
  output logic rx_bit,       // sampled bit, valid with sample
  output logic tx_point      // start of bit strobe
);

  localparam int QW = 8;

  logic [$clog2(BRP+1)-1:0] presc;
  logic                     tq;
  logic [QW-1:0]            q, seg1_end, bit_end;
  logic                     rx_prev;
  logic [1:0]               rx_hist;

  assign tq = (32'(presc) == BRP - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) presc <= '0;
    else if (tq) presc <= '0;
    else presc <= presc + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= '0;
      seg1_end <= QW'(TSEG1);
      bit_end  <= QW'(TSEG1 + TSEG2);
      rx_prev  <= 1'b1;
      rx_hist  <= 2'b11;
      sample   <= 1'b0;
      rx_bit   <= 1'b1;
      tx_point <= 1'b0;
    end else begin
      sample   <= 1'b0;
      tx_point <= 1'b0;
      if (tq) begin
        logic          edge_seen, restart;
        logic [QW-1:0] s1, be, err;
        edge_seen = rx_prev && !rx;
        restart   = 1'b0;
        rx_prev   <= rx;
        rx_hist   <= {rx_hist[0], rx};
        s1 = seg1_end;
        be = bit_end;
        if (edge_seen && hard_sync_en) begin
          // hard synchronisation: this quantum is the sync segment, and a
          // node with a frame waiting drives its start of frame now
          q        <= QW'(1);
          tx_point <= 1'b1;
          seg1_end <= QW'(TSEG1);
          bit_end  <= QW'(TSEG1 + TSEG2);
        end else begin
          if (edge_seen && !tx_dominant && q != '0) begin
            if (q <= s1) begin
              // late edge: lengthen phase segment 1
              err = (q > QW'(SJW)) ? QW'(SJW) : q;
              s1 = s1 + err;
              be = be + err;
            end else begin
              // early edge: shorten phase segment 2; if the edge is at most
              // SJW quanta early, the edge quantum becomes the sync segment
              err = be + 1'b1 - q;
              if (err <= QW'(SJW)) restart = 1'b1;
              else be = be - QW'(SJW);
            end
          end
          if (restart) begin
            q        <= QW'(1);
            tx_point <= 1'b1;
            seg1_end <= QW'(TSEG1);
            bit_end  <= QW'(TSEG1 + TSEG2);
          end else begin
            if (q == s1) begin
              sample <= 1'b1;
              rx_bit <= SAM ? ((rx & rx_hist[0]) | (rx & rx_hist[1]) | (rx_hist[0] & rx_hist[1])) : rx;
            end
            if (q >= be) begin
              q        <= '0;
              tx_point <= 1'b1;
              seg1_end <= QW'(TSEG1);
              bit_end  <= QW'(TSEG1 + TSEG2);
            end else begin
              q        <= q + 1'b1;
              seg1_end <= s1;
              bit_end  <= be;
            end
          end
        end
      end
    end
  end

endmodule
