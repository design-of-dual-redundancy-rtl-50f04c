// Shared types and constants of the dual redundancy CAN controller.
//
// A CAN message is carried between blocks as one can_frame_t: a 29-bit
// identifier (a standard 11-bit identifier sits in id[28:18]), the IDE and
// RTR flags, the data length code and eight data bytes. The CRC-15 of CAN 2.0
// (generator x^15+x^14+x^10+x^8+x^7+x^4+x^3+1, 0x4599) is given as a function
// so that the bit stream processor and the testbenches use the same rule.
// Everything here follows the CAN 2.0 specification except the encodings of
// the enums, which are this design's own.
package can_pkg;

  localparam logic [14:0] CRC15_POLY = 15'h4599;

  typedef struct packed {
    logic [28:0]     id;
    logic            ide;
    logic            rtr;
    logic [3:0]      dlc;
    logic [7:0][7:0] data;   // data[0] is sent first
  } can_frame_t;

  // Bit stream processor fields and frame states
  typedef enum logic [4:0] {
    BS_INTEGRATE, BS_IDLE, BS_ID_A, BS_SRR_RTR, BS_IDE, BS_ID_B, BS_RTR_B,
    BS_R1, BS_R0, BS_DLC, BS_DATA, BS_CRC, BS_CRC_DEL, BS_ACK, BS_ACK_DEL,
    BS_EOF, BS_IFS, BS_SUSPEND, BS_ERR_FLAG, BS_ERR_WAIT, BS_ERR_DELIM,
    BS_BUS_OFF
  } bsp_state_t;

  // Main redundancy state machine (ten states of the state table)
  typedef enum logic [3:0] {
    RM_IDLE1, RM_WAIT1, RM_CH1, RM_ABORT1, RM_WAIT2,
    RM_IDLE2, RM_WAIT3, RM_CH2, RM_ABORT2, RM_WAIT4
  } rmb_state_t;

  // Auxiliary channel monitor states
  typedef enum logic [1:0] {CM_VALID, CM_PASSIVE, CM_BUS_OFF} chan_mon_state_t;

  function automatic logic [14:0] crc15_next(input logic [14:0] crc, input logic b);
    logic fb;
    fb = b ^ crc[14];
    crc15_next = {crc[13:0], 1'b0} ^ (fb ? CRC15_POLY : 15'h0);
  endfunction

  // Number of data bytes carried by a frame (DLC values above 8 mean 8)
  function automatic logic [3:0] data_bytes(input logic [3:0] dlc, input logic rtr);
    if (rtr) data_bytes = 4'd0;
    else if (dlc > 4'd8) data_bytes = 4'd8;
    else data_bytes = dlc;
  endfunction

endpackage
