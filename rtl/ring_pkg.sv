// ring_pkg: packet format of the chip-to-chip ring.
//
// Chips sit on a unidirectional ring with the control chip. Every packet carries the
// ring id of its destination and of its source; a chip takes packets addressed to
// its own id and forwards all others. A 6-bit id gives room for the control chip
// and 63 DLA chips, the architectural ceiling of the ring. Field widths, command
// codes and the placement of data are this design's own choices.
package ring_pkg;

  localparam int ID_W   = 6;
  localparam int ADDR_W = 16;
  localparam int DATA_W = 40;

  typedef enum logic [3:0] {
    CMD_NONE       = 4'd0,
    CMD_WR_INSTR   = 4'd1,  // addr: instruction index, data: 40-bit instruction
    CMD_WR_INPUT   = 4'd2,  // addr: byte address (4-aligned) in input memory A,
                            // data[31:0]: four packed int8 bytes, data[35:32]: byte mask
    CMD_KICK       = 4'd3,  // addr: start pc; swaps the input memory A ping-pong banks
    CMD_RD_RESULT  = 4'd4,  // addr: {lane, accumulation address}
    CMD_RESULT     = 4'd5,  // reply to CMD_RD_RESULT, data[31:0]: value read
    CMD_DONE       = 4'd6,  // sent to the kicking chip when the program halts
    CMD_CLR_RESULT = 4'd7   // zero the accumulation (result) memories
  } ring_cmd_e;

  typedef struct packed {
    logic [ID_W-1:0]   dest;
    logic [ID_W-1:0]   src;
    ring_cmd_e         cmd;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } ring_pkt_t;

endpackage
