// dla_pkg: types and constants shared by the deep learning accelerator (DLA).
//
// The 40-bit instruction layout (opcode, two mode bits, two 3-bit register ids and a
// 27-bit payload) is the chip's documented format. The opcode numbering, the meaning
// of each payload and the SFU function codes are this design's own choices; they are
// listed here so that a program can be assembled against them.
//
//   op     | mode-0            | mode-1        | reg-id-0     | reg-id-1      | payload
//   NOP    | -                 | -             | -            | -             | -
//   HALT   | -                 | -             | -            | -             | -
//   LDI    | -                 | -             | rd           | -             | imm[26:0], zero-extended
//   ADDI   | -                 | -             | rd           | rs            | imm[26:0], sign-extended
//   BNZ    | -                 | -             | rs           | -             | target pc
//   WLOAD  | -                 | -             | flash addr   | weight row    | [11:0] rows, [15:12] lane
//   DOT    | accumulate        | use input B   | input word   | weight row    | [7:0] acc addr, [10:8] sfu fn, [15:11] shift
//   COPY   | -                 | -             | input-B word | -             | [7:0] acc addr, [15:8] byte offset
package dla_pkg;

  localparam int INSTR_W = 40;
  localparam int NREGS   = 8;
  localparam int REG_W   = 32;
  localparam int ACC_W   = 32;
  // Fixed-point "one" of the int8 activations fed to the gate functions (Q1.6).
  localparam int Q_ONE   = 64;

  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_HALT  = 5'd1,
    OP_LDI   = 5'd2,
    OP_ADDI  = 5'd3,
    OP_BNZ   = 5'd4,
    OP_WLOAD = 5'd5,
    OP_DOT   = 5'd6,
    OP_COPY  = 5'd7
  } opcode_e;

  typedef struct packed {
    opcode_e     opcode;   // [39:35]
    logic        mode0;    // [34]
    logic        mode1;    // [33]
    logic [2:0]  rid0;     // [32:30]
    logic [2:0]  rid1;     // [29:27]
    logic [26:0] payload;  // [26:0]
  } instr_t;

  typedef enum logic [2:0] {
    SFU_PASS = 3'd0,  // raw 32-bit sum, no requantization (partial sums)
    SFU_REQ  = 3'd1,  // requantize to int8
    SFU_RELU = 3'd2,  // requantize, then ReLU
    SFU_SIGM = 3'd3,  // requantize, then hard sigmoid, 0..Q_ONE
    SFU_TANH = 3'd4   // requantize, then hard tanh, -Q_ONE..Q_ONE
  } sfu_fn_e;

  function automatic instr_t mk_instr(opcode_e op, logic m0, logic m1,
                                      logic [2:0] r0, logic [2:0] r1, logic [26:0] pl);
    instr_t i;
    i.opcode  = op;
    i.mode0   = m0;
    i.mode1   = m1;
    i.rid0    = r0;
    i.rid1    = r1;
    i.payload = pl;
    return i;
  endfunction

endpackage
