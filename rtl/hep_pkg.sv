// hep_pkg: types and constants shared by the hybrid emulation processor (HEP)
// and the emulation engine built from it.
//
// An HEP instruction is a pair of control words stored at the same step
// address: an 18-bit left word and a 38-bit right word. The two top bits of
// the left word hold the opcode. The field positions below are those of the
// instruction formats:
//   left [17:16] opcode
//   left [15:0]  LUTOP: 16-bit function table
//   left [6:0]   ROMREF: address of the right word that holds static data
//   left [10:7]  ROMREF: bit address within the low 16 bits of that word
//   right[6:0], [13:7], [20:14], [27:21]  operand addresses A, B, C, D
//                (RAMREF uses operand A's field as its address)
//   right[31:28] source bits for A..D: 0 = LDR, 1 = IDR
//   right[37:32] node address: which processor's bit-out is taken in
// The opcode values and the 128-step program depth follow the instruction
// set. The 9-clock instruction cycle follows the statement that the program
// counter advances every 9 system clocks.
package hep_pkg;

  localparam int unsigned LEFT_W      = 18;   // left control word width
  localparam int unsigned RIGHT_W     = 38;   // right control word width
  localparam int unsigned DEPTH       = 128;  // instructions per processor
  localparam int unsigned STEP_W      = 7;    // program counter / data address width
  localparam int unsigned NODE_W      = 6;    // node address width
  localparam int unsigned CYCLE_CLKS  = 9;    // system clocks per instruction cycle

  typedef logic [STEP_W-1:0]  step_t;
  typedef logic [NODE_W-1:0]  node_t;
  typedef logic [LEFT_W-1:0]  left_word_t;
  typedef logic [RIGHT_W-1:0] right_word_t;

  typedef enum logic [1:0] {
    OP_NOP    = 2'b00,
    OP_LUTOP  = 2'b01,
    OP_ROMREF = 2'b10,
    OP_RAMREF = 2'b11
  } opcode_e;

  // Field positions
  localparam int unsigned L_OP_LSB     = 16;
  localparam int unsigned L_BITADR_LSB = 7;
  localparam int unsigned R_SRC_LSB    = 28;
  localparam int unsigned R_NODE_LSB   = 32;

  function automatic opcode_e op_of(left_word_t lw);
    return opcode_e'(lw[L_OP_LSB +: 2]);
  endfunction

  // Operand address k (0 = A .. 3 = D) of a right control word
  function automatic step_t operand_addr(right_word_t rw, int unsigned k);
    return rw[k*STEP_W +: STEP_W];
  endfunction

  // Source of operand k: 0 = LDR, 1 = IDR
  function automatic logic operand_src(right_word_t rw, int unsigned k);
    return rw[R_SRC_LSB + k];
  endfunction

  function automatic node_t node_of(right_word_t rw);
    return rw[R_NODE_LSB +: NODE_W];
  endfunction

  // Instruction-cycle states, one-hot. The slot numbers follow the LUTOP
  // path 00, 11..18; the other instructions use a subset of the same slots.
  typedef enum logic [CYCLE_CLKS-1:0] {
    ST_FETCH = 9'b000000001,  // "00": read left/right control words
    ST_OPA   = 9'b000000010,  // "11": operand A, LUT table load / RAMREF read / ROMREF word read
    ST_OPB   = 9'b000000100,  // "12": operand B / ROMREF bit extract
    ST_OPC   = 9'b000001000,  // "13": operand C
    ST_OPD   = 9'b000010000,  // "14": operand D
    ST_EVAL  = 9'b000100000,  // "15": LUT evaluate, node bit-in written into IDR
    ST_XFER  = 9'b001000000,  // "16": result moved toward output
    ST_OUT   = 9'b010000000,  // "17": node bit-out updated, LDR written
    ST_DONE  = 9'b100000000   // "18": end of cycle, program counter advances
  } state_e;

endpackage
