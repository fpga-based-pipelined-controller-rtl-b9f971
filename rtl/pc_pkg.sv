// pc_pkg: shared types and constants of the 16-bit four-stage pipelined
// controller.
//
// The controller works on 16-bit data, has eight 16-bit internal registers
// addressed by 3 bits, eight instructions coded in a 3-bit opcode and a 32-bit
// result output. The opcode values and the register codes below are the
// design's published encodings. The helper functions that group opcodes by
// what they need from the register file are this implementation's own.
package pc_pkg;

  localparam int unsigned PC_DATA_W = 16;  // data path and register width
  localparam int unsigned PC_RES_W  = 32;  // result output width (holds a product)
  localparam int unsigned PC_REG_AW = 3;   // register address width
  localparam int unsigned PC_NREGS  = 8;   // number of internal registers

  typedef logic [PC_REG_AW-1:0] reg_addr_t;

  // Instruction set, 3-bit opcode.
  typedef enum logic [2:0] {
    OP_NOP   = 3'b000,  // no operation
    OP_MOVE  = 3'b001,  // dest <= src1
    OP_ADD   = 3'b010,  // dest <= src1 + src2
    OP_SUB   = 3'b011,  // dest <= src1 - src2
    OP_MULT  = 3'b100,  // dest <= src1 * src2 (result shows all 32 bits)
    OP_LOADI = 3'b101,  // dest <= data
    OP_READI = 3'b110,  // result <= dest
    OP_CJEQ  = 3'b111   // jump to code if src1 == src2
  } opcode_e;

  // Internal register names and their addresses.
  typedef enum logic [PC_REG_AW-1:0] {
    REG_A = 3'b000, REG_B = 3'b001, REG_C = 3'b010, REG_D = 3'b011,
    REG_E = 3'b100, REG_H = 3'b101, REG_L = 3'b110, REG_W = 3'b111
  } reg_name_e;

  // Opcodes that need register contents in the execute stage.
  function automatic logic reads_regs(opcode_e op);
    return op inside {OP_MOVE, OP_ADD, OP_SUB, OP_MULT, OP_READI, OP_CJEQ};
  endfunction

  // Opcodes whose result depends on the second source register.
  function automatic logic uses_source2(opcode_e op);
    return op inside {OP_ADD, OP_SUB, OP_MULT, OP_CJEQ};
  endfunction

  // Opcodes that write a register in the last stage.
  function automatic logic writes_reg(opcode_e op);
    return op inside {OP_MOVE, OP_ADD, OP_SUB, OP_MULT, OP_LOADI};
  endfunction

endpackage
