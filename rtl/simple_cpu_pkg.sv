// simple_cpu_pkg: types and constants shared by the SimpleCPU_v1a blocks.
//
// The instruction word is 16 bits: opcode in [15:12], four unused bits in
// [11:8] and an 8-bit operand in [7:0]. The operand is a constant (KK) for
// the immediate group, or a memory / jump address (AA) for the absolute and
// direct groups. The opcode values follow the SimpleCPU_v1a instruction set
// table. The ALU control encoding and the phase encoding are this design's
// own choice; the instruction set only fixes what each operation computes.
package simple_cpu_pkg;

  localparam int unsigned ADDR_W  = 8;   // address bus ADDR(7:0), 256 locations
  localparam int unsigned DATA_W  = 8;   // accumulator, ALU and PC width
  localparam int unsigned INSTR_W = 16;  // instruction / memory word width

  // Opcodes, instruction bits [15:12].
  typedef enum logic [3:0] {
    OP_MOVE   = 4'h0,  // ACC <- KK
    OP_ADD    = 4'h1,  // ACC <- ACC + KK
    OP_SUB    = 4'h2,  // ACC <- ACC - KK
    OP_AND    = 4'h3,  // ACC <- ACC & KK
    OP_LOAD   = 4'h4,  // ACC <- M[AA]
    OP_STORE  = 4'h5,  // M[AA] <- ACC
    OP_ADDM   = 4'h6,  // ACC <- ACC + M[AA]
    OP_SUBM   = 4'h7,  // ACC <- ACC - M[AA]
    OP_JUMPU  = 4'h8,  // PC <- AA
    OP_JUMPZ  = 4'h9,  // if Z=1 PC <- AA else PC <- PC + 1
    OP_JUMPNZ = 4'hA   // if Z=0 PC <- AA else PC <- PC + 1
  } opcode_t;

  // ALU function select, ACC_CTL(2:0).
  typedef enum logic [2:0] {
    ALU_PASS = 3'd0,   // Y = B (MOVE, LOAD)
    ALU_ADD  = 3'd1,   // Y = A + B
    ALU_SUB  = 3'd2,   // Y = A - B
    ALU_AND  = 3'd3    // Y = A & B
  } alu_ctl_t;

  // Instruction cycle phases.
  typedef enum logic [1:0] {
    PH_FETCH   = 2'd0,
    PH_DECODE  = 2'd1,
    PH_EXECUTE = 2'd2
  } phase_t;

endpackage
