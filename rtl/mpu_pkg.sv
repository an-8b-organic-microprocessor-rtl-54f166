// mpu_pkg: shared widths, opcode fields, ALU operation codes and
// instruction-encoding helpers for the 8-bit organic accumulator processor.
//
// An instruction word is 10 bits, opcode(9:0). The instruction foil keeps
// bit 9 (jump) for itself and sends opcode(8:0) to the processor foil:
//   (9)   jump: the PC loads the target in bits (3:0)
//   (8:7) Regsel: selects C0, C1, C2 or the constant 1 (11)
//   (6)   write the selected C register (no write when Regsel = 11)
//   (5)   write accumulator A with the ALU result
//   (4)   write the Out register from A
//   (3)   source of a C-register write: 1 = A, 0 = IN
//   (2:0) ALU operation
// The field positions and operation codes follow the published instruction
// table. Don't-care bits are encoded as 0 by the helper functions, which
// are used by the program ROM and the testbenches alike.
package mpu_pkg;

  localparam int unsigned DATA_W   = 8;   // datapath width
  localparam int unsigned INSTR_W  = 10;  // full instruction word
  localparam int unsigned OPCODE_W = 9;   // bits passed to the processor foil

  localparam int unsigned OP_JUMP    = 9;
  localparam int unsigned OP_RSEL_HI = 8;
  localparam int unsigned OP_RSEL_LO = 7;
  localparam int unsigned OP_WR_C    = 6;
  localparam int unsigned OP_WR_A    = 5;
  localparam int unsigned OP_WR_OUT  = 4;
  localparam int unsigned OP_SRC_A   = 3;

  typedef enum logic [1:0] {
    REG_C0  = 2'b00,
    REG_C1  = 2'b01,
    REG_C2  = 2'b10,
    REG_ONE = 2'b11   // constant 1 on the operand mux; not writable
  } regsel_e;

  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_NOT = 3'b010,
    ALU_LD  = 3'b011,  // pass operand B
    ALU_ADD = 3'b100,
    ALU_SUB = 3'b101,
    ALU_LSR = 3'b110,
    ALU_LSL = 3'b111
  } alu_op_e;

  typedef logic [INSTR_W-1:0] instr_t;

  // ALU instruction: A <= A op R   (AND/OR/LD/ADD/SUB with a register,
  // NOT/LSR/LSL ignore R; INC and DEC are ADD/SUB with R = REG_ONE)
  function automatic instr_t enc_alu(alu_op_e op, regsel_e r);
    instr_t w = '0;
    w[OP_RSEL_HI:OP_RSEL_LO] = r;
    w[OP_WR_A]               = 1'b1;
    w[2:0]                   = op;
    return w;
  endfunction

  // LD C_r, A  (from_a = 1)  or  LD C_r, IN  (from_a = 0)
  function automatic instr_t enc_ldc(regsel_e r, logic from_a);
    instr_t w = '0;
    w[OP_RSEL_HI:OP_RSEL_LO] = r;
    w[OP_WR_C]               = 1'b1;
    w[OP_SRC_A]              = from_a;
    return w;
  endfunction

  // LD OUT, A
  function automatic instr_t enc_ldout();
    instr_t w = '0;
    w[OP_WR_OUT] = 1'b1;
    return w;
  endfunction

  function automatic instr_t enc_nop();
    return '0;
  endfunction

  // JUMP to target; bits (8:4) stay 0 so the word reaches the processor as a NOOP
  function automatic instr_t enc_jump(logic [3:0] target);
    instr_t w = '0;
    w[OP_JUMP] = 1'b1;
    w[3:0]     = target;
    return w;
  endfunction

endpackage
