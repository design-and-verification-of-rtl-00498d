// lc3_pkg: types and constants shared by the LC-3 processor units.
//
// Opcodes are the standard LC-3 encodings (instruction bits [15:12]).
// The control words that travel from Decode to Execute, Writeback and the
// Controller are defined here as packed structs so that every unit agrees on
// the bit layout:
//   e_control_t  6 bits  {alu_control[1:0], pcselect1[1:0], pcselect2, op2select}
//   w_control_t  2 bits  register-file write source
// The field order of e_control_t is this design's own; it is chosen so that
// the control word of LDI, LD, LEA and BR is 6'h06, of LDR 6'h08, of JMP
// 6'h0c, of ADD 6'h00 / 6'h01 and of AND (register) 6'h11.
package lc3_pkg;

  typedef enum logic [3:0] {
    OP_BR   = 4'b0000,
    OP_ADD  = 4'b0001,
    OP_LD   = 4'b0010,
    OP_ST   = 4'b0011,
    OP_JSR  = 4'b0100,  // JSR (IR[11]=1) and JSRR (IR[11]=0)
    OP_AND  = 4'b0101,
    OP_LDR  = 4'b0110,
    OP_STR  = 4'b0111,
    OP_RTI  = 4'b1000,  // not supported: executes as a no-operation
    OP_NOT  = 4'b1001,
    OP_LDI  = 4'b1010,
    OP_STI  = 4'b1011,
    OP_JMP  = 4'b1100,  // JMP and RET (JMP R7)
    OP_RES  = 4'b1101,  // reserved: no-operation
    OP_LEA  = 4'b1110,
    OP_TRAP = 4'b1111   // not supported: executes as a no-operation
  } opcode_t;

  // ALU operation
  typedef enum logic [1:0] {
    ALU_ADD  = 2'b00,
    ALU_AND  = 2'b01,
    ALU_NOT  = 2'b10,
    ALU_PASS = 2'b11    // unused code: passes operand 1
  } alu_op_t;

  // First operand of the address adder: a sign-extended offset from IR
  typedef enum logic [1:0] {
    PC1_OFF11 = 2'b00,
    PC1_OFF9  = 2'b01,
    PC1_OFF6  = 2'b10,
    PC1_ZERO  = 2'b11
  } pcsel1_t;

  typedef struct packed {
    alu_op_t alu_control;
    pcsel1_t pcselect1;
    logic    pcselect2;  // 1: npc, 0: VSR1 (base register)
    logic    op2select;  // 1: VSR2, 0: sign-extended imm5
  } e_control_t;

  // Register-file write source
  typedef enum logic [1:0] {
    W_ALU = 2'b00,
    W_MEM = 2'b01,
    W_PC  = 2'b10,
    W_NPC = 2'b11
  } w_control_t;

  // Memory access state (numbering fixed by the memory-access state diagram)
  typedef enum logic [1:0] {
    MS_READ     = 2'd0,
    MS_READ_IND = 2'd1,
    MS_WRITE    = 2'd2,
    MS_INIT     = 2'd3
  } mem_state_t;

  // Condition codes {N, Z, P} of a 16-bit two's-complement value
  function automatic logic [2:0] nzp_of(input logic [15:0] v);
    if (v[15])          return 3'b100;
    else if (v == '0)   return 3'b010;
    else                return 3'b001;
  endfunction

  function automatic logic is_load(input logic [3:0] op);
    return op == OP_LD || op == OP_LDR || op == OP_LDI;
  endfunction

  function automatic logic is_store(input logic [3:0] op);
    return op == OP_ST || op == OP_STR || op == OP_STI;
  endfunction

  // Instructions that write the register file
  function automatic logic writes_reg(input logic [3:0] op);
    return op == OP_ADD || op == OP_AND || op == OP_NOT || op == OP_LEA ||
           op == OP_JSR || is_load(op);
  endfunction

endpackage
