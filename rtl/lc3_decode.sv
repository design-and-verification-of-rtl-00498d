// lc3_decode: instruction register and control-word generation.
//
// When enable_decode is high at a rising clock edge, the instruction word
// from the instruction memory (Instr_dout) is latched into IR and the
// fetch unit's npc into npc_out, and three control words are registered
// from the opcode:
//   E_control   {alu_control, pcselect1, pcselect2, op2select} for Execute
//   W_control   which value the Writeback unit writes to the register file:
//               0 aluout, 1 memout, 2 pcout (LEA), 3 npc (JSR/JSRR link)
//   Mem_control 1 for the indirect memory instructions LDI and STI
// All outputs are registers, valid the cycle after enable_decode; reset
// (synchronous, active high) clears them. The psr input appears on the
// unit's documented interface but no decoding depends on it, so it is left
// unused (branch conditions are resolved by the controller).
//
// The document gives the ports and the three outputs' roles; the encodings
// are this design's, chosen to agree with the control-word values the
// document shows for LDI, ADD, AND, LDR, BR and JMP.
module lc3_decode
  import lc3_pkg::*;
(
  input  logic        clock,
  input  logic        reset,
  input  logic        enable_decode,
  input  logic [15:0] npc_in,
  input  logic [15:0] Instr_dout,
  input  logic [2:0]  psr,
  output logic [15:0] IR,
  output logic [15:0] npc_out,
  output e_control_t  E_control,
  output w_control_t  W_control,
  output logic        Mem_control
);

  e_control_t e_next;
  w_control_t w_next;
  logic       m_next;

  always_comb begin
    e_next = '{alu_control: ALU_ADD, pcselect1: PC1_OFF11, pcselect2: 1'b0, op2select: 1'b0};
    w_next = W_ALU;
    m_next = 1'b0;
    unique case (opcode_t'(Instr_dout[15:12]))
      OP_ADD: e_next.op2select = ~Instr_dout[5];
      OP_AND: begin
        e_next.alu_control = ALU_AND;
        e_next.op2select   = ~Instr_dout[5];
      end
      OP_NOT: e_next.alu_control = ALU_NOT;
      OP_BR, OP_LD, OP_ST, OP_LEA, OP_LDI, OP_STI: begin
        e_next.pcselect1 = PC1_OFF9;
        e_next.pcselect2 = 1'b1;
      end
      OP_LDR, OP_STR: e_next.pcselect1 = PC1_OFF6;
      OP_JMP: e_next.pcselect1 = PC1_ZERO;
      OP_JSR: begin
        // JSR: npc + offset11; JSRR: base register + 0
        e_next.pcselect1 = Instr_dout[11] ? PC1_OFF11 : PC1_ZERO;
        e_next.pcselect2 = Instr_dout[11];
      end
      default: ;
    endcase
    unique case (opcode_t'(Instr_dout[15:12]))
      OP_LD, OP_LDR, OP_LDI: w_next = W_MEM;
      OP_LEA:                w_next = W_PC;
      OP_JSR:                w_next = W_NPC;
      default:               w_next = W_ALU;
    endcase
    m_next = (Instr_dout[15:12] == OP_LDI) || (Instr_dout[15:12] == OP_STI);
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      IR          <= '0;
      npc_out     <= '0;
      E_control   <= '0;
      W_control   <= W_ALU;
      Mem_control <= 1'b0;
    end else if (enable_decode) begin
      IR          <= Instr_dout;
      npc_out     <= npc_in;
      E_control   <= e_next;
      W_control   <= w_next;
      Mem_control <= m_next;
    end
  end

endmodule
