// lc3_execute: ALU and address adder of the LC-3.
//
// Two datapaths work side by side on the instruction held in Decode's IR:
//  * ALU: ADD, AND or NOT (E_control.alu_control). Operand 1 is VSR1,
//    operand 2 is VSR2 (op2select = 1) or the sign-extended imm5 field.
//  * Address adder: a sign-extended offset (offset11, offset9, offset6 or
//    zero, selected by pcselect1) plus either npc (pcselect2 = 1) or the base
//    register VSR1. The sum, pcout, is the load/store address, the branch or
//    jump target, and the LEA result.
// Each register operand can be replaced by a forwarded value: bypass_alu_n
// selects the previous aluout and bypass_mem_n the value Mem_Bypass_Val;
// the ALU bypass has priority.
//
// Source selects sr1 = IR[8:6] and sr2 = IR[2:0] (IR[11:9] for stores, so
// that VSR2 is the store data) are combinational and go to the register
// file. On a rising clock edge with enable_execute high the unit registers
// aluout, pcout, M_Data (the store value), dr, the branch mask NZP
// (IR[11:9] for BR, 111 for JMP/JSR/JSRR, 000 otherwise), IR_Exec and the
// W/Mem control words passed on from Decode. Reset (synchronous, active
// high) clears the registers.
//
// The ports follow the document. The operation encodings, the bypass
// priority, the sr2 choice for stores and the NZP rule for jumps are this
// design's.
module lc3_execute
  import lc3_pkg::*;
(
  input  logic        clock,
  input  logic        reset,
  input  logic        enable_execute,
  input  e_control_t  E_control,
  input  logic        bypass_alu_1,
  input  logic        bypass_alu_2,
  input  logic        bypass_mem_1,
  input  logic        bypass_mem_2,
  input  logic [15:0] IR,
  input  logic [15:0] npc_in,
  input  logic        Mem_Control_in,
  input  w_control_t  W_Control_in,
  input  logic [15:0] Mem_Bypass_Val,
  input  logic [15:0] VSR1,
  input  logic [15:0] VSR2,
  output logic [15:0] aluout,
  output logic [15:0] pcout,
  output w_control_t  W_Control_out,
  output logic        Mem_Control_out,
  output logic [15:0] M_Data,
  output logic [2:0]  dr,
  output logic [2:0]  sr1,
  output logic [2:0]  sr2,
  output logic [2:0]  NZP,
  output logic [15:0] IR_Exec
);

  opcode_t     op;
  logic [15:0] val1, val2, alu_b, alu_res;
  logic [15:0] offset, addr_base, addr_res;
  logic [2:0]  dr_next, nzp_next;

  assign op  = opcode_t'(IR[15:12]);
  assign sr1 = IR[8:6];
  assign sr2 = is_store(IR[15:12]) ? IR[11:9] : IR[2:0];

  // Operand selection with forwarding
  always_comb begin
    if (bypass_alu_1)      val1 = aluout;
    else if (bypass_mem_1) val1 = Mem_Bypass_Val;
    else                   val1 = VSR1;
    if (bypass_alu_2)      val2 = aluout;
    else if (bypass_mem_2) val2 = Mem_Bypass_Val;
    else                   val2 = VSR2;
  end

  // ALU
  assign alu_b = E_control.op2select ? val2 : {{11{IR[4]}}, IR[4:0]};
  always_comb begin
    unique case (E_control.alu_control)
      ALU_ADD:  alu_res = val1 + alu_b;
      ALU_AND:  alu_res = val1 & alu_b;
      ALU_NOT:  alu_res = ~val1;
      default:  alu_res = val1;
    endcase
  end

  // Address adder
  always_comb begin
    unique case (E_control.pcselect1)
      PC1_OFF11: offset = {{5{IR[10]}}, IR[10:0]};
      PC1_OFF9:  offset = {{7{IR[8]}},  IR[8:0]};
      PC1_OFF6:  offset = {{10{IR[5]}}, IR[5:0]};
      default:   offset = '0;
    endcase
  end
  assign addr_base = E_control.pcselect2 ? npc_in : val1;
  assign addr_res  = addr_base + offset;

  // Destination register and branch mask
  always_comb begin
    dr_next  = (op == OP_JSR) ? 3'd7 : IR[11:9];
    nzp_next = 3'b000;
    if (op == OP_BR)                      nzp_next = IR[11:9];
    else if (op == OP_JMP || op == OP_JSR) nzp_next = 3'b111;
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      aluout          <= '0;
      pcout           <= '0;
      W_Control_out   <= W_ALU;
      Mem_Control_out <= 1'b0;
      M_Data          <= '0;
      dr              <= '0;
      NZP             <= '0;
      IR_Exec         <= '0;
    end else if (enable_execute) begin
      aluout          <= alu_res;
      pcout           <= addr_res;
      W_Control_out   <= W_Control_in;
      Mem_Control_out <= Mem_Control_in;
      M_Data          <= val2;
      dr              <= dr_next;
      NZP             <= nzp_next;
      IR_Exec         <= IR;
    end
  end

endmodule
