// lc3: top of the LC-3 16-bit RISC processor.
//
// The processor runs the LC-3 instruction set (ADD, AND, NOT, BR, JMP/RET,
// JSR, JSRR, LD, LDR, LDI, LEA, ST, STR, STI) one instruction at a time,
// stepped by lc3_controller through fetch, decode, execute, memory access
// and writeback. Units:
//   lc3_fetch      PC (reset to PC_RESET = 3000h), npc = pc + 1, branch load
//   lc3_decode     IR and the control words for the later units
//   lc3_execute    ALU and address adder
//   lc3_memaccess  data-memory port driver (mem_state)
//   lc3_writeback  register file R0-R7 and condition codes psr
//   lc3_controller stage sequencing and branch decision
// The instruction and data memories are outside (Harvard organisation).
//
// Interface and timing:
//   Instruction memory: when instrmem_rd is high the memory must present
//   the word at address pc on Instr_dout after the next rising edge and
//   hold it (registered read).
//   Data memory: a request is present while DMem_en is high (DMem_rd = 1
//   read, 0 write of DMem_din) at DMem_addr. The memory performs it after
//   any number of wait cycles and raises complete_data for one cycle;
//   read data must appear on DMem_dout together with complete_data and stay
//   there until the next read. The memory must ignore the request in the
//   cycle in which complete_data is high. DMem_dout is also fed back as the
//   address for LDI and STI.
// TRAP, RTI and the reserved opcode only advance the PC. Execute's IR_Exec
// output is not needed here, since Decode's IR is held until the next fetch.
module lc3
  import lc3_pkg::*;
#(
  parameter logic [15:0] PC_RESET = 16'h3000
) (
  input  logic        clock,
  input  logic        reset,
  // instruction memory
  output logic [15:0] pc,
  output logic        instrmem_rd,
  input  logic [15:0] Instr_dout,
  // data memory
  output logic [15:0] DMem_addr,
  output logic [15:0] DMem_din,
  output logic        DMem_rd,
  output logic        DMem_en,
  input  logic [15:0] DMem_dout,
  input  logic        complete_data
);

  logic        enable_fetch, enable_decode, enable_execute;
  logic        enable_writeback, enable_updatePC, br_taken;
  logic        bypass_alu_1, bypass_alu_2, bypass_mem_1, bypass_mem_2;
  mem_state_t  mem_state;
  logic [15:0] npc, IR, npc_out, IR_Exec;
  e_control_t  E_control;
  w_control_t  W_control, W_Control_out;
  logic        Mem_control, Mem_Control_out;
  logic [15:0] aluout, pcout, M_Data, memout, VSR1, VSR2;
  logic [2:0]  dr, sr1, sr2, NZP, psr;

  lc3_fetch #(.PC_RESET(PC_RESET)) u_fetch (
    .clock, .reset, .enable_updatePC, .enable_fetch,
    .taddr(pcout), .br_taken, .pc, .npc, .instrmem_rd
  );

  lc3_decode u_decode (
    .clock, .reset, .enable_decode, .npc_in(npc), .Instr_dout, .psr,
    .IR, .npc_out, .E_control, .W_control, .Mem_control
  );

  lc3_execute u_execute (
    .clock, .reset, .enable_execute, .E_control,
    .bypass_alu_1, .bypass_alu_2, .bypass_mem_1, .bypass_mem_2,
    .IR, .npc_in(npc_out), .Mem_Control_in(Mem_control),
    .W_Control_in(W_control), .Mem_Bypass_Val(memout), .VSR1, .VSR2,
    .aluout, .pcout, .W_Control_out, .Mem_Control_out, .M_Data,
    .dr, .sr1, .sr2, .NZP, .IR_Exec
  );

  lc3_memaccess u_memaccess (
    .mem_state, .M_Control(Mem_Control_out), .M_Data, .M_addr(pcout),
    .DMem_dout, .DMem_addr, .DMem_rd, .DMem_din, .DMem_en, .memout
  );

  lc3_writeback u_writeback (
    .clock, .reset, .enable_writeback, .W_Control(W_Control_out),
    .aluout, .memout, .pcout, .npc(npc_out), .sr1, .sr2, .dr,
    .VSR1, .VSR2, .psr
  );

  lc3_controller u_controller (
    .clock, .reset, .complete_data, .IR, .NZP, .psr,
    .enable_fetch, .enable_decode, .enable_execute, .enable_writeback,
    .enable_updatePC, .br_taken, .mem_state,
    .bypass_alu_1, .bypass_alu_2, .bypass_mem_1, .bypass_mem_2
  );

endmodule
