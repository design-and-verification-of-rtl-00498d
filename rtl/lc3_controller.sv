// lc3_controller: instruction sequencer of the LC-3.
//
// The processor is not pipelined: one instruction at a time passes through
//   FETCH     enable_fetch: the instruction memory reads the word at pc
//   DECODE    enable_decode: Decode latches the word and its control words
//   EXECUTE   enable_execute: Execute latches ALU result, address, NZP mask
//   MEM       loads and stores only: mem_state steps through the memory
//             states, each held until the data memory raises complete_data
//   WRITEBACK enable_writeback for instructions that write a register,
//             enable_updatePC, and br_taken for a taken branch or jump
// and then the next instruction is fetched. An ALU instruction takes four
// cycles; a memory instruction adds one state per memory access plus the
// memory's wait cycles.
//
// mem_state follows the memory-access state diagram: 1 (read indirect)
// goes to 0 (read) for LDI or to 2 (write) for STI; 0 and 2 go to 3 (init);
// every state waits while complete_data is 0. LD/LDR enter at 0, ST/STR at
// 2, LDI/STI at 1. Outside memory instructions mem_state is 3.
// br_taken = (NZP & psr) != 0, or NZP = 111 (JMP, JSR, JSRR, BRnzp).
// Only the opcode field IR[15:12] of the instruction is used here.
// Because operands are always in the register file by the time Execute
// reads them, the operand bypasses are never needed and are held at 0.
//
// The stage order and the mem_state diagram follow the document; the
// single-cycle stage timing, the WRITEBACK state that also updates the PC,
// the unconditional NZP = 111 case and the complete_data handshake (one
// cycle high per finished request) are this design's.
module lc3_controller
  import lc3_pkg::*;
(
  input  logic        clock,
  input  logic        reset,
  input  logic        complete_data,
  input  logic [15:0] IR,
  input  logic [2:0]  NZP,
  input  logic [2:0]  psr,
  output logic        enable_fetch,
  output logic        enable_decode,
  output logic        enable_execute,
  output logic        enable_writeback,
  output logic        enable_updatePC,
  output logic        br_taken,
  output mem_state_t  mem_state,
  output logic        bypass_alu_1,
  output logic        bypass_alu_2,
  output logic        bypass_mem_1,
  output logic        bypass_mem_2
);

  typedef enum logic [2:0] {
    S_FETCH, S_DECODE, S_EXECUTE, S_MEM, S_WRITEBACK
  } stage_t;

  stage_t     stage, stage_next;
  mem_state_t ms_next;
  logic [3:0] op;

  assign op = IR[15:12];

  always_comb begin
    stage_next = stage;
    ms_next    = mem_state;
    unique case (stage)
      S_FETCH:   stage_next = S_DECODE;
      S_DECODE:  stage_next = S_EXECUTE;
      S_EXECUTE: begin
        if (op == OP_LDI || op == OP_STI) begin
          stage_next = S_MEM;
          ms_next    = MS_READ_IND;
        end else if (is_load(op)) begin
          stage_next = S_MEM;
          ms_next    = MS_READ;
        end else if (is_store(op)) begin
          stage_next = S_MEM;
          ms_next    = MS_WRITE;
        end else begin
          stage_next = S_WRITEBACK;
        end
      end
      S_MEM: begin
        if (complete_data) begin
          unique case (mem_state)
            MS_READ_IND: ms_next = is_load(op) ? MS_READ : MS_WRITE;
            default:     ms_next = MS_INIT;
          endcase
          if (mem_state != MS_READ_IND) stage_next = S_WRITEBACK;
        end
      end
      S_WRITEBACK: stage_next = S_FETCH;
      default:     stage_next = S_FETCH;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      stage     <= S_FETCH;
      mem_state <= MS_INIT;
    end else begin
      stage     <= stage_next;
      mem_state <= ms_next;
    end
  end

  assign enable_fetch     = (stage == S_FETCH);
  assign enable_decode    = (stage == S_DECODE);
  assign enable_execute   = (stage == S_EXECUTE);
  assign enable_updatePC  = (stage == S_WRITEBACK);
  assign enable_writeback = (stage == S_WRITEBACK) && writes_reg(op);
  assign br_taken         = (stage == S_WRITEBACK) &&
                            ((NZP == 3'b111) || ((NZP & psr) != 3'b000));

  assign bypass_alu_1 = 1'b0;
  assign bypass_alu_2 = 1'b0;
  assign bypass_mem_1 = 1'b0;
  assign bypass_mem_2 = 1'b0;

  // mem_state is idle (3) whenever no memory instruction is in progress
  a_mem_idle: assert property (@(posedge clock) disable iff (reset)
                               stage != S_MEM |-> mem_state == MS_INIT);
  // exactly one stage enable is active
  a_one_stage: assert property (@(posedge clock) disable iff (reset)
                                $onehot({enable_fetch, enable_decode, enable_execute,
                                         stage == S_MEM, enable_updatePC}));

endmodule
