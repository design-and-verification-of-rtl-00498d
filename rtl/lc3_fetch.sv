// lc3_fetch: program counter of the LC-3.
//
// The PC register is set to PC_RESET (3000h) by reset. When enable_updatePC
// is high at a rising clock edge the PC loads either npc = pc + 1 or, when
// br_taken is high, the branch/jump target taddr computed by Execute. npc is
// combinational (pc + 1), so it is valid in the same cycle as pc.
// instrmem_rd follows enable_fetch and tells the instruction memory to read
// the word at pc; the memory's data is latched by Decode.
//
// Timing: pc changes one clock edge after enable_updatePC; npc and
// instrmem_rd are combinational. Reset is synchronous and active high.
// The reset value, pc/npc behaviour and port list follow the document; the
// synchronous reset and driving instrmem_rd low (rather than undriven) when
// fetch is disabled are this design's choices.
module lc3_fetch #(
  parameter logic [15:0] PC_RESET = 16'h3000
) (
  input  logic        clock,
  input  logic        reset,
  input  logic        enable_updatePC,
  input  logic        enable_fetch,
  input  logic [15:0] taddr,
  input  logic        br_taken,
  output logic [15:0] pc,
  output logic [15:0] npc,
  output logic        instrmem_rd
);

  assign npc         = pc + 16'd1;
  assign instrmem_rd = enable_fetch;

  always_ff @(posedge clock) begin
    if (reset)
      pc <= PC_RESET;
    else if (enable_updatePC)
      pc <= br_taken ? taddr : npc;
  end

endmodule
