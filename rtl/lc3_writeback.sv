// lc3_writeback: register file R0-R7 and condition-code register.
//
// Two combinational read ports give VSR1 = R[sr1] and VSR2 = R[sr2] to
// Execute. On a rising clock edge with enable_writeback high, R[dr] is
// written with the value W_Control selects: 0 aluout, 1 memout, 2 pcout
// (LEA), 3 npc (the JSR/JSRR return address). The status register psr
// {N,Z,P} is set from the written value (100 negative, 010 zero,
// 001 positive), except for the npc link write, which leaves it unchanged.
// A write is visible on the read ports from the next cycle on. Reset
// (synchronous, active high) clears the registers and psr.
//
// The select encoding 0/1/2 and the N/Z/P meaning follow the document;
// select code 3, the psr rule for the link write, combinational reads and
// reset to zero are this design's.
module lc3_writeback
  import lc3_pkg::*;
(
  input  logic        clock,
  input  logic        reset,
  input  logic        enable_writeback,
  input  w_control_t  W_Control,
  input  logic [15:0] aluout,
  input  logic [15:0] memout,
  input  logic [15:0] pcout,
  input  logic [15:0] npc,
  input  logic [2:0]  sr1,
  input  logic [2:0]  sr2,
  input  logic [2:0]  dr,
  output logic [15:0] VSR1,
  output logic [15:0] VSR2,
  output logic [2:0]  psr
);

  logic [15:0] regfile [8];
  logic [15:0] wdata;

  always_comb begin
    unique case (W_Control)
      W_ALU:   wdata = aluout;
      W_MEM:   wdata = memout;
      W_PC:    wdata = pcout;
      default: wdata = npc;
    endcase
  end

  assign VSR1 = regfile[sr1];
  assign VSR2 = regfile[sr2];

  always_ff @(posedge clock) begin
    if (reset) begin
      for (int i = 0; i < 8; i++) regfile[i] <= '0;
      psr <= 3'b000;
    end else if (enable_writeback) begin
      regfile[dr] <= wdata;
      if (W_Control != W_NPC) psr <= nzp_of(wdata);
    end
  end

endmodule
