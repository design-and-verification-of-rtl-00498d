// tb_lc3_writeback: self-checking test of the register file and psr.
// Random writes with every W_Control source and random read selects are
// compared with a reference copy of R0-R7 and of the N/Z/P register kept in
// the testbench; directed writes of a negative, a zero and a positive value
// check the psr encoding, and the npc link write must leave psr unchanged.
module tb_lc3_writeback;
  import lc3_pkg::*;
  logic        clock = 0, reset = 1, enable_writeback = 0;
  w_control_t  W_Control = W_ALU;
  logic [15:0] aluout = '0, memout = '0, pcout = '0, npc = '0;
  logic [2:0]  sr1 = '0, sr2 = '0, dr = '0;
  logic [15:0] VSR1, VSR2;
  logic [2:0]  psr;
  int          checks = 0, failures = 0;
  logic [15:0] refreg [8];
  logic [2:0]  refpsr;

  lc3_writeback dut (.*);

  always #5 clock = ~clock;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s sr1=%0d sr2=%0d VSR1=%h VSR2=%h psr=%b ref_psr=%b",
               what, sr1, sr2, VSR1, VSR2, psr, refpsr);
    end
  endtask

  task automatic write(input logic [1:0] sel, input logic [2:0] d, input logic en);
    logic [15:0] v;
    W_Control = w_control_t'(sel); dr = d; enable_writeback = en;
    aluout = 16'($urandom); memout = 16'($urandom); pcout = 16'($urandom); npc = 16'($urandom);
    v = (sel == 0) ? aluout : (sel == 1) ? memout : (sel == 2) ? pcout : npc;
    @(posedge clock);
    #1 enable_writeback = 0;
    if (en) begin
      refreg[d] = v;
      if (sel != 3) refpsr = v[15] ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
    end
    check(psr == refpsr, "psr");
    for (int k = 0; k < 4; k++) begin
      sr1 = 3'($urandom); sr2 = 3'($urandom);
      #1 check(VSR1 == refreg[sr1] && VSR2 == refreg[sr2], "read ports");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clock);
    for (int i = 0; i < 8; i++) refreg[i] = '0;
    refpsr = 3'b000;
    #1;
    for (int i = 0; i < 8; i++) begin
      sr1 = 3'(i); #1 check(VSR1 == 0, "reset clears registers");
    end
    check(psr == 3'b000, "reset clears psr");
    reset = 0;
    // directed psr encoding through the ALU source
    W_Control = W_ALU; dr = 3'd1; enable_writeback = 1; aluout = 16'habdf;
    @(posedge clock); #1 check(psr == 3'b100, "negative -> N");
    aluout = 16'h0000; @(posedge clock); #1 check(psr == 3'b010, "zero -> Z");
    aluout = 16'h0005; @(posedge clock); #1 check(psr == 3'b001, "positive -> P");
    W_Control = W_NPC; npc = 16'h8000; dr = 3'd7;
    @(posedge clock); #1 check(psr == 3'b001, "link write keeps psr");
    sr1 = 3'd7; sr2 = 3'd1; #1 check(VSR1 == 16'h8000 && VSR2 == 16'h0005, "directed values");
    enable_writeback = 0;
    refreg[1] = 16'h0005; refreg[7] = 16'h8000; refpsr = 3'b001;
    for (int i = 0; i < 1000; i++) write(2'($urandom), 3'($urandom), ($urandom_range(0, 3) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
