// tb_lc3_fetch: self-checking test of the program counter unit.
// Checks the reset value 3000h, npc = pc + 1, PC hold while enable_updatePC
// is low, increment, branch load of taddr when br_taken is high, and that
// instrmem_rd follows enable_fetch. A reference PC is kept in the testbench.
module tb_lc3_fetch;
  logic        clock = 0, reset = 1;
  logic        enable_updatePC = 0, enable_fetch = 0, br_taken = 0;
  logic [15:0] taddr = '0;
  logic [15:0] pc, npc;
  logic        instrmem_rd;
  int          checks = 0, failures = 0;
  logic [15:0] ref_pc;

  lc3_fetch dut (.*);

  always #5 clock = ~clock;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (pc=%h npc=%h ref=%h)", what, pc, npc, ref_pc);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clock);
    #1 ref_pc = 16'h3000;
    check(pc == 16'h3000, "reset value");
    check(npc == 16'h3001, "npc at reset");
    reset = 0;
    for (int i = 0; i < 500; i++) begin
      enable_updatePC = 1'($urandom_range(0, 1));
      enable_fetch    = 1'($urandom_range(0, 1));
      br_taken        = ($urandom_range(0, 3) == 0);
      taddr           = 16'($urandom);
      #1 check(instrmem_rd == enable_fetch, "instrmem_rd follows enable_fetch");
      check(npc == ref_pc + 16'd1, "npc = pc + 1");
      @(posedge clock);
      if (enable_updatePC) ref_pc = br_taken ? taddr : ref_pc + 16'd1;
      #1 check(pc == ref_pc, "pc update");
    end
    // reset again in the middle of a run
    reset = 1;
    @(posedge clock);
    #1 check(pc == 16'h3000, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
