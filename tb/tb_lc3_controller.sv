// tb_lc3_controller: self-checking test of the instruction sequencer.
// For random opcodes, branch masks, condition codes and memory wait times,
// the testbench builds the expected cycle-by-cycle sequence: FETCH, DECODE,
// EXECUTE, then for loads/stores one memory state per access (LD/LDR: 0;
// ST/STR: 2; LDI: 1 then 0; STI: 1 then 2), each lasting the wait cycles
// plus the cycle in which complete_data is high, then WRITEBACK. Each cycle
// the enables, mem_state, enable_writeback and br_taken are compared, so the
// instruction latency (4 cycles plus the memory states) is checked too.
module tb_lc3_controller;
  import lc3_pkg::*;
  logic        clock = 0, reset = 1, complete_data = 0;
  logic [15:0] IR = '0;
  logic [2:0]  NZP = '0, psr = '0;
  logic        enable_fetch, enable_decode, enable_execute, enable_writeback;
  logic        enable_updatePC, br_taken;
  mem_state_t  mem_state;
  logic        bypass_alu_1, bypass_alu_2, bypass_mem_1, bypass_mem_2;
  int          checks = 0, failures = 0;
  int          n_ldi = 0, n_sti = 0, n_taken = 0, n_wait = 0;

  lc3_controller dut (.*);

  always #5 clock = ~clock;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s op=%h f=%0d d=%0d e=%0d wb=%0d upd=%0d br=%0d ms=%0d", what, IR[15:12],
               enable_fetch, enable_decode, enable_execute, enable_writeback,
               enable_updatePC, br_taken, mem_state);
    end
  endtask

  // expect one cycle; code: 0 fetch, 1 decode, 2 execute, 3 memory, 4 writeback
  task automatic expect_cycle(input int code, input logic [1:0] ms, input logic cd,
                              input logic wb, input logic br);
    complete_data = cd;
    #1;
    check(enable_fetch == (code == 0), "enable_fetch");
    check(enable_decode == (code == 1), "enable_decode");
    check(enable_execute == (code == 2), "enable_execute");
    check(enable_updatePC == (code == 4), "enable_updatePC");
    check(mem_state == mem_state_t'(code == 3 ? ms : 2'd3), "mem_state");
    check(enable_writeback == (code == 4 && wb), "enable_writeback");
    check(br_taken == (code == 4 && br), "br_taken");
    check({bypass_alu_1, bypass_alu_2, bypass_mem_1, bypass_mem_2} == 4'b0, "bypasses idle");
    @(posedge clock);
    #1 complete_data = 0;
  endtask

  task automatic mem_phase(input logic [1:0] ms);
    int w;
    w = $urandom_range(0, 3);
    n_wait += w;
    for (int k = 0; k < w; k++) expect_cycle(3, ms, 1'b0, 1'b0, 1'b0);
    expect_cycle(3, ms, 1'b1, 1'b0, 1'b0);
  endtask

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] op;
    logic       wb, br;
    int         start, cycles;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    for (int i = 0; i < 600; i++) begin
      op  = 4'($urandom);
      IR  = {op, 12'($urandom)};
      NZP = 3'($urandom);
      psr = 3'($urandom);
      wb  = op inside {4'h1, 4'h5, 4'h9, 4'hE, 4'h4, 4'h2, 4'h6, 4'hA};
      br  = (NZP == 3'b111) || ((NZP & psr) != 0);
      start = $time;
      expect_cycle(0, 2'd3, 1'b0, 1'b0, 1'b0);
      expect_cycle(1, 2'd3, 1'b0, 1'b0, 1'b0);
      expect_cycle(2, 2'd3, 1'b0, 1'b0, 1'b0);
      cycles = 3;
      case (op)
        4'h2, 4'h6: mem_phase(2'd0);
        4'h3, 4'h7: mem_phase(2'd2);
        4'hA: begin mem_phase(2'd1); mem_phase(2'd0); n_ldi++; end
        4'hB: begin mem_phase(2'd1); mem_phase(2'd2); n_sti++; end
        default: ;
      endcase
      if (br) n_taken++;
      expect_cycle(4, 2'd3, 1'b0, wb, br);
      // ALU instruction latency is four cycles
      if (op == 4'h1) check(($time - start) == 40, "ALU instruction takes 4 cycles");
    end
    check(n_ldi > 0 && n_sti > 0 && n_taken > 0 && n_wait > 0, "all paths seen");
    $display("LDI=%0d STI=%0d taken=%0d wait cycles=%0d", n_ldi, n_sti, n_taken, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
