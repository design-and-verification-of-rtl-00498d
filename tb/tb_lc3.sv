// tb_lc3: end-to-end test of the LC-3 processor against an instruction-set
// reference model.
//
// The testbench holds a 64K-word instruction memory (registered read) and a
// 64K-word data memory with the complete_data handshake and a random
// latency of 0-2 wait cycles per access. Both are filled with random words;
// the instruction memory holds random instructions everywhere, so every
// branch and jump target is a valid program point, and each word outside
// the fixed sequence is replaced by a new random instruction once it has
// been executed, so the random program cannot get caught in a loop. At 3000h it first holds
// a fixed sequence (LDI, ADD imm, ADD imm, ADD reg, AND reg, ADD reg, LDR,
// BR, JMP) followed by the random stream.
//
// A reference model written here (registers, N/Z/P, PC and its own copy of
// the data memory) executes each instruction when the processor retires it
// (the cycle of enable_updatePC); after that edge PC, R0-R7 and psr must
// match, and each store must have written the same word. At the end the
// whole data memory is compared. Each mechanism is counted and must occur
// at least once: every instruction kind, branch taken and not taken, the
// memory states 0, 1 and 2, memory wait cycles, the indirect address path,
// and a reset in the middle of the run. The number of clock cycles per
// instruction (4 for non-memory instructions) is checked as well.
module tb_lc3;
  import lc3_pkg::*;

  localparam int N_INSTR = 3000;

  logic        clock = 0, reset = 1;
  logic [15:0] pc, Instr_dout;
  logic        instrmem_rd;
  logic [15:0] DMem_addr, DMem_din, DMem_dout;
  logic        DMem_rd, DMem_en, complete_data;

  lc3 dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- memories ----------------
  logic [15:0] imem [65536];
  logic [15:0] dmem [65536];
  logic [15:0] rmem [65536];   // reference copy of the data memory

  always_ff @(posedge clock)
    if (instrmem_rd) Instr_dout <= imem[pc];

  int unsigned wait_cnt, wait_target;
  always_ff @(posedge clock) begin
    if (reset) begin
      complete_data <= 1'b0;
      wait_cnt      <= 0;
      wait_target   <= 0;
      DMem_dout     <= '0;
    end else if (complete_data) begin
      complete_data <= 1'b0;
    end else if (DMem_en) begin
      if (wait_cnt == wait_target) begin
        if (DMem_rd) DMem_dout <= dmem[DMem_addr];
        else         dmem[DMem_addr] <= DMem_din;
        complete_data <= 1'b1;
        wait_cnt      <= 0;
        wait_target   <= $urandom_range(0, 2);
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end
  end

  // ---------------- reference model ----------------
  logic [15:0] rreg [8];
  logic [2:0]  rpsr;
  logic [15:0] rpc;
  int          last_store_addr;

  function automatic logic [15:0] sx(input logic [15:0] v, input int bits);
    logic [15:0] m;
    m = (16'd1 << bits) - 16'd1;
    return v[bits-1] ? (v | ~m) : (v & m);
  endfunction

  function automatic logic [2:0] cc(input logic [15:0] v);
    return v[15] ? 3'b100 : (v == 16'd0) ? 3'b010 : 3'b001;
  endfunction

  // counters of the mechanisms exercised
  int n_op [16];
  int n_taken, n_not_taken, n_ms [4], n_wait, n_resets, n_jsrr;

  task automatic ref_step();
    logic [15:0] ir, npc, a, t;
    logic [2:0]  d, s1;
    ir  = imem[rpc];
    npc = rpc + 16'd1;
    d   = ir[11:9];
    s1  = ir[8:6];
    last_store_addr = -1;
    n_op[ir[15:12]]++;
    rpc = npc;
    case (ir[15:12])
      4'h1: begin rreg[d] = rreg[s1] + (ir[5] ? sx(ir, 5) : rreg[ir[2:0]]); rpsr = cc(rreg[d]); end
      4'h5: begin rreg[d] = rreg[s1] & (ir[5] ? sx(ir, 5) : rreg[ir[2:0]]); rpsr = cc(rreg[d]); end
      4'h9: begin rreg[d] = ~rreg[s1]; rpsr = cc(rreg[d]); end
      4'h0: begin
        if (ir[11:9] == 3'b111 || (ir[11:9] & rpsr) != 0) begin rpc = npc + sx(ir, 9); n_taken++; end
        else n_not_taken++;
      end
      4'hC: begin rpc = rreg[s1]; n_taken++; end
      4'h4: begin
        t = ir[11] ? npc + sx(ir, 11) : rreg[s1];
        if (!ir[11]) n_jsrr++;
        rreg[7] = npc; rpc = t; n_taken++;
      end
      4'h2: begin rreg[d] = rmem[npc + sx(ir, 9)]; rpsr = cc(rreg[d]); end
      4'h6: begin rreg[d] = rmem[rreg[s1] + sx(ir, 6)]; rpsr = cc(rreg[d]); end
      4'hA: begin rreg[d] = rmem[rmem[npc + sx(ir, 9)]]; rpsr = cc(rreg[d]); end
      4'hE: begin rreg[d] = npc + sx(ir, 9); rpsr = cc(rreg[d]); end
      4'h3: begin a = npc + sx(ir, 9);        rmem[a] = rreg[d]; last_store_addr = int'(a); end
      4'h7: begin a = rreg[s1] + sx(ir, 6);   rmem[a] = rreg[d]; last_store_addr = int'(a); end
      4'hB: begin a = rmem[npc + sx(ir, 9)];  rmem[a] = rreg[d]; last_store_addr = int'(a); end
      default: ;  // RTI, reserved, TRAP: no operation
    endcase
  endtask

  task automatic ref_reset();
    for (int i = 0; i < 8; i++) rreg[i] = '0;
    rpsr = 3'b000;
    rpc  = 16'h3000;
  endtask

  task automatic compare_state(input string when);
    check(pc == rpc, $sformatf("%s: pc %h, expected %h", when, pc, rpc));
    check(dut.u_writeback.psr == rpsr, $sformatf("%s: psr %b, expected %b", when,
                                                 dut.u_writeback.psr, rpsr));
    for (int i = 0; i < 8; i++)
      check(dut.u_writeback.regfile[i] == rreg[i],
            $sformatf("%s: R%0d %h, expected %h", when, i, dut.u_writeback.regfile[i], rreg[i]));
    if (last_store_addr >= 0)
      check(dmem[last_store_addr] == rmem[last_store_addr],
            $sformatf("%s: store at %h", when, last_store_addr));
  endtask

  // mechanism monitors
  always @(posedge clock) if (!reset) begin
    if (dut.u_controller.mem_state != MS_INIT) n_ms[dut.u_controller.mem_state]++;
    if (DMem_en && !complete_data && wait_cnt != wait_target) n_wait++;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (N_INSTR * 12 + 2000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  logic [15:0] prog [9] = '{16'ha7e8, 16'h12bc, 16'h1ab3, 16'h1a83, 16'h5a83,
                            16'h12de, 16'h6521, 16'h0351, 16'hc351};

  task automatic run(input int n);
    int retired, cyc, last_cyc;
    logic [15:0] retired_addr;
    logic [3:0] op;
    retired = 0; cyc = 0; last_cyc = 0;
    while (retired < n) begin
      @(negedge clock);
      cyc++;
      if (dut.enable_updatePC) begin
        op = dut.IR[15:12];
        if (!(is_load(op) || is_store(op)))
          check(cyc - last_cyc == 4, $sformatf("non-memory instruction took %0d cycles",
                                               cyc - last_cyc));
        last_cyc = cyc;
        @(posedge clock);
        #1;
        retired_addr = rpc;
        ref_step();
        compare_state($sformatf("instr %0d", retired));
        // replace the retired word so that random code cannot loop forever
        if (retired_addr < 16'h3000 || retired_addr > 16'h3008) imem[retired_addr] = 16'($urandom);
        retired++;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) begin
      imem[i] = 16'($urandom);
      dmem[i] = 16'($urandom);
      rmem[i] = dmem[i];
    end
    for (int i = 0; i < 9; i++) imem[16'h3000 + 16'(i)] = prog[i];
    ref_reset();
    repeat (3) @(posedge clock);
    #1 reset = 0;
    check(pc == 16'h3000, "pc after reset");
    run(N_INSTR / 2);
    // reset in the middle of a run: registers, psr and PC start over,
    // the data memory keeps its contents
    @(negedge clock) reset = 1;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    n_resets++;
    ref_reset();
    compare_state("after second reset");
    run(N_INSTR - N_INSTR / 2);
    for (int i = 0; i < 65536; i++)
      if (dmem[i] != rmem[i]) begin
        check(1'b0, $sformatf("data memory word %h differs", i));
        break;
      end
    checks++;

    // every mechanism must have happened
    foreach (n_op[i]) check(n_op[i] > 0, $sformatf("opcode %h never executed", i));
    check(n_taken > 0,     "no taken branch");
    check(n_not_taken > 0, "no branch that was not taken");
    check(n_ms[0] > 0 && n_ms[1] > 0 && n_ms[2] > 0, "a memory state never visited");
    check(n_wait > 0,      "no memory wait cycle");
    check(n_resets > 0,    "no reset during the run");
    check(n_jsrr > 0 && n_op[4] > n_jsrr, "JSR or JSRR never executed");
    $display("opcodes: BR=%0d ADD=%0d LD=%0d ST=%0d JSR=%0d AND=%0d LDR=%0d STR=%0d NOT=%0d LDI=%0d STI=%0d JMP=%0d LEA=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7],
             n_op[9], n_op[10], n_op[11], n_op[12], n_op[14]);
    $display("JSRR=%0d of JSR/JSRR", n_jsrr);
    $display("branches taken=%0d not taken=%0d; mem_state 0/1/2 cycles=%0d/%0d/%0d; wait cycles=%0d",
             n_taken, n_not_taken, n_ms[0], n_ms[1], n_ms[2], n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
