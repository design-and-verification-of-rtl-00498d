// tb_lc3_execute: self-checking test of the ALU / address-adder unit.
// Random instruction words, control words, register values and bypass
// selects are applied; the expected aluout, pcout, M_Data, dr, NZP,
// IR_Exec and passed-on controls are computed in the testbench from the
// raw bit fields. Checks the combinational sr1/sr2 selects, the register
// hold while enable_execute is low, and reset. Includes directed ADD, AND,
// NOT, LEA/LD address, LDR base+offset6, JSR offset11 and JMP cases.
module tb_lc3_execute;
  import lc3_pkg::*;
  logic        clock = 0, reset = 1, enable_execute = 0;
  e_control_t  E_control = '0;
  logic        bypass_alu_1 = 0, bypass_alu_2 = 0, bypass_mem_1 = 0, bypass_mem_2 = 0;
  logic [15:0] IR = '0, npc_in = '0, Mem_Bypass_Val = '0, VSR1 = '0, VSR2 = '0;
  logic        Mem_Control_in = 0;
  w_control_t  W_Control_in = W_ALU;
  logic [15:0] aluout, pcout, M_Data, IR_Exec;
  w_control_t  W_Control_out;
  logic        Mem_Control_out;
  logic [2:0]  dr, sr1, sr2, NZP;
  int          checks = 0, failures = 0;

  lc3_execute dut (.*);

  always #5 clock = ~clock;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s IR=%h E=%h alu=%h pc=%h", what, IR, E_control, aluout, pcout);
    end
  endtask

  function automatic logic [15:0] sx(input logic [15:0] v, input int bits);
    logic [15:0] r;
    r = v & ((16'd1 << bits) - 16'd1);
    if (v[bits-1]) r = r | ~((16'd1 << bits) - 16'd1);
    return r;
  endfunction

  // apply inputs, clock once, compare
  task automatic run_one();
    logic [15:0] a, b, exp_alu, exp_pc, base, off;
    logic [2:0]  exp_dr, exp_nzp, exp_sr2;
    logic [15:0] prev_alu;
    prev_alu = aluout;
    a = bypass_alu_1 ? prev_alu : (bypass_mem_1 ? Mem_Bypass_Val : VSR1);
    b = bypass_alu_2 ? prev_alu : (bypass_mem_2 ? Mem_Bypass_Val : VSR2);
    case (E_control[5:4])
      2'b00: exp_alu = a + (E_control[0] ? b : sx(IR, 5));
      2'b01: exp_alu = a & (E_control[0] ? b : sx(IR, 5));
      2'b10: exp_alu = ~a;
      default: exp_alu = a;
    endcase
    case (E_control[3:2])
      2'b00: off = sx(IR, 11);
      2'b01: off = sx(IR, 9);
      2'b10: off = sx(IR, 6);
      default: off = 16'h0000;
    endcase
    base   = E_control[1] ? npc_in : a;
    exp_pc = base + off;
    exp_dr = (IR[15:12] == 4'b0100) ? 3'd7 : IR[11:9];
    exp_nzp = (IR[15:12] == 4'b0000) ? IR[11:9] :
              (IR[15:12] == 4'b1100 || IR[15:12] == 4'b0100) ? 3'b111 : 3'b000;
    exp_sr2 = (IR[15:12] == 4'b0011 || IR[15:12] == 4'b0111 || IR[15:12] == 4'b1011)
              ? IR[11:9] : IR[2:0];
    #1;
    check(sr1 == IR[8:6], "sr1");
    check(sr2 == exp_sr2, "sr2");
    enable_execute = 1;
    @(posedge clock);
    #1 enable_execute = 0;
    check(aluout == exp_alu, "aluout");
    check(pcout == exp_pc, "pcout");
    check(M_Data == b, "M_Data");
    check(dr == exp_dr, "dr");
    check(NZP == exp_nzp, "NZP");
    check(IR_Exec == IR, "IR_Exec");
    check(W_Control_out == W_Control_in && Mem_Control_out == Mem_Control_in, "controls");
    // hold
    IR = 16'($urandom); VSR1 = 16'($urandom);
    @(posedge clock);
    #1 check(aluout == exp_alu && pcout == exp_pc && dr == exp_dr && NZP == exp_nzp, "hold");
  endtask

  initial begin
    repeat (40000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clock);
    #1 check(aluout == 0 && pcout == 0 && dr == 0 && NZP == 0 && IR_Exec == 0, "reset");
    reset = 0;
    // ADD R1,R2,#-4 with R2=0x0010 -> 0x000c
    IR = 16'h12bc; E_control = 6'h00; VSR1 = 16'h0010; VSR2 = 16'h0; npc_in = 16'h3002;
    run_one(); check(aluout == 16'h000c, "ADD imm value");
    // AND R5,R2,R3 0x00f5 & 0x0f0f = 0x0005
    IR = 16'h5a83; E_control = 6'h11; VSR1 = 16'h00f5; VSR2 = 16'h0f0f;
    run_one(); check(aluout == 16'h0005, "AND reg value");
    // NOT R1,R2: ~0x1234
    IR = 16'h92bf; E_control = 6'h20; VSR1 = 16'h1234;
    run_one(); check(aluout == 16'hedcb, "NOT value");
    // LDI a7e8 at npc 3001: 3001 + sext(1e8) = 2fe9
    IR = 16'ha7e8; E_control = 6'h06; npc_in = 16'h3001;
    run_one(); check(pcout == 16'h2fe9, "offset9 address");
    // LDR R2,R4,#-31 with R4 = 0x0100 -> 0x00e1
    IR = 16'h6521; E_control = 6'h08; VSR1 = 16'h0100;
    run_one(); check(pcout == 16'h00e1, "offset6 address");
    // JSR with offset11 = 0x400 (that is -1024) from npc 3010 -> 2c10
    IR = 16'h4c00; E_control = 6'h02; npc_in = 16'h3010;
    run_one(); check(pcout == 16'h2c10 && dr == 3'd7 && NZP == 3'b111, "JSR offset11");
    // JMP R5 with R5 = 0x4000
    IR = 16'hc140; E_control = 6'h0c; VSR1 = 16'h4000;
    run_one(); check(pcout == 16'h4000 && NZP == 3'b111, "JMP target");
    // BRz
    IR = 16'h0403; E_control = 6'h06; npc_in = 16'h3000;
    run_one(); check(pcout == 16'h3003 && NZP == 3'b010, "BR mask");
    // random, bypasses included
    for (int i = 0; i < 2000; i++) begin
      IR = 16'($urandom); E_control = 6'($urandom);
      VSR1 = 16'($urandom); VSR2 = 16'($urandom); npc_in = 16'($urandom);
      Mem_Bypass_Val = 16'($urandom);
      Mem_Control_in = 1'($urandom); W_Control_in = w_control_t'(2'($urandom));
      {bypass_alu_1, bypass_alu_2, bypass_mem_1, bypass_mem_2} = 4'($urandom);
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
