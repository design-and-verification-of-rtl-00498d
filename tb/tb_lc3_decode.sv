// tb_lc3_decode: self-checking test of the decode unit.
// Directed part: instruction words with known control words
// (LDI a7e8 -> 6'h06, ADD imm 12bc -> 6'h00, ADD reg 1a83 -> 6'h01,
// AND reg 5a83 -> 6'h11, LDR 6521 -> 6'h08, BR 0351 -> 6'h06,
// JMP c351 -> 6'h0c). Random part: every opcode against a reference table
// written out per opcode in this testbench. Also checks that the outputs
// hold while enable_decode is low and that reset clears them.
module tb_lc3_decode;
  import lc3_pkg::*;
  logic        clock = 0, reset = 1, enable_decode = 0;
  logic [15:0] npc_in = '0, Instr_dout = '0;
  logic [2:0]  psr = '0;
  logic [15:0] IR, npc_out;
  e_control_t  E_control;
  w_control_t  W_control;
  logic        Mem_control;
  int          checks = 0, failures = 0;

  lc3_decode dut (.*);

  always #5 clock = ~clock;

  // expected {E_control[5:0], W_control[1:0], Mem_control}
  function automatic logic [8:0] expect_ctl(input logic [15:0] ir);
    logic [5:0] e; logic [1:0] w; logic m;
    e = 6'h00; w = 2'd0; m = 1'b0;
    case (ir[15:12])
      4'h1: e = ir[5] ? 6'h00 : 6'h01;          // ADD
      4'h5: e = ir[5] ? 6'h10 : 6'h11;          // AND
      4'h9: e = 6'h20;                          // NOT
      4'h0: e = 6'h06;                          // BR
      4'h2: begin e = 6'h06; w = 2'd1; end      // LD
      4'h3: e = 6'h06;                          // ST
      4'hE: begin e = 6'h06; w = 2'd2; end      // LEA
      4'hA: begin e = 6'h06; w = 2'd1; m = 1; end // LDI
      4'hB: begin e = 6'h06; m = 1; end         // STI
      4'h6: begin e = 6'h08; w = 2'd1; end      // LDR
      4'h7: e = 6'h08;                          // STR
      4'hC: e = 6'h0c;                          // JMP
      4'h4: begin e = ir[11] ? 6'h02 : 6'h0c; w = 2'd3; end // JSR/JSRR
      default: ;
    endcase
    return {e, w, m};
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s IR=%h E=%h W=%0d M=%0d", what, IR, E_control, W_control, Mem_control);
    end
  endtask

  task automatic decode_one(input logic [15:0] instr, input logic [15:0] npc);
    Instr_dout = instr; npc_in = npc; enable_decode = 1;
    @(posedge clock);
    #1 enable_decode = 0;
    check(IR == instr, "IR latched");
    check(npc_out == npc, "npc latched");
    check({E_control, W_control, Mem_control} == expect_ctl(instr), "control words");
    // hold while disabled
    Instr_dout = 16'($urandom); npc_in = 16'($urandom);
    @(posedge clock);
    #1 check(IR == instr && npc_out == npc &&
             {E_control, W_control, Mem_control} == expect_ctl(instr), "hold");
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
    #1 check(IR == 0 && npc_out == 0 && E_control == 0 && W_control == W_ALU && !Mem_control,
             "reset clears");
    reset = 0;
    // directed: values printed for the unit's reference waveform
    decode_one(16'ha7e8, 16'h3001); check(E_control == 6'h06 && Mem_control, "LDI a7e8");
    decode_one(16'h12bc, 16'h3002); check(E_control == 6'h00, "ADD 12bc");
    decode_one(16'h1a83, 16'h3004); check(E_control == 6'h01, "ADD 1a83");
    decode_one(16'h5a83, 16'h3005); check(E_control == 6'h11, "AND 5a83");
    decode_one(16'h6521, 16'h3007); check(E_control == 6'h08 && !Mem_control, "LDR 6521");
    decode_one(16'h0351, 16'h3008); check(E_control == 6'h06, "BR 0351");
    decode_one(16'hc351, 16'h3009); check(E_control == 6'h0c, "JMP c351");
    // random
    for (int i = 0; i < 1000; i++) begin
      psr = 3'($urandom);
      decode_one(16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
