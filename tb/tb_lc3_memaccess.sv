// tb_lc3_memaccess: self-checking test of the data-memory port driver.
// Every mem_state with both M_Control values and random addresses/data is
// applied; DMem_addr, DMem_rd, DMem_din, DMem_en and memout are compared
// with the per-state table: 0 read at M_addr (DMem_dout if indirect),
// 1 read at M_addr, 2 write M_Data at M_addr (DMem_dout if indirect),
// 3 idle. A clock only paces the (combinational) unit.
module tb_lc3_memaccess;
  import lc3_pkg::*;
  logic        clock = 0;
  mem_state_t  mem_state = MS_INIT;
  logic        M_Control = 0;
  logic [15:0] M_Data = '0, M_addr = '0, DMem_dout = '0;
  logic [15:0] DMem_addr, DMem_din, memout;
  logic        DMem_rd, DMem_en;
  int          checks = 0, failures = 0;

  lc3_memaccess dut (.*);

  always #5 clock = ~clock;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s state=%0d mc=%0d addr=%h rd=%0d din=%h en=%0d",
               what, mem_state, M_Control, DMem_addr, DMem_rd, DMem_din, DMem_en);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_addr;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clock);
      mem_state = mem_state_t'(2'(i % 4));
      M_Control = 1'((i / 4) % 2);
      M_Data = 16'($urandom); M_addr = 16'($urandom); DMem_dout = 16'($urandom);
      #1;
      check(memout == DMem_dout, "memout");
      case (i % 4)
        0: begin
          exp_addr = M_Control ? DMem_dout : M_addr;
          check(DMem_en && DMem_rd && DMem_addr == exp_addr && DMem_din == 0, "state 0 read");
        end
        1: check(DMem_en && DMem_rd && DMem_addr == M_addr && DMem_din == 0, "state 1 read indirect");
        2: begin
          exp_addr = M_Control ? DMem_dout : M_addr;
          check(DMem_en && !DMem_rd && DMem_addr == exp_addr && DMem_din == M_Data, "state 2 write");
        end
        default: check(!DMem_en && !DMem_rd && DMem_addr == 0 && DMem_din == 0, "state 3 idle");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
