// lc3_memaccess: data-memory port driver of the LC-3.
//
// Purely combinational. The controller's mem_state says what the data
// memory does this cycle:
//   0 read        DMem_addr = M_addr (LD, LDR) or DMem_dout (LDI: the word
//                 read in state 1 is the address), DMem_rd = 1
//   1 read ind.   DMem_addr = M_addr, DMem_rd = 1 (first read of LDI, STI)
//   2 write       DMem_addr = M_addr (ST, STR) or DMem_dout (STI),
//                 DMem_din = M_Data, DMem_rd = 0
//   3 idle        no request
// M_Control = 1 marks the indirect instructions. memout is the memory's
// read data. DMem_din is 0 except when writing.
//
// The state meanings follow the document. The document leaves the bus
// undriven in state 3; this two-state design drives zeros there and uses an
// extra DMem_en output to say whether a request is present. Using DMem_dout
// as an address requires a data memory whose read data is registered and
// held between requests.
module lc3_memaccess
  import lc3_pkg::*;
(
  input  mem_state_t  mem_state,
  input  logic        M_Control,
  input  logic [15:0] M_Data,
  input  logic [15:0] M_addr,
  input  logic [15:0] DMem_dout,
  output logic [15:0] DMem_addr,
  output logic        DMem_rd,
  output logic [15:0] DMem_din,
  output logic        DMem_en,
  output logic [15:0] memout
);

  assign memout = DMem_dout;

  always_comb begin
    DMem_addr = '0;
    DMem_din  = '0;
    DMem_rd   = 1'b0;
    DMem_en   = 1'b0;
    unique case (mem_state)
      MS_READ: begin
        DMem_addr = M_Control ? DMem_dout : M_addr;
        DMem_rd   = 1'b1;
        DMem_en   = 1'b1;
      end
      MS_READ_IND: begin
        DMem_addr = M_addr;
        DMem_rd   = 1'b1;
        DMem_en   = 1'b1;
      end
      MS_WRITE: begin
        DMem_addr = M_Control ? DMem_dout : M_addr;
        DMem_din  = M_Data;
        DMem_en   = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
