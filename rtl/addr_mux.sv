// addr_mux: the memory-address multiplexer (MUX) of the 8-bit teaching computer.
//
// Picks one of four 8-bit address sources for the memory and the address decoder,
// under control of the two MEM_SEL lines: the external loader address PROG_ADDR, the
// index register X, the program counter PC or the memory address register MAR. It is
// purely combinational; the selected address is valid one gate delay after MEM_SEL.
// The four sources and their 8-bit width follow the computer's description; the code
// given to each source (PROG_ADDR 00, X 01, PC 10, MAR 11) is in cu_pkg, where PC and
// MAR take the codes of the control-unit example and the other two are this design's
// choice.
module addr_mux
  import cu_pkg::*;
(
  input  mem_sel_e mem_sel,    // MEM_SEL
  input  addr_t    prog_addr,  // PROG_ADDR, external loader address
  input  addr_t    x,          // index register
  input  addr_t    pc,         // program counter
  input  addr_t    mar,        // memory address register
  output addr_t    addr        // address to memory and decoder
);

  always_comb begin
    unique case (mem_sel)
      SEL_PROG: addr = prog_addr;
      SEL_X:    addr = x;
      SEL_PC:   addr = pc;
      SEL_MAR:  addr = mar;
    endcase
  end

endmodule
