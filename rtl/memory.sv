// memory: the RAM of the 8-bit teaching computer, 2^AW words of 8 bits.
//
// Holds the program and its data. Reads are asynchronous: Q shows the word at ADDR in
// the same cycle, which is what lets the fetch cycle latch an opcode on the next clock
// edge. A write happens on the rising clock edge while both the chip select CS_N
// (driven by the decoder's ADDR_NOTFF) and the write strobe WE_N are low. The word at
// 0xFF exists in the array but is never selected, because the decoder maps that
// address to the I/O port. The memory is not cleared at reset; a program is written
// into it through the same write port while the computer is held in reset.
// The size follows from the 8-bit address; the read/write timing is this design's
// choice.
module memory
  import cu_pkg::*;
#(
  parameter int unsigned AWIDTH = AW
) (
  input  logic              clk,
  input  logic [AWIDTH-1:0] addr,
  input  logic              cs_n,  // chip select, active low
  input  logic              we_n,  // write strobe, active low
  input  byte_t             d,     // write data
  output byte_t             q      // read data (asynchronous)
);

  byte_t mem [2**AWIDTH];

  always_ff @(posedge clk) begin
    if (!cs_n && !we_n) mem[addr] <= d;
  end

  assign q = mem[addr];

endmodule
