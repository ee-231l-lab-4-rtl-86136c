// addr_decoder: the address decoder (DCD) of the 8-bit teaching computer.
//
// Splits the address space between RAM and the external input/output port. When the
// address from the multiplexer is 0xFF, ADDR_FF is driven low, which enables the
// external input (on a read) or the output latch (on a write); for every other
// address ADDR_NOTFF is driven low, which selects the RAM. Exactly one of the two
// outputs is low at any time. Combinational, both outputs active low, as described
// for the computer.
module addr_decoder
  import cu_pkg::*;
(
  input  addr_t addr,
  output logic  addr_ff_n,     // low: address is the I/O port 0xFF
  output logic  addr_notff_n   // low: address is in RAM
);

  always_comb begin
    addr_ff_n    = (addr != IO_ADDR);
    addr_notff_n = (addr == IO_ADDR);
  end

endmodule
