// load_reg: W-bit register with an active-low load strobe.
//
// Used for the instruction register INST, the memory address register MAR, the
// accumulator ACCA, the carry and zero flags (W = 1) and the output port latch. On a
// rising clock edge the register takes D when LD_N is low and keeps its value
// otherwise. CLR_N clears it synchronously; the computer ties CLR_N to its reset input
// so every register is zero when the program starts. The active-low load follows the
// computer's strobes (INST_L, MAR_L, ACCA_L, C_L, Z_L); the clear is this design's
// choice.
module load_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,  // synchronous clear, active low
  input  logic         ld_n,   // load strobe, active low
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!clr_n)     q <= '0;
    else if (!ld_n) q <= d;
  end

endmodule
