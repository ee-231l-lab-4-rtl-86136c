// count_reg: W-bit register with active-low load and increment strobes.
//
// Used for the program counter PC (strobes PC_L and PC_I) and the index register X
// (strobes X_L and X_I). On a rising clock edge the register takes D when LD_N is low,
// adds one (modulo 2^W) when INC_N is low, and holds otherwise; load wins if both are
// low, which the control unit never does. CLR_N clears it synchronously, so the
// program starts at address 0. The load and increment functions follow the computer's
// description; the clear and the load-over-increment priority are this design's
// choice.
module count_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,  // synchronous clear, active low
  input  logic         ld_n,   // load strobe, active low
  input  logic         inc_n,  // increment strobe, active low
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!clr_n)      q <= '0;
    else if (!ld_n)  q <= d;
    else if (!inc_n) q <= q + 1'b1;
  end

endmodule
