// tri_buf: N-bit tri-state buffer with an active-low enable.
//
// While E is low the input Y drives the output F; while E is high F floats (high
// impedance), so several buffers can share one bus. The computer uses two of them to
// put either the RAM read data or the external input switches onto the read-data bus.
// The enable is active low as in the computer's description (all strobes are active
// low); the width defaults to the 8-bit data bus.
module tri_buf #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] y,    // Y, data in
  input  logic         e_n,  // E, active-low output enable
  output tri   [N-1:0] f     // F, driven or high impedance
);

  assign f = e_n ? 'z : y;

endmodule
