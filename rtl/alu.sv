// alu: arithmetic and logic unit of the 8-bit teaching computer.
//
// Combinational. ALU_CTL picks the operation; the operands are the accumulator ACCA,
// the index register X and the read-data bus. It produces the 8-bit result that is
// loaded into ACCA, the carry that the C flag may load and the zero flag of the result
// that the Z flag may load. Which of these are actually stored is decided by the
// control unit's ACCA_L, C_L and Z_L strobes, so for example CMPA is a SUB whose
// result is not loaded.
//
// The set of operations and their flag effects follow the instruction set: add and
// subtract set C, COMA sets C to 1, shifts put the bit shifted out into C. That C after
// a subtraction is the borrow (1 when the unsigned subtrahend is larger) is this
// design's choice, as are the three helper operations TSTA (Z of ACCA for STAA), CPX
// (X minus data) and INX (Z of X+1), and the operation codes.
module alu
  import cu_pkg::*;
(
  input  alu_op_e op,      // ALU_CTL
  input  byte_t   acca,
  input  byte_t   x,
  input  byte_t   data,    // read-data bus
  output byte_t   result,
  output logic    c_out,
  output logic    z_out
);

  logic [DW:0] wide;  // result with carry/borrow in the top bit

  always_comb begin
    wide  = '0;
    c_out = 1'b0;
    unique case (op)
      ALU_LOAD: wide = {1'b0, data};
      ALU_ADD:  wide = {1'b0, acca} + {1'b0, data};
      ALU_SUB:  wide = {1'b0, acca} - {1'b0, data};
      ALU_AND:  wide = {1'b0, acca & data};
      ALU_OR:   wide = {1'b0, acca | data};
      ALU_COM:  wide = {1'b1, ~acca};
      ALU_INC:  wide = {1'b0, acca} + 1'b1;
      ALU_LSL:  wide = {acca, 1'b0};
      ALU_LSR:  wide = {acca[0], 1'b0, acca[DW-1:1]};
      ALU_ASR:  wide = {acca[0], acca[DW-1], acca[DW-1:1]};
      ALU_TSTA: wide = {1'b0, acca};
      ALU_CPX:  wide = {1'b0, x} - {1'b0, data};
      ALU_INX:  wide = {1'b0, x} + 1'b1;
      default:  wide = {1'b0, data};
    endcase
    result = wide[DW-1:0];
    c_out  = wide[DW];
    z_out  = (result == '0);
  end

endmodule
