// cu_pkg: types and constants shared by the blocks of the 8-bit teaching computer.
//
// The computer has an 8-bit data bus, an 8-bit address space (address 0xFF is the
// external input/output port, every other address is RAM), an accumulator ACCA, an
// index register X, a program counter PC, a memory address register MAR, an
// instruction register INST and the carry (C) and zero (Z) flags. A four-state control
// unit (RESET, C1 fetch, C2 and C3 execute) drives active-low strobes to all of them.
//
// The opcode numbering is the one of the instruction-set table (0x00 LDAA addr up to
// 0x13 JEQ addr). The address-multiplexer codes for PC (2'b10) and MAR (2'b11) are the
// ones of the control-unit example; PROG_ADDR = 2'b00 and X = 2'b01 fill the remaining
// codes in the order the multiplexer inputs are listed. The ALU operation codes are
// this design's own, except that LOAD is 4'b0000 as in the example.
package cu_pkg;

  localparam int unsigned DW = 8;  // data width
  localparam int unsigned AW = 8;  // address width

  typedef logic [DW-1:0] byte_t;
  typedef logic [AW-1:0] addr_t;

  // Address of the external input/output port.
  localparam addr_t IO_ADDR = 8'hFF;

  // Control-unit states.
  typedef enum logic [1:0] {
    S_RESET = 2'd0,
    S_C1    = 2'd1,   // fetch
    S_C2    = 2'd2,   // first execute cycle
    S_C3    = 2'd3    // second execute cycle
  } state_e;

  // Address multiplexer selection (MEM_SEL).
  typedef enum logic [1:0] {
    SEL_PROG = 2'b00,  // PROG_ADDR: external loader address, used in RESET
    SEL_X    = 2'b01,  // index register (LDAA 0,X)
    SEL_PC   = 2'b10,  // program counter
    SEL_MAR  = 2'b11   // memory address register
  } mem_sel_e;

  // ALU operation (ALU_CTL).
  typedef enum logic [3:0] {
    ALU_LOAD = 4'h0,  // result = data bus
    ALU_ADD  = 4'h1,  // ACCA + data, C = carry out
    ALU_SUB  = 4'h2,  // ACCA - data, C = borrow
    ALU_AND  = 4'h3,  // ACCA & data
    ALU_OR   = 4'h4,  // ACCA | data
    ALU_COM  = 4'h5,  // ~ACCA, C = 1
    ALU_INC  = 4'h6,  // ACCA + 1
    ALU_LSL  = 4'h7,  // ACCA << 1, C = ACCA[7]
    ALU_LSR  = 4'h8,  // ACCA >> 1, C = ACCA[0]
    ALU_ASR  = 4'h9,  // ACCA >>> 1, C = ACCA[0]
    ALU_TSTA = 4'hA,  // result = ACCA (Z of a stored value)
    ALU_CPX  = 4'hB,  // X - data, C = borrow (flags only)
    ALU_INX  = 4'hC   // X + 1 (Z of the incremented index register)
  } alu_op_e;

  // Instruction set.
  typedef enum logic [7:0] {
    OP_LDAA_ADDR = 8'h00,
    OP_LDAA_IMM  = 8'h01,
    OP_LDAA_X    = 8'h02,
    OP_STAA      = 8'h03,
    OP_ADDA      = 8'h04,
    OP_SUBA      = 8'h05,
    OP_ANDA      = 8'h06,
    OP_ORAA      = 8'h07,
    OP_CMPA      = 8'h08,
    OP_LDX_IMM   = 8'h09,
    OP_INX       = 8'h0A,
    OP_CPX_IMM   = 8'h0B,
    OP_COMA      = 8'h0C,
    OP_INCA      = 8'h0D,
    OP_LSLA      = 8'h0E,
    OP_LSRA      = 8'h0F,
    OP_ASRA      = 8'h10,
    OP_JMP       = 8'h11,
    OP_JCS       = 8'h12,
    OP_JEQ       = 8'h13
  } opcode_e;

endpackage
