// control_unit: the control unit of the 8-bit teaching computer, a Mealy state machine.
//
// Four states: RESET, C1 (fetch), C2 and C3 (execute). The machine is in RESET while
// the reset input RESN is low and goes to C1 on the first clock edge with RESN high.
// C1 is the same for every instruction: it reads the word the PC points at, latches it
// into INST and increments the PC. C2 and C3 carry out the instruction held in INST;
// instructions that need only C2 return to C1 after it, the memory-reference
// instructions (LDAA addr, STAA, ADDA, SUBA, ANDA, ORAA, CMPA) use C2 to load the
// operand address into MAR and C3 to use it. The outputs depend on the state, the
// opcode in INST and, for JCS and JEQ, on the C and Z flags, so they are combinational
// in those inputs. All strobes are active low and inactive (high) by default; ALU_CTL
// and MEM_SEL are encoded.
//
// Cycles per instruction: 3 for the memory-reference group, 2 for all others.
//
// Follows the computer's description: the states, the fetch cycle, the strobes of the
// worked examples (LDAA addr, LDAA #num, JMP addr) and the flag effects of the
// instruction-set table. This design's choices: the state register is inside the
// module (rather than fed back through pins), the strobes of the instructions the
// description does not spell out, a not-taken JCS/JEQ increments the PC past the
// address byte, which flags each load/store strobe writes, and an unknown opcode
// behaves as a two-cycle no-op.
module control_unit
  import cu_pkg::*;
(
  input  logic     clk,
  input  logic     resn,      // RESET input, active low
  input  byte_t    inst,      // instruction register
  input  logic     creg,      // carry flag
  input  logic     zreg,      // zero flag
  output alu_op_e  alu_ctl,   // ALU_CTL
  output mem_sel_e mem_sel,   // MEM_SEL
  output logic     inst_l_n,  // INST_L, load INST
  output logic     pc_i_n,    // PC_I, increment PC
  output logic     pc_l_n,    // PC_L, load PC
  output logic     acca_l_n,  // ACCA_L, load ACCA
  output logic     mar_l_n,   // MAR_L, load MAR
  output logic     c_l_n,     // C_L, load carry flag
  output logic     z_l_n,     // Z_L, load zero flag
  output logic     x_i_n,     // X_I, increment X
  output logic     x_l_n,     // X_L, load X
  output logic     read_n,    // READ, memory / input read
  output logic     store_n,   // STORE, memory / output write
  output state_e   state      // present state
);

  state_e next;

  always_ff @(posedge clk) begin
    if (!resn) state <= S_RESET;
    else       state <= next;
  end

  always_comb begin
    // DEFAULTS: every strobe inactive, address from the PC.
    alu_ctl  = ALU_LOAD;
    mem_sel  = SEL_PC;
    inst_l_n = 1'b1;
    pc_i_n   = 1'b1;
    pc_l_n   = 1'b1;
    acca_l_n = 1'b1;
    mar_l_n  = 1'b1;
    c_l_n    = 1'b1;
    z_l_n    = 1'b1;
    x_i_n    = 1'b1;
    x_l_n    = 1'b1;
    read_n   = 1'b1;
    store_n  = 1'b1;
    next     = S_C1;

    unique case (state)
      S_RESET: begin
        mem_sel = SEL_PROG;  // memory is open to the external loader
        next    = S_C1;
      end

      S_C1: begin  // fetch
        read_n   = 1'b0;
        inst_l_n = 1'b0;
        pc_i_n   = 1'b0;
        next     = S_C2;
      end

      S_C2: begin
        unique case (inst)
          OP_LDAA_ADDR, OP_STAA, OP_ADDA, OP_SUBA, OP_ANDA, OP_ORAA, OP_CMPA: begin
            // operand address byte -> MAR
            read_n  = 1'b0;
            mar_l_n = 1'b0;
            pc_i_n  = 1'b0;
            next    = S_C3;
          end
          OP_LDAA_IMM: begin
            read_n   = 1'b0;
            acca_l_n = 1'b0;
            z_l_n    = 1'b0;
            pc_i_n   = 1'b0;
          end
          OP_LDAA_X: begin
            mem_sel  = SEL_X;
            read_n   = 1'b0;
            acca_l_n = 1'b0;
            z_l_n    = 1'b0;
          end
          OP_LDX_IMM: begin
            read_n = 1'b0;
            x_l_n  = 1'b0;
            z_l_n  = 1'b0;
            pc_i_n = 1'b0;
          end
          OP_INX: begin
            alu_ctl = ALU_INX;
            x_i_n   = 1'b0;
            z_l_n   = 1'b0;
          end
          OP_CPX_IMM: begin
            alu_ctl = ALU_CPX;
            read_n  = 1'b0;
            c_l_n   = 1'b0;
            z_l_n   = 1'b0;
            pc_i_n  = 1'b0;
          end
          OP_COMA, OP_LSLA, OP_LSRA, OP_ASRA: begin
            unique case (inst)
              OP_COMA: alu_ctl = ALU_COM;
              OP_LSLA: alu_ctl = ALU_LSL;
              OP_LSRA: alu_ctl = ALU_LSR;
              default: alu_ctl = ALU_ASR;
            endcase
            acca_l_n = 1'b0;
            c_l_n    = 1'b0;
            z_l_n    = 1'b0;
          end
          OP_INCA: begin
            alu_ctl  = ALU_INC;
            acca_l_n = 1'b0;
            z_l_n    = 1'b0;
          end
          OP_JMP, OP_JCS, OP_JEQ: begin
            if (inst == OP_JMP || (inst == OP_JCS && creg) || (inst == OP_JEQ && zreg)) begin
              read_n = 1'b0;  // address byte -> PC
              pc_l_n = 1'b0;
            end else begin
              pc_i_n = 1'b0;  // skip the address byte
            end
          end
          default: ;  // unknown opcode: no operation
        endcase
      end

      S_C3: begin
        mem_sel = SEL_MAR;
        unique case (inst)
          OP_LDAA_ADDR: begin
            read_n   = 1'b0;
            acca_l_n = 1'b0;
            z_l_n    = 1'b0;
          end
          OP_STAA: begin
            alu_ctl = ALU_TSTA;
            store_n = 1'b0;
            z_l_n   = 1'b0;
          end
          OP_ADDA, OP_SUBA: begin
            alu_ctl  = (inst == OP_ADDA) ? ALU_ADD : ALU_SUB;
            read_n   = 1'b0;
            acca_l_n = 1'b0;
            c_l_n    = 1'b0;
            z_l_n    = 1'b0;
          end
          OP_ANDA, OP_ORAA: begin
            alu_ctl  = (inst == OP_ANDA) ? ALU_AND : ALU_OR;
            read_n   = 1'b0;
            acca_l_n = 1'b0;
            z_l_n    = 1'b0;
          end
          OP_CMPA: begin
            alu_ctl = ALU_SUB;
            read_n  = 1'b0;
            c_l_n   = 1'b0;
            z_l_n   = 1'b0;
          end
          default: ;  // C3 is only entered for the group above
        endcase
      end
    endcase
  end

  // A register is never loaded and incremented at once, and the bus is never read
  // and written in the same cycle.
  a_pc_one_op : assert property (@(posedge clk) !(!pc_i_n && !pc_l_n));
  a_x_one_op  : assert property (@(posedge clk) !(!x_i_n && !x_l_n));
  a_rd_wr     : assert property (@(posedge clk) !(!read_n && !store_n));

endmodule
