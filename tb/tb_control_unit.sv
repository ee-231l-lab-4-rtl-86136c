// tb_control_unit: drives the control unit through every opcode with all four C/Z
// combinations, emulating the instruction register, and compares every control output
// in every cycle with a micro-step table written out here per instruction. It also
// checks the cycle count of each instruction (3 for the memory-reference group, 2 for
// the rest), the RESET behaviour (held while RESN is low, fetch on release) and a reset
// in the middle of an instruction. JCS and JEQ are run both taken and not taken.
module tb_control_unit;
  import cu_pkg::*;

  logic clk = 0, resn, creg, zreg;
  byte_t inst;
  alu_op_e alu_ctl;
  mem_sel_e mem_sel;
  logic inst_l_n, pc_i_n, pc_l_n, acca_l_n, mar_l_n, c_l_n, z_l_n, x_i_n, x_l_n, read_n, store_n;
  state_e state;
  int checks = 0, failures = 0;
  int taken = 0, not_taken = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Strobe names, active high here: bit order of the expectation vector.
  localparam int INST_L = 10, PC_I = 9, PC_L = 8, ACCA_L = 7, MAR_L = 6, C_L = 5,
                 Z_L = 4, X_I = 3, X_L = 2, RD = 1, ST = 0;

  typedef struct packed {
    logic [10:0] s;    // active strobes
    mem_sel_e    sel;
    alu_op_e     alu;  // checked only when acca, c or z is loaded
    state_e      nxt;
  } step_t;

  function automatic logic [10:0] bits(input int a, b = -1, c = -1, d = -1, e = -1);
    logic [10:0] v = '0;
    if (a >= 0) v[a] = 1; if (b >= 0) v[b] = 1; if (c >= 0) v[c] = 1;
    if (d >= 0) v[d] = 1; if (e >= 0) v[e] = 1;
    return v;
  endfunction

  // Second-cycle (C2) behaviour of each instruction.
  function automatic step_t c2_of(input byte_t op, input logic c, z);
    step_t t;
    t.sel = SEL_PC; t.alu = ALU_LOAD; t.nxt = S_C1; t.s = '0;
    case (op)
      8'h00, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08: begin
        t.s = bits(RD, MAR_L, PC_I); t.nxt = S_C3;
      end
      8'h01: t.s = bits(RD, ACCA_L, Z_L, PC_I);
      8'h02: begin t.s = bits(RD, ACCA_L, Z_L); t.sel = SEL_X; end
      8'h09: t.s = bits(RD, X_L, Z_L, PC_I);
      8'h0A: begin t.s = bits(X_I, Z_L); t.alu = ALU_INX; end
      8'h0B: begin t.s = bits(RD, C_L, Z_L, PC_I); t.alu = ALU_CPX; end
      8'h0C: begin t.s = bits(ACCA_L, C_L, Z_L); t.alu = ALU_COM; end
      8'h0D: begin t.s = bits(ACCA_L, Z_L); t.alu = ALU_INC; end
      8'h0E: begin t.s = bits(ACCA_L, C_L, Z_L); t.alu = ALU_LSL; end
      8'h0F: begin t.s = bits(ACCA_L, C_L, Z_L); t.alu = ALU_LSR; end
      8'h10: begin t.s = bits(ACCA_L, C_L, Z_L); t.alu = ALU_ASR; end
      8'h11: t.s = bits(RD, PC_L);
      8'h12: t.s = c ? bits(RD, PC_L) : bits(PC_I);
      8'h13: t.s = z ? bits(RD, PC_L) : bits(PC_I);
      default: t.s = '0;
    endcase
    return t;
  endfunction

  // Third-cycle (C3) behaviour of the memory-reference group.
  function automatic step_t c3_of(input byte_t op);
    step_t t;
    t.sel = SEL_MAR; t.nxt = S_C1; t.alu = ALU_LOAD; t.s = '0;
    case (op)
      8'h00: t.s = bits(RD, ACCA_L, Z_L);
      8'h03: begin t.s = bits(ST, Z_L); t.alu = ALU_TSTA; end
      8'h04: begin t.s = bits(RD, ACCA_L, C_L, Z_L); t.alu = ALU_ADD; end
      8'h05: begin t.s = bits(RD, ACCA_L, C_L, Z_L); t.alu = ALU_SUB; end
      8'h06: begin t.s = bits(RD, ACCA_L, Z_L); t.alu = ALU_AND; end
      8'h07: begin t.s = bits(RD, ACCA_L, Z_L); t.alu = ALU_OR; end
      8'h08: begin t.s = bits(RD, C_L, Z_L); t.alu = ALU_SUB; end
      default: ;
    endcase
    return t;
  endfunction

  function automatic logic [10:0] actual();
    return ~{inst_l_n, pc_i_n, pc_l_n, acca_l_n, mar_l_n, c_l_n, z_l_n, x_i_n, x_l_n, read_n, store_n};
  endfunction

  task automatic check_step(input string what, input state_e st, input step_t t);
    logic ok;
    ok = (state == st) && (actual() == t.s) && (mem_sel == t.sel);
    if (t.s[ACCA_L] || t.s[C_L] || t.s[Z_L]) ok = ok && (alu_ctl == t.alu);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s inst=%h c=%b z=%b state=%0d strobes=%b exp=%b sel=%0d exp=%0d alu=%0d exp=%0d",
               what, inst, creg, zreg, state, actual(), t.s, mem_sel, t.sel, alu_ctl, t.alu);
    end
  endtask

  step_t fetch;
  int cycles;

  initial begin
    fetch.s = bits(RD, INST_L, PC_I); fetch.sel = SEL_PC; fetch.alu = ALU_LOAD; fetch.nxt = S_C2;
    resn = 0; inst = 8'h00; creg = 0; zreg = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    // RESET: nothing active, address from the loader
    begin
      step_t r; r.s = '0; r.sel = SEL_PROG; r.alu = ALU_LOAD; r.nxt = S_C1;
      check_step("reset", S_RESET, r);
    end
    resn = 1;
    @(negedge clk);
    for (int op = 0; op < 22; op++) begin
      for (int cz = 0; cz < 4; cz++) begin
        byte_t o;
        step_t t2, t3;
        o = (op < 20) ? byte_t'(op) : byte_t'(8'h14 + 8'(op) * 8'd7);
        creg = cz[0]; zreg = cz[1];
        inst = byte_t'($urandom);      // INST holds the previous opcode during C1
        #1;
        cycles = 1;
        check_step("C1", S_C1, fetch);
        @(negedge clk);
        inst = o;                      // latched by the fetch
        #1;
        t2 = c2_of(o, creg, zreg);
        check_step("C2", S_C2, t2);
        if ((o == 8'h12 && creg) || (o == 8'h13 && zreg)) taken++;
        if ((o == 8'h12 && !creg) || (o == 8'h13 && !zreg)) not_taken++;
        cycles++;
        @(negedge clk);
        if (t2.nxt == S_C3) begin
          t3 = c3_of(o);
          check_step("C3", S_C3, t3);
          cycles++;
          @(negedge clk);
        end
        // cycle count of the instruction
        checks++;
        if (cycles != ((o inside {8'h00, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08}) ? 3 : 2)) begin
          failures++;
          $display("FAIL cycles inst=%h got %0d", o, cycles);
        end
      end
    end
    // reset in the middle of a three-cycle instruction
    check_step("C1 before reset", S_C1, fetch);
    @(negedge clk);
    inst = 8'h04;
    resn = 0;
    @(negedge clk);
    begin
      step_t r; r.s = '0; r.sel = SEL_PROG; r.alu = ALU_LOAD; r.nxt = S_C1;
      check_step("mid reset", S_RESET, r);
      @(negedge clk);
      check_step("held reset", S_RESET, r);
    end
    resn = 1;
    @(negedge clk);
    check_step("C1 after reset", S_C1, fetch);
    checks++;
    if (taken != 4 || not_taken != 4) begin
      failures++;
      $display("FAIL branch coverage taken=%0d not_taken=%0d", taken, not_taken);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
