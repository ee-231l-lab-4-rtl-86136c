// tb_examples: cycle-by-cycle replay of the three worked examples of the control-unit
// description on the whole computer, followed by the JCS test asked for there (carry
// set and carry clear).
//
// Example 1: LDAA addr at 0x00 with addr = 0xF5 (three cycles: fetch, address byte
//            into MAR, operand into ACCA).
// Example 2: LDAA #num at 0x02 with num = 0xF5 (two cycles).
// Example 3: JMP addr at 0x04 with addr = 0xF5 (two cycles, PC becomes 0xF5).
// The opcodes are those of the instruction-set table (LDAA addr 0x00, LDAA #num 0x01,
// JMP 0x11). After every clock edge INST, MAR, PC and ACCA are compared with the
// situation the examples describe.
module tb_examples;
  import cu_pkg::*;

  logic clk = 0, resn, prog_we_n;
  addr_t prog_addr, pc;
  byte_t prog_data, in_sw, out_port, acca, x;
  logic c_flag, z_flag;
  state_e state;
  int checks = 0, failures = 0;

  computer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input byte_t img [256]);
    resn = 0; prog_we_n = 1;
    repeat (2) @(negedge clk);
    for (int a = 0; a < 255; a++) begin
      prog_addr = addr_t'(a); prog_data = img[a]; prog_we_n = 0;
      @(negedge clk);
    end
    prog_we_n = 1;
    @(negedge clk);
    resn = 1;
    @(negedge clk);   // now in C1 at PC = 0
  endtask

  // Check after one more clock edge.
  task automatic step(input string what, input state_e st, input addr_t e_pc,
                      input byte_t e_inst, input byte_t e_mar, input byte_t e_acca,
                      input logic chk_mar, input logic chk_acca);
    @(negedge clk);
    checks++;
    if (state != st || pc != e_pc || dut.inst != e_inst ||
        (chk_mar && dut.mar != e_mar) || (chk_acca && acca != e_acca)) begin
      failures++;
      $display("FAIL %s: state=%0d/%0d pc=%h/%h inst=%h/%h mar=%h/%h acca=%h/%h", what,
               state, st, pc, e_pc, dut.inst, e_inst, dut.mar, e_mar, acca, e_acca);
    end
  endtask

  byte_t img [256];

  initial begin
    resn = 0; prog_addr = 0; prog_data = 0; prog_we_n = 1; in_sw = 8'h00;
    foreach (img[a]) img[a] = 8'h00;
    img[8'h00] = OP_LDAA_ADDR; img[8'h01] = 8'hF5;
    img[8'h02] = OP_LDAA_IMM;  img[8'h03] = 8'hF5;
    img[8'h04] = OP_JMP;       img[8'h05] = 8'hF5;
    img[8'hF5] = 8'h6B;        // operand of Example 1
    load(img);
    // Example 1
    step("ex1 C1", S_C2, 8'h01, OP_LDAA_ADDR, 8'h00, 8'h00, 1, 1);
    step("ex1 C2", S_C3, 8'h02, OP_LDAA_ADDR, 8'hF5, 8'h00, 1, 1);
    step("ex1 C3", S_C1, 8'h02, OP_LDAA_ADDR, 8'hF5, 8'h6B, 1, 1);
    // Example 2
    step("ex2 C1", S_C2, 8'h03, OP_LDAA_IMM, 8'hF5, 8'h6B, 1, 1);
    step("ex2 C2", S_C1, 8'h04, OP_LDAA_IMM, 8'hF5, 8'hF5, 1, 1);
    // Example 3
    step("ex3 C1", S_C2, 8'h05, OP_JMP, 8'hF5, 8'hF5, 1, 1);
    step("ex3 C2", S_C1, 8'hF5, OP_JMP, 8'hF5, 8'hF5, 1, 1);

    // JCS with the carry set, then with it clear.
    foreach (img[a]) img[a] = 8'h00;
    img[8'h00] = OP_LDAA_IMM; img[8'h01] = 8'hFF;
    img[8'h02] = OP_ADDA;     img[8'h03] = 8'hE0;   // FF + 01: C = 1
    img[8'h04] = OP_JCS;      img[8'h05] = 8'h20;
    img[8'h20] = OP_LSRA;                           // 00 >> 1: C = 0
    img[8'h21] = OP_JCS;      img[8'h22] = 8'h40;
    img[8'h23] = OP_JMP;      img[8'h24] = 8'h23;
    img[8'hE0] = 8'h01;
    load(img);
    step("ldaa C1", S_C2, 8'h01, OP_LDAA_IMM, 8'h00, 8'h00, 0, 0);
    step("ldaa C2", S_C1, 8'h02, OP_LDAA_IMM, 8'h00, 8'hFF, 0, 1);
    step("adda C1", S_C2, 8'h03, OP_ADDA, 8'h00, 8'hFF, 0, 1);
    step("adda C2", S_C3, 8'h04, OP_ADDA, 8'hE0, 8'hFF, 1, 1);
    step("adda C3", S_C1, 8'h04, OP_ADDA, 8'hE0, 8'h00, 1, 1);
    checks++;
    if (c_flag !== 1 || z_flag !== 1) begin failures++; $display("FAIL adda flags c=%b z=%b", c_flag, z_flag); end
    step("jcs set C1", S_C2, 8'h05, OP_JCS, 8'hE0, 8'h00, 1, 1);
    step("jcs set C2", S_C1, 8'h20, OP_JCS, 8'hE0, 8'h00, 1, 1);
    step("lsra C1", S_C2, 8'h21, OP_LSRA, 8'hE0, 8'h00, 1, 1);
    step("lsra C2", S_C1, 8'h21, OP_LSRA, 8'hE0, 8'h00, 1, 1);
    checks++;
    if (c_flag !== 0) begin failures++; $display("FAIL lsra carry c=%b", c_flag); end
    step("jcs clear C1", S_C2, 8'h22, OP_JCS, 8'hE0, 8'h00, 1, 1);
    step("jcs clear C2", S_C1, 8'h23, OP_JCS, 8'hE0, 8'h00, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
