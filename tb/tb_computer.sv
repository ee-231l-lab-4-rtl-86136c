// tb_computer: end-to-end test of the whole computer against an instruction-level
// reference model written here from the instruction-set definitions.
//
// Each run holds the computer in reset, writes a program into the RAM through the
// loader port, releases reset and executes a fixed number of instructions. Every time
// the control unit re-enters the fetch cycle, the programmer-visible state (PC, ACCA,
// X, C, Z, output port) is compared with the model, as is the number of clock cycles
// the instruction took (2, or 3 for the memory-reference group). After the run the
// whole RAM is compared. The first program is a directed one that touches each
// instruction and the I/O port; the rest are random byte streams biased toward valid
// opcodes and addresses near 0xFF, so that self-modifying stores, jumps through the
// whole address space and fetches from the I/O port all occur. The external input
// changes at random between instructions.
//
// Mechanisms counted (each must occur at least once): every opcode, JCS and JEQ taken
// and not taken, reads of the input port, writes of the output port, indexed loads,
// carry set by ADDA and by SUBA, an unknown opcode, and a reset with program load.
module tb_computer;
  import cu_pkg::*;

  localparam int NUM_RANDOM = 200;   // random programs after the directed one
  localparam int NUM_INSTR  = 400;   // instructions executed per program

  logic clk = 0, resn;
  addr_t prog_addr;
  byte_t prog_data;
  logic prog_we_n;
  byte_t in_sw, out_port, acca, x;
  addr_t pc;
  logic c_flag, z_flag;
  state_e state;

  computer dut (.*);

  always #5 clk = ~clk;

  localparam int NUM_OPS_TB = 20;   // opcodes 0x00..0x13

  int checks = 0, failures = 0;
  int op_count [NUM_OPS_TB];
  int jcs_taken = 0, jcs_not = 0, jeq_taken = 0, jeq_not = 0;
  int io_reads = 0, io_writes = 0, add_carry = 0, sub_carry = 0, unknown_ops = 0, loads = 0;

  // reference model state
  byte_t m_mem [256];
  byte_t m_acc, m_x, m_out;
  addr_t m_pc;
  logic  m_c, m_z;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic byte_t m_read(input addr_t a);
    if (a == IO_ADDR) begin
      io_reads++;
      return in_sw;
    end
    return m_mem[a];
  endfunction

  function automatic byte_t m_next();
    byte_t v = m_read(m_pc);
    m_pc = m_pc + 8'd1;
    return v;
  endfunction

  // Execute one instruction in the model; returns its cycle count.
  function automatic int m_step();
    byte_t op, v, a;
    int s;
    op = m_next();
    if (op < 8'(NUM_OPS_TB)) op_count[int'(op)]++; else unknown_ops++;
    case (op)
      8'h00, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08: begin
        a = m_next();
        case (op)
          8'h00: begin m_acc = m_read(a); m_z = (m_acc == 0); end
          8'h03: begin
            if (a == IO_ADDR) begin m_out = m_acc; io_writes++; end
            else m_mem[a] = m_acc;
            m_z = (m_acc == 0);
          end
          8'h04: begin
            s = int'(m_acc) + int'(m_read(a));
            m_c = s > 255; m_acc = byte_t'(s); m_z = (m_acc == 0);
            if (m_c) add_carry++;
          end
          8'h05, 8'h08: begin
            v = m_read(a);
            m_c = m_acc < v; m_z = (m_acc == v);
            if (op == 8'h05) m_acc = m_acc - v;
            if (m_c && op == 8'h05) sub_carry++;
          end
          8'h06: begin m_acc = m_acc & m_read(a); m_z = (m_acc == 0); end
          default: begin m_acc = m_acc | m_read(a); m_z = (m_acc == 0); end
        endcase
        return 3;
      end
      8'h01: begin m_acc = m_next(); m_z = (m_acc == 0); end
      8'h02: begin m_acc = m_read(m_x); m_z = (m_acc == 0); loads++; end
      8'h09: begin m_x = m_next(); m_z = (m_x == 0); end
      8'h0A: begin m_x = m_x + 8'd1; m_z = (m_x == 0); end
      8'h0B: begin v = m_next(); m_c = m_x < v; m_z = (m_x == v); end
      8'h0C: begin m_acc = ~m_acc; m_c = 1; m_z = (m_acc == 0); end
      8'h0D: begin m_acc = m_acc + 8'd1; m_z = (m_acc == 0); end
      8'h0E: begin m_c = m_acc[7]; m_acc = {m_acc[6:0], 1'b0}; m_z = (m_acc == 0); end
      8'h0F: begin m_c = m_acc[0]; m_acc = {1'b0, m_acc[7:1]}; m_z = (m_acc == 0); end
      8'h10: begin m_c = m_acc[0]; m_acc = {m_acc[7], m_acc[7:1]}; m_z = (m_acc == 0); end
      8'h11: m_pc = m_next();
      8'h12: begin
        if (m_c) begin m_pc = m_next(); jcs_taken++; end
        else begin m_pc = m_pc + 8'd1; jcs_not++; end
      end
      8'h13: begin
        if (m_z) begin m_pc = m_next(); jeq_taken++; end
        else begin m_pc = m_pc + 8'd1; jeq_not++; end
      end
      default: ;
    endcase
    return 2;
  endfunction

  task automatic compare(input string what);
    checks++;
    if (pc !== m_pc || acca !== m_acc || x !== m_x || c_flag !== m_c || z_flag !== m_z ||
        out_port !== m_out) begin
      failures++;
      $display("FAIL %s pc=%h/%h acca=%h/%h x=%h/%h c=%b/%b z=%b/%b out=%h/%h", what,
               pc, m_pc, acca, m_acc, x, m_x, c_flag, m_c, z_flag, m_z, out_port, m_out);
    end
  endtask

  // Hold reset, load m_mem[0..254] into the RAM, release reset.
  task automatic load_and_start();
    resn = 0; prog_we_n = 1;
    repeat (2) @(negedge clk);
    for (int a = 0; a < 255; a++) begin
      prog_addr = addr_t'(a); prog_data = m_mem[a]; prog_we_n = 0;
      @(negedge clk);
    end
    prog_we_n = 1;
    @(negedge clk);
    checks++;
    if (state != S_RESET) begin
      failures++;
      $display("FAIL not held in reset");
    end
    m_acc = 0; m_x = 0; m_pc = 0; m_c = 0; m_z = 0; m_out = 0;
    compare("after reset");
    resn = 1;
    loads++;
    @(negedge clk);
  endtask

  task automatic run_program(input int n);
    int exp_cycles, cyc;
    for (int i = 0; i < n; i++) begin
      // at a negedge inside C1 of the next instruction
      if (state != S_C1) begin
        failures++;
        $display("FAIL expected fetch, state=%0d", state);
        return;
      end
      in_sw = byte_t'($urandom);
      exp_cycles = m_step();
      cyc = 0;
      do begin
        @(negedge clk);
        cyc++;
      end while (state != S_C1 && cyc < 10);
      compare($sformatf("instr %0d", i));
      checks++;
      if (cyc != exp_cycles) begin
        failures++;
        $display("FAIL cycles=%0d exp=%0d", cyc, exp_cycles);
      end
    end
    for (int a = 0; a < 255; a++) begin
      checks++;
      if (dut.u_mem.mem[a] !== m_mem[a]) begin
        failures++;
        $display("FAIL mem[%h]=%h exp %h", a, dut.u_mem.mem[a], m_mem[a]);
      end
    end
  endtask

  // Directed program: every instruction once, I/O in and out, both branch outcomes.
  byte_t directed [] = '{
    8'h09, 8'hF0,   // 00 LDX #F0
    8'h01, 8'h00,   // 02 LDAA #00      Z=1
    8'h13, 8'h08,   // 04 JEQ 08        taken
    8'h11, 8'h06,   // 06 JMP 06        skipped
    8'h00, 8'hFF,   // 08 LDAA FF       input port
    8'h03, 8'hFF,   // 0A STAA FF       output port
    8'h01, 8'hC3,   // 0C LDAA #C3
    8'h04, 8'hF0,   // 0E ADDA F0       C3+80 carry
    8'h12, 8'h14,   // 10 JCS 14        taken
    8'h11, 8'h12,   // 12 JMP 12        skipped
    8'h05, 8'hF1,   // 14 SUBA F1       borrow
    8'h06, 8'hF2,   // 16 ANDA F2
    8'h07, 8'hF3,   // 18 ORAA F3
    8'h08, 8'hF0,   // 1A CMPA F0
    8'h02,          // 1C LDAA 0,X
    8'h0A,          // 1D INX
    8'h0B, 8'hF1,   // 1E CPX #F1       Z=1
    8'h0C,          // 20 COMA
    8'h0D,          // 21 INCA
    8'h0E,          // 22 LSLA
    8'h0F,          // 23 LSRA
    8'h10,          // 24 ASRA
    8'h03, 8'hF4,   // 25 STAA F4
    8'h01, 8'h01,   // 27 LDAA #01      Z=0
    8'h13, 8'h00,   // 29 JEQ 00        not taken
    8'h08, 8'hF5,   // 2B CMPA F5       01-00: C=0
    8'h12, 8'h00,   // 2D JCS 00        not taken
    8'h3F,          // 2F unknown opcode
    8'h11, 8'h00    // 30 JMP 00
  };

  initial begin
    int total;
    total = 0;
    for (int i = 0; i < NUM_OPS_TB; i++) op_count[i] = 0;
    resn = 0; prog_addr = 0; prog_data = 0; prog_we_n = 1; in_sw = 0;

    // directed program
    for (int a = 0; a < 256; a++) m_mem[a] = 8'h00;
    foreach (directed[i]) m_mem[i] = directed[i];
    m_mem[8'hF0] = 8'h80; m_mem[8'hF1] = 8'hF1; m_mem[8'hF2] = 8'h5A; m_mem[8'hF3] = 8'h21;
    load_and_start();
    run_program(60);

    // random programs
    for (int p = 0; p < NUM_RANDOM; p++) begin
      for (int a = 0; a < 255; a++) begin
        case ($urandom % 10)
          0, 1, 2, 3, 4, 5: m_mem[a] = byte_t'($urandom % 20);
          6:          m_mem[a] = 8'hFF;
          7:          m_mem[a] = byte_t'(32'hF0 + $urandom % 16);
          default:    m_mem[a] = byte_t'($urandom);
        endcase
      end
      load_and_start();
      run_program(NUM_INSTR);
    end

    // every mechanism must have happened
    for (int i = 0; i < NUM_OPS_TB; i++) begin
      checks++;
      total += op_count[i];
      if (op_count[i] == 0) begin failures++; $display("FAIL opcode %h never run", i); end
    end
    begin
      int cov [10];
      cov = '{jcs_taken, jcs_not, jeq_taken, jeq_not, io_reads, io_writes,
              add_carry, sub_carry, unknown_ops, loads};
      foreach (cov[i]) begin
        checks++;
        if (cov[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("instructions=%0d jcs=%0d/%0d jeq=%0d/%0d io_rd=%0d io_wr=%0d add_c=%0d sub_c=%0d unknown=%0d",
             total, jcs_taken, jcs_not, jeq_taken, jeq_not, io_reads, io_writes, add_carry, sub_carry, unknown_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
