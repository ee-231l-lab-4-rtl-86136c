// computer: the complete 8-bit teaching computer, built around its control unit.
//
// Datapath: the address multiplexer picks PROG_ADDR, X, PC or MAR as the memory
// address; the decoder sends address 0xFF to the I/O port and every other address to
// the 256 x 8 RAM. A read puts either the RAM word or the external input switches onto
// the shared read-data bus through one of two active-low tri-state buffers; that bus
// feeds INST, MAR, PC, X and the ALU, whose result goes to ACCA and whose carry and
// zero outputs go to the C and Z flags. A store writes ACCA into the RAM, or into the
// output latch when the address is 0xFF. The control unit drives every strobe.
//
// Timing: one instruction takes two or three clock cycles after a one-cycle fetch is
// counted in (C1 C2, or C1 C2 C3); every register changes on the rising clock edge.
// While RESN is low the control unit stays in RESET, every register is cleared and
// the RAM can be written from outside: the address comes from PROG_ADDR through the
// multiplexer and the data from PROG_DATA, written when PROG_WE_N is low. When RESN
// goes high the program starts at address 0. That loader path, the register clear and
// the output latch are this design's choices; the rest of the structure follows the
// computer's description.
//
// The read-data bus has two drivers by design (the two tri-state buffers); the
// decoder guarantees that at most one is enabled in any cycle.
module computer
  import cu_pkg::*;
(
  input  logic   clk,
  input  logic   resn,       // reset, active low
  // program loader, used while resn is low
  input  addr_t  prog_addr,  // PROG_ADDR
  input  byte_t  prog_data,
  input  logic   prog_we_n,
  // external I/O at address 0xFF
  input  byte_t  in_sw,      // external input
  output byte_t  out_port,   // external output latch
  // programmer-visible state
  output addr_t  pc,
  output byte_t  acca,
  output byte_t  x,
  output logic   c_flag,
  output logic   z_flag,
  output state_e state
);

  // control strobes
  alu_op_e  alu_ctl;
  mem_sel_e mem_sel;
  logic inst_l_n, pc_i_n, pc_l_n, acca_l_n, mar_l_n, c_l_n, z_l_n;
  logic x_i_n, x_l_n, read_n, store_n;

  byte_t inst, mar, mem_q, alu_res, mem_d;
  addr_t addr;
  logic  addr_ff_n, addr_notff_n, alu_c, alu_z, mem_we_n;
  tri [DW-1:0] data_bus;  // read-data bus

  control_unit u_ctl (
    .clk, .resn, .inst, .creg(c_flag), .zreg(z_flag),
    .alu_ctl, .mem_sel, .inst_l_n, .pc_i_n, .pc_l_n, .acca_l_n, .mar_l_n,
    .c_l_n, .z_l_n, .x_i_n, .x_l_n, .read_n, .store_n, .state
  );

  addr_mux u_mux (
    .mem_sel, .prog_addr, .x, .pc, .mar, .addr
  );

  addr_decoder u_dcd (
    .addr, .addr_ff_n, .addr_notff_n
  );

  // RAM: written by STORE when running, by the loader while in reset.
  assign mem_we_n = resn ? store_n : prog_we_n;
  assign mem_d    = resn ? acca    : prog_data;

  memory u_mem (
    .clk, .addr, .cs_n(addr_notff_n), .we_n(mem_we_n), .d(mem_d), .q(mem_q)
  );

  // Read-data bus drivers.
  tri_buf #(.N(DW)) u_tri_mem (
    .y(mem_q), .e_n(read_n | addr_notff_n), .f(data_bus)
  );
  tri_buf #(.N(DW)) u_tri_in (
    .y(in_sw), .e_n(read_n | addr_ff_n), .f(data_bus)
  );

  // Registers.
  load_reg #(.W(DW)) u_inst (
    .clk, .clr_n(resn), .ld_n(inst_l_n), .d(data_bus), .q(inst)
  );
  load_reg #(.W(AW)) u_mar (
    .clk, .clr_n(resn), .ld_n(mar_l_n), .d(data_bus), .q(mar)
  );
  count_reg #(.W(AW)) u_pc (
    .clk, .clr_n(resn), .ld_n(pc_l_n), .inc_n(pc_i_n), .d(data_bus), .q(pc)
  );
  count_reg #(.W(AW)) u_x (
    .clk, .clr_n(resn), .ld_n(x_l_n), .inc_n(x_i_n), .d(data_bus), .q(x)
  );

  alu u_alu (
    .op(alu_ctl), .acca, .x, .data(data_bus), .result(alu_res), .c_out(alu_c), .z_out(alu_z)
  );

  load_reg #(.W(DW)) u_acca (
    .clk, .clr_n(resn), .ld_n(acca_l_n), .d(alu_res), .q(acca)
  );
  load_reg #(.W(1)) u_cflag (
    .clk, .clr_n(resn), .ld_n(c_l_n), .d(alu_c), .q(c_flag)
  );
  load_reg #(.W(1)) u_zflag (
    .clk, .clr_n(resn), .ld_n(z_l_n), .d(alu_z), .q(z_flag)
  );

  // Output latch at address 0xFF.
  load_reg #(.W(DW)) u_out (
    .clk, .clr_n(resn), .ld_n(store_n | addr_ff_n), .d(acca), .q(out_port)
  );

  // The two bus drivers are never enabled together.
  a_one_driver : assert property (@(posedge clk)
    (read_n | addr_notff_n) || (read_n | addr_ff_n));

endmodule
