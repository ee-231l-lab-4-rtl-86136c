// tb_addr_mux: exhaustive select / random data test of the address multiplexer.
// For each of the four MEM_SEL codes and 200 random sets of the four sources, the
// output must equal the source named by the code (PROG_ADDR 00, X 01, PC 10, MAR 11).
module tb_addr_mux;
  import cu_pkg::*;

  mem_sel_e sel;
  addr_t prog_addr, x, pc, mar, addr, exp_addr;
  int checks = 0, failures = 0;

  addr_mux dut (.mem_sel(sel), .prog_addr, .x, .pc, .mar, .addr);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      prog_addr = addr_t'($urandom); x = addr_t'($urandom);
      pc = addr_t'($urandom); mar = addr_t'($urandom);
      for (int s = 0; s < 4; s++) begin
        sel = mem_sel_e'(s);
        case (s)
          0: exp_addr = prog_addr;
          1: exp_addr = x;
          2: exp_addr = pc;
          default: exp_addr = mar;
        endcase
        #1;
        checks++;
        if (addr !== exp_addr) begin
          failures++;
          $display("FAIL sel=%0d addr=%h exp=%h", s, addr, exp_addr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
