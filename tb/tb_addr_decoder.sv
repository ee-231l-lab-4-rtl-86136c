// tb_addr_decoder: checks all 256 addresses. ADDR_FF must be low exactly at 0xFF and
// ADDR_NOTFF low exactly everywhere else.
module tb_addr_decoder;
  import cu_pkg::*;

  addr_t addr;
  logic ff_n, notff_n;
  int checks = 0, failures = 0;

  addr_decoder dut (.addr, .addr_ff_n(ff_n), .addr_notff_n(notff_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = addr_t'(a);
      #1;
      checks++;
      if (ff_n !== (a != 255) || notff_n !== (a == 255)) begin
        failures++;
        $display("FAIL addr=%h ff_n=%b notff_n=%b", addr, ff_n, notff_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
