// tb_memory: writes random words with random chip-select / write-strobe patterns, then
// reads every address back asynchronously against a reference array. A write with the
// chip select high must not change the memory.
module tb_memory;
  import cu_pkg::*;
  logic clk = 0, cs_n, we_n;
  addr_t addr;
  byte_t d, q;
  byte_t model [256];
  int checks = 0, failures = 0;

  memory dut (.clk, .addr, .cs_n, .we_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every word
    cs_n = 0; we_n = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      addr = addr_t'(a); d = 8'($urandom); model[a] = d;
    end
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      addr = addr_t'($urandom); d = 8'($urandom);
      cs_n = ($urandom % 4) == 0; we_n = $urandom % 2;
      #1;
      checks++;
      if (q !== model[addr]) begin
        failures++;
        $display("FAIL read addr=%h q=%h exp=%h", addr, q, model[addr]);
      end
      @(posedge clk);
      if (!cs_n && !we_n) model[addr] = d;
      @(negedge clk);
    end
    cs_n = 1; we_n = 1;
    for (int a = 0; a < 256; a++) begin
      addr = addr_t'(a);
      #1;
      checks++;
      if (q !== model[a]) begin
        failures++;
        $display("FAIL final addr=%h q=%h exp=%h", addr, q, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
