// tb_load_reg: random load strobes and data against a reference register; checks the
// synchronous clear, load when LD_N is low and hold when it is high.
module tb_load_reg;
  logic clk = 0, clr_n, ld_n;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  load_reg dut (.clk, .clr_n, .ld_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_n = 0; ld_n = 1; d = 8'hA5; model = 0;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      clr_n = ($urandom % 16) != 0;
      ld_n  = $urandom % 2;
      d     = 8'($urandom);
      @(posedge clk);
      if (!clr_n) model = 0; else if (!ld_n) model = d;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL i=%0d q=%h exp=%h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
