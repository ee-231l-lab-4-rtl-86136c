// tb_count_reg: random load / increment / clear against a reference counter, including
// the wrap from 0xFF to 0x00.
module tb_count_reg;
  logic clk = 0, clr_n, ld_n, inc_n;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0, wraps = 0;

  count_reg dut (.clk, .clr_n, .ld_n, .inc_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_n = 0; ld_n = 1; inc_n = 1; d = 0; model = 0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      clr_n = ($urandom % 64) != 0;
      ld_n  = ($urandom % 8) != 0;
      inc_n = ($urandom % 4) == 0;
      d     = ($urandom % 2) ? 8'hFE : 8'($urandom);
      @(posedge clk);
      if (!clr_n) model = 0;
      else if (!ld_n) model = d;
      else if (!inc_n) begin
        if (model == 8'hFF) wraps++;
        model = model + 8'd1;
      end
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL i=%0d q=%h exp=%h", i, q, model);
      end
    end
    if (wraps == 0) begin
      failures++;
      $display("FAIL no wrap exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
