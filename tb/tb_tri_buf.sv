// tb_tri_buf: two buffers share one bus, as on the computer's read-data bus. With one
// buffer enabled (enable low) the bus must carry that buffer's input, which shows that
// the disabled buffer releases the bus.
module tb_tri_buf;
  logic [7:0] ya, yb;
  logic ea_n, eb_n;
  tri   [7:0] bus;
  int checks = 0, failures = 0;

  tri_buf dut_a (.y(ya), .e_n(ea_n), .f(bus));
  tri_buf dut_b (.y(yb), .e_n(eb_n), .f(bus));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      ya = 8'($urandom); yb = 8'($urandom);
      if (ya == yb) yb = ~ya;
      ea_n = i[0]; eb_n = ~i[0];
      #1;
      checks++;
      if (bus !== (ea_n ? yb : ya)) begin
        failures++;
        $display("FAIL ea_n=%b ya=%h yb=%h bus=%h", ea_n, ya, yb, bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
