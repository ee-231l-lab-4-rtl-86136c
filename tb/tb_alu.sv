// tb_alu: every ALU operation with random operands plus corner values, compared with
// results and flags computed here from the instruction-set definitions.
module tb_alu;
  import cu_pkg::*;
  alu_op_e op;
  byte_t acca, x, data, result, er;
  logic c_out, z_out, ec;
  int checks = 0, failures = 0;

  alu dut (.op, .acca, .x, .data, .result, .c_out, .z_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_vals();
    int a, b, xi;
    a = int'(acca); b = int'(data); xi = int'(x);
    ec = 0;
    case (op)
      ALU_LOAD: er = data;
      ALU_ADD:  begin er = byte_t'(a + b); ec = (a + b) > 255; end
      ALU_SUB:  begin er = byte_t'(a - b); ec = a < b; end
      ALU_AND:  er = acca & data;
      ALU_OR:   er = acca | data;
      ALU_COM:  begin er = 8'hFF ^ acca; ec = 1; end
      ALU_INC:  begin er = byte_t'(a + 1); ec = (a == 255); end
      ALU_LSL:  begin er = byte_t'(a * 2); ec = a >= 128; end
      ALU_LSR:  begin er = byte_t'(a / 2); ec = a % 2; end
      ALU_ASR:  begin er = byte_t'(a / 2 + (a >= 128 ? 128 : 0)); ec = a % 2; end
      ALU_TSTA: er = acca;
      ALU_CPX:  begin er = byte_t'(xi - b); ec = xi < b; end
      ALU_INX:  begin er = byte_t'(xi + 1); ec = (xi == 255); end
      default:  er = data;
    endcase
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      op = alu_op_e'(i % 13);
      acca = (i % 7 == 0) ? 8'hFF : (i % 11 == 0) ? 8'h00 : 8'($urandom);
      x    = (i % 5 == 0) ? 8'hFF : 8'($urandom);
      data = (i % 3 == 0) ? acca : 8'($urandom);
      if (i % 13 == 12 && i % 2 == 0) data = x;
      #1;
      expect_vals();
      checks++;
      if (result !== er || z_out !== (er == 0)) begin
        failures++;
        $display("FAIL op=%0d a=%h x=%h d=%h res=%h exp=%h z=%b", op, acca, x, data, result, er, z_out);
      end
      // carry is only used (loaded into C) for these operations
      if (op inside {ALU_ADD, ALU_SUB, ALU_COM, ALU_LSL, ALU_LSR, ALU_ASR, ALU_CPX}) begin
        checks++;
        if (c_out !== ec) begin
          failures++;
          $display("FAIL carry op=%0d a=%h x=%h d=%h c=%b exp=%b", op, acca, x, data, c_out, ec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
