// tb_rb_alu: random operands for every operation, compared with the
// arithmetic written out here (immediate sign-extended from 16 bits).
module tb_rb_alu;
  import rb_pkg::*;
  op_e op;
  logic [XLEN-1:0] a, b, result;
  logic [IMM_W-1:0] imm;
  int checks = 0, failures = 0;

  rb_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_e ops [9] = '{OP_NOP, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_ADDI, OP_LW, OP_SW};
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] exp, simm;
      op = ops[i % 9]; a = $urandom; b = $urandom; imm = 16'($urandom);
      if (i % 7 == 0) imm = 16'h8000 | 16'($urandom);
      #1;
      simm = {{16{imm[15]}}, imm};
      case (op)
        OP_ADD: exp = a + b;
        OP_SUB: exp = a - b;
        OP_AND: exp = a & b;
        OP_OR:  exp = a | b;
        OP_XOR: exp = a ^ b;
        OP_ADDI, OP_LW, OP_SW: exp = a + simm;
        default: exp = 0;
      endcase
      checks++;
      if (result !== exp) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h imm=%h got=%h exp=%h", op.name(), a, b, imm, result, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
