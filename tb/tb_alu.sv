// tb_alu: random and corner operands for every ALU operation, compared with
// a reference computed here.
module tb_alu;
  import mt_pkg::*;
  alu_op_e op; word_t a, b, y, exp; logic [4:0] sh;
  int checks = 0, failures = 0;
  alu dut (.op, .a, .b, .shamt(sh), .y);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 2400; n++) begin
      op = alu_op_e'(n % 12);
      a  = (n < 24) ? 32'h8000_0000 : $urandom;
      b  = (n < 12) ? 32'h7FFF_FFFF : $urandom;
      sh = 5'($urandom);
      #1;
      case (op)
        ALU_ADD:  exp = a + b;
        ALU_SUB:  exp = a - b;
        ALU_AND:  exp = a & b;
        ALU_OR:   exp = a | b;
        ALU_XOR:  exp = a ^ b;
        ALU_NOR:  exp = ~(a | b);
        ALU_SLT:  exp = (int'(a) < int'(b)) ? 1 : 0;
        ALU_SLTU: exp = (longint'({1'b0, a}) < longint'({1'b0, b})) ? 1 : 0;
        ALU_SLL:  begin exp = b; repeat (sh) exp = {exp[30:0], 1'b0}; end
        ALU_SRL:  begin exp = b; repeat (sh) exp = {1'b0, exp[31:1]}; end
        ALU_SRA:  begin exp = b; repeat (sh) exp = {exp[31], exp[31:1]}; end
        ALU_LUI:  exp = b << 16;
        default:  exp = 0;
      endcase
      checks++;
      if (y !== exp) begin failures++; $display("FAIL op=%s a=%h b=%h sh=%0d y=%h exp=%h", op.name(), a, b, sh, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
