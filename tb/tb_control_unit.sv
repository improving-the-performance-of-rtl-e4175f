// tb_control_unit: decodes one instruction of every class and checks the
// control word fields that matter for it.
module tb_control_unit;
  import mt_pkg::*;
  import mt_asm_pkg::*;
  word_t instr; ctrl_t c;
  int checks = 0, failures = 0;
  control_unit dut (.instr, .ctrl(c));
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s (instr %h)", what, instr); end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    instr = ADD(3, 1, 2); #1;
    chk(c.reg_write && c.dst == 3 && c.alu_op == ALU_ADD && c.use_rs && c.use_rt && !c.alu_imm, "add");
    instr = SUB(4, 1, 2); #1; chk(c.alu_op == ALU_SUB && c.dst == 4, "sub");
    instr = SLT(4, 1, 2); #1; chk(c.alu_op == ALU_SLT, "slt");
    instr = SLL(5, 6, 3); #1; chk(c.alu_op == ALU_SLL && c.shamt_src && !c.use_rs && c.use_rt, "sll");
    instr = ADD(0, 1, 2); #1; chk(!c.reg_write, "write to r0 suppressed");
    instr = ADDI(7, 1, -5); #1;
    chk(c.reg_write && c.dst == 7 && c.alu_imm && !c.imm_zext && c.use_rs && !c.use_rt, "addi");
    instr = ORI(7, 1, 5); #1; chk(c.alu_op == ALU_OR && c.imm_zext, "ori");
    instr = LUI(7, 5); #1; chk(c.alu_op == ALU_LUI && !c.use_rs, "lui");
    instr = LW(8, 4, 1); #1; chk(c.mem_read && c.reg_write && c.dst == 8 && !c.mem_write, "lw");
    instr = SW(8, 4, 1); #1; chk(c.mem_write && !c.reg_write && c.use_rt, "sw");
    instr = BEQ(1, 2, 3); #1; chk(c.branch_eq && !c.branch_ne && !c.reg_write && c.use_rs && c.use_rt, "beq");
    instr = BNE(1, 2, 3); #1; chk(c.branch_ne && !c.branch_eq, "bne");
    instr = J('h40); #1; chk(c.jump && !c.link && !c.reg_write, "j");
    instr = JAL('h40); #1; chk(c.jump && c.link && c.reg_write && c.dst == 31, "jal");
    instr = JR(9); #1; chk(c.jump_reg && !c.reg_write && c.use_rs, "jr");
    instr = MTS(3, SR_TIMER, 2); #1; chk(c.nhse_mts && c.use_rt && !c.reg_write, "mts");
    instr = MFS(3, SR_EVPND, 2); #1; chk(c.nhse_mfs && c.reg_write && c.dst == 3, "mfs");
    instr = WAIT(); #1; chk(c.nhse_wait && !c.reg_write && !c.illegal, "wait");
    instr = 32'hFC00_0000; #1; chk(c.illegal && !c.reg_write && !c.mem_write, "undefined opcode");
    instr = {6'h00, 20'd0, 6'h3F}; #1; chk(c.illegal, "undefined function");
    instr = {OP_NHSE, 10'd0, 4'hF, 12'd0}; #1; chk(c.illegal, "undefined scheduler op");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
