// control_unit: the instruction decoder shared by all threads in the ID
// stage. Combinational: turns one 32-bit instruction into the control word
// ctrl_t that travels with it down the pipeline.
// Decoded: the MIPS integer subset (R-type ALU and shifts, JR, ADDI(U),
// SLTI(U), ANDI, ORI, XORI, LUI, LW, SW, BEQ, BNE, J, JAL) and the three
// scheduler instructions under opcode 0x1C:
//   MTS  imm = {0, sreg, 3'b0, thread}  scheduler register <- rt
//   MFS  imm = {1, sreg, 3'b0, thread}  rt <- scheduler register
//   WAIT imm = {2, ...}                 sleep until an enabled event
// The architecture states that the MIPS set is extended with scheduler
// instructions but not their encoding; the encoding above is this design's.
// Anything else raises `illegal`, which the pipeline turns into a jump to the
// exception address.
module control_unit
  import mt_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);
  logic [5:0] op, fn;
  reg_t       rt, rd;
  logic [3:0] sub;

  assign op  = instr[31:26];
  assign fn  = instr[5:0];
  assign rt  = instr[20:16];
  assign rd  = instr[15:11];
  assign sub = instr[15:12];

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = ALU_ADD;
    unique case (op)
      OP_RTYPE: begin
        ctrl.use_rs    = 1'b1;
        ctrl.use_rt    = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.dst       = rd;
        unique case (fn)
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          FN_SLL:  begin ctrl.alu_op = ALU_SLL; ctrl.shamt_src = 1'b1; ctrl.use_rs = 1'b0; end
          FN_SRL:  begin ctrl.alu_op = ALU_SRL; ctrl.shamt_src = 1'b1; ctrl.use_rs = 1'b0; end
          FN_SRA:  begin ctrl.alu_op = ALU_SRA; ctrl.shamt_src = 1'b1; ctrl.use_rs = 1'b0; end
          FN_SLLV: ctrl.alu_op = ALU_SLL;
          FN_SRLV: ctrl.alu_op = ALU_SRL;
          FN_SRAV: ctrl.alu_op = ALU_SRA;
          FN_JR: begin
            ctrl.jump_reg  = 1'b1;
            ctrl.use_rt    = 1'b0;
            ctrl.reg_write = 1'b0;
            ctrl.dst       = '0;
          end
          default: begin
            ctrl = '0;
            ctrl.alu_op  = ALU_ADD;
            ctrl.illegal = 1'b1;
          end
        endcase
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.use_rs    = (op != OP_LUI);
        ctrl.reg_write = 1'b1;
        ctrl.alu_imm   = 1'b1;
        ctrl.dst       = rt;
        ctrl.imm_zext  = (op == OP_ANDI) || (op == OP_ORI) || (op == OP_XORI);
        unique case (op)
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          OP_SLTIU: ctrl.alu_op = ALU_SLTU;
          OP_ANDI:  ctrl.alu_op = ALU_AND;
          OP_ORI:   ctrl.alu_op = ALU_OR;
          OP_XORI:  ctrl.alu_op = ALU_XOR;
          OP_LUI:   ctrl.alu_op = ALU_LUI;
          default:  ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        ctrl.use_rs    = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.mem_read  = 1'b1;
        ctrl.alu_imm   = 1'b1;
        ctrl.dst       = rt;
      end
      OP_SW: begin
        ctrl.use_rs    = 1'b1;
        ctrl.use_rt    = 1'b1;
        ctrl.mem_write = 1'b1;
        ctrl.alu_imm   = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.use_rs    = 1'b1;
        ctrl.use_rt    = 1'b1;
        ctrl.branch_eq = (op == OP_BEQ);
        ctrl.branch_ne = (op == OP_BNE);
      end
      OP_J:   ctrl.jump = 1'b1;
      OP_JAL: begin
        ctrl.jump      = 1'b1;
        ctrl.link      = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.dst       = 5'd31;
      end
      OP_NHSE: begin
        unique case (sub)
          NOP_MTS:  begin ctrl.nhse_mts = 1'b1; ctrl.use_rt = 1'b1; end
          NOP_MFS:  begin ctrl.nhse_mfs = 1'b1; ctrl.reg_write = 1'b1; ctrl.dst = rt; end
          NOP_WAIT: ctrl.nhse_wait = 1'b1;
          default:  ctrl.illegal = 1'b1;
        endcase
      end
      default: ctrl.illegal = 1'b1;
    endcase
    // r0 is hard-wired to zero: never a real destination
    if (ctrl.dst == 5'd0) ctrl.reg_write = 1'b0;
  end
endmodule
