// alu: the single 32-bit arithmetic/logic unit shared by all threads in the
// execute stage. Purely combinational: y = f(op, a, b, shamt) within the EX
// cycle. The operation set is the MIPS integer subset the pipeline decodes
// (add/sub, logic, set-less-than, shifts, load-upper-immediate); the
// architecture names the ALU but not its operations, so the set is this
// design's choice. ADD and SUB wrap (no overflow trap).
module alu
  import mt_pkg::*;
(
  input  alu_op_e     op,
  input  word_t       a,      // rs operand
  input  word_t       b,      // rt operand or immediate
  input  logic [4:0]  shamt,  // shift amount
  output word_t       y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = word_t'($signed(b) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'd0};
      default:  y = '0;
    endcase
  end
endmodule
