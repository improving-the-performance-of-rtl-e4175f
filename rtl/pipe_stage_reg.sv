// pipe_stage_reg: one pipeline register (IF/ID, ID/EX, EX/MEM or MEM/WB)
// of the shared pipeline. Every entry carries the number of the thread that
// owns the instruction, so each stage's contents belong to one thread's set
// of pipeline registers and threads can be interleaved cycle by cycle.
// Per clock: flush clears the valid bit (the slot becomes a bubble), else
// hold keeps the contents (stall), else the register loads d. Flush wins
// over hold. Reset empties the stage. The payload type is a parameter.
module pipe_stage_reg
  import mt_pkg::*;
#(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic hold,
  input  logic flush,
  input  logic d_valid,
  input  tid_t d_tid,
  input  T     d,
  output logic q_valid,
  output tid_t q_tid,
  output T     q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_tid   <= '0;
      q       <= '0;
    end else if (flush) begin
      q_valid <= 1'b0;
    end else if (!hold) begin
      q_valid <= d_valid;
      q_tid   <= d_tid;
      q       <= d;
    end
  end
endmodule
