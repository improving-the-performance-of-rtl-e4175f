// forward_unit: thread-aware operand forwarding for the shared pipeline,
// plus the forward-unit configuration in use.
// A result may be forwarded only to an instruction of the same thread, so
// every comparison checks the thread tags as well as the register numbers.
//  * EX operands: from EX/MEM (result of the same thread's previous slot,
//    distance 1) or else MEM/WB (distance 2). Distance 3 and more is served
//    by the register file's write-before-read.
//  * ID operands of BEQ/BNE/JR, which resolve in ID: from the MEM stage
//    result (ALU result, or the data memory word for a load) at distance 2.
//    Distance 1 is a stall (hazard_unit).
// fw_cfg names the configuration of the hazard/forward configuration table
// from the numbers of hard (HT) and soft (ST) threads the scheduler is
// interleaving: 1 ST -> UFW1, 2 HT or 2 ST -> UFW2, 1 HT + 1 ST -> UFW3,
// 1 HT + 2 ST -> UFW4, 4 threads -> NO FW. Combinations the table does not
// list are this design's: 1 HT alone -> UFW2 (it is issued every second
// cycle), other 3-thread mixes and no thread -> NO FW (distance >= 3).
// The forwarding paths themselves are the same in every configuration: the
// tag comparison makes the unused paths inactive, so switching between
// configurations at run time needs no drain of the pipeline (this design's
// choice; the table only names the units). Combinational.
module forward_unit
  import mt_pkg::*;
(
  // instruction in EX
  input  logic   ex_valid,
  input  tid_t   ex_tid,
  input  reg_t   ex_rs,
  input  reg_t   ex_rt,
  // instruction in MEM (EX/MEM register)
  input  logic   mem_valid,
  input  tid_t   mem_tid,
  input  logic   mem_reg_write,
  input  reg_t   mem_dst,
  // instruction in WB (MEM/WB register)
  input  logic   wb_valid,
  input  tid_t   wb_tid,
  input  logic   wb_reg_write,
  input  reg_t   wb_dst,
  // instruction in ID
  input  logic   id_valid,
  input  tid_t   id_tid,
  input  reg_t   id_rs,
  input  reg_t   id_rt,
  // scheduler interleave set
  input  logic   sched_en,
  input  logic [5:0] n_ht,
  input  logic [5:0] n_st,
  // EX selects: 0 = ID/EX value, 1 = EX/MEM result, 2 = MEM/WB value
  output logic [1:0] fwd_a,
  output logic [1:0] fwd_b,
  // ID selects: 1 = MEM stage result
  output logic   id_fwd_a,
  output logic   id_fwd_b,
  output fwcfg_e fw_cfg
);
  logic mem_hit, wb_hit, id_mem_hit;
  assign mem_hit    = ex_valid && mem_valid && mem_reg_write && mem_tid == ex_tid;
  assign wb_hit     = ex_valid && wb_valid  && wb_reg_write  && wb_tid  == ex_tid;
  assign id_mem_hit = id_valid && mem_valid && mem_reg_write && mem_tid == id_tid;

  always_comb begin
    fwd_a = 2'd0;
    fwd_b = 2'd0;
    if      (mem_hit && mem_dst == ex_rs && ex_rs != 5'd0) fwd_a = 2'd1;
    else if (wb_hit  && wb_dst  == ex_rs && ex_rs != 5'd0) fwd_a = 2'd2;
    if      (mem_hit && mem_dst == ex_rt && ex_rt != 5'd0) fwd_b = 2'd1;
    else if (wb_hit  && wb_dst  == ex_rt && ex_rt != 5'd0) fwd_b = 2'd2;
    id_fwd_a = id_mem_hit && mem_dst == id_rs && id_rs != 5'd0;
    id_fwd_b = id_mem_hit && mem_dst == id_rt && id_rt != 5'd0;
  end

  logic [6:0] n_all;
  assign n_all = {1'b0, n_ht} + {1'b0, n_st};

  always_comb begin
    if (!sched_en) fw_cfg = FW_UFW1;             // HT0 alone, back to back
    else if (n_all == 7'd1) fw_cfg = (n_st == 6'd1) ? FW_UFW1 : FW_UFW2;
    else if (n_all == 7'd2) fw_cfg = (n_ht == 6'd1) ? FW_UFW3 : FW_UFW2;
    else if (n_all == 7'd3) fw_cfg = (n_ht == 6'd1) ? FW_UFW4 : FW_NOFW;
    else                    fw_cfg = FW_NOFW;
  end
endmodule
