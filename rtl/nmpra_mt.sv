// nmpra_mt: a fine-grained multithreaded MIPS-style processor whose
// real-time scheduler is hardware (the nHSE) instead of operating-system
// software. Each thread owns a program counter, a register file and its
// slots in the pipeline registers, so switching threads costs no cycle:
// the scheduler simply names, every clock, which thread's instruction
// enters the shared five-stage pipeline (IF, ID, EX, MEM, WB).
//
// Pipeline (one shared datapath, every pipeline register tagged with the
// owning thread):
//   select  nhse picks a thread; pc_unit loads that thread's next PC into
//           the fetch register (en_PC_decode / nHSE_PC_select)
//   IF      instruction memory read at the fetch register
//   ID      decode, register file read (per-thread file), BEQ/BNE/J/JAL/JR
//           and WAIT resolved: the thread's PC is redirected here
//   EX      ALU with thread-aware forwarding; MTS/MFS access the nHSE
//   MEM     shared data memory (LW/SW)
//   WB      register file write
// When two or more threads are interleaved, consecutive instructions of one
// thread are at least two stages apart, so a hard thread runs with no stall
// and no flush. A single thread issued every cycle gets classic forwarding,
// a one-cycle stall for load-use or a branch on the result just computed,
// and a one-instruction flush after a redirect.
// Events (per-thread interrupt line irq[i], periodic timer, watchdog,
// deadline 1 and 2) wake sleeping threads; at reset only thread 0 (a hard
// thread) runs and the scheduler is off until thread 0 enables it.
//
// Interface: one clock, active-low asynchronous reset. imem_* and dmem_ext_*
// load program and data (use while the core is in reset or idle). The
// outputs trace every instruction that writes back (wb_*), every store
// (st_*), the scheduler choice and the forward-unit configuration.
// Follows the architecture's pipeline, replication, PC-selection and
// scheduler-engine structure; the instruction encoding of the scheduler
// instructions, branch resolution in ID, memory sizes and reset addresses
// are this design's choices.
module nmpra_mt
  import mt_pkg::*;
#(
  parameter int unsigned N_THREADS  = 16,
  parameter int unsigned MAX_ILV    = 4,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter word_t       RESET_PC   = 32'h0000_0000,
  parameter word_t       PC_STRIDE  = 32'h0000_0100,
  parameter word_t       EXC_PC     = 32'h0000_0FF0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_THREADS-1:0] irq,
  // program / data load
  input  logic                 imem_we,
  input  word_t                imem_waddr,
  input  word_t                imem_wdata,
  input  logic                 dmem_ext_we,
  input  word_t                dmem_ext_addr,
  input  word_t                dmem_ext_wdata,
  // observation
  output logic [N_THREADS-1:0] en_pipeline_thread,
  output logic                 sched_en,
  output fwcfg_e               fw_cfg,
  output logic                 wb_valid,
  output tid_t                 wb_tid,
  output word_t                wb_pc,
  output logic                 wb_we,
  output reg_t                 wb_dst,
  output word_t                wb_data,
  output logic                 st_valid,
  output tid_t                 st_tid,
  output word_t                st_addr,
  output word_t                st_data,
  output logic                 stall,
  output logic                 flush_if,
  output logic                 exception
);
  // ---------------------------------------------------------------- payloads
  typedef struct packed {
    word_t pc;
    word_t instr;
  } ifid_t;

  typedef struct packed {
    word_t pc;
    word_t instr;
    ctrl_t ctrl;
    word_t rs_val;
    word_t rt_val;
    word_t imm;
  } idex_t;

  typedef struct packed {
    word_t pc;
    logic  reg_write;
    logic  mem_read;
    logic  mem_write;
    reg_t  dst;
    word_t result;
    word_t st_data;
  } exmem_t;

  typedef struct packed {
    word_t pc;
    logic  reg_write;
    reg_t  dst;
    word_t data;
  } memwb_t;

  // ---------------------------------------------------------------- nets
  logic   sel_valid;
  tid_t   sel_tid;
  logic [5:0] n_ht, n_st;
  logic   fetch_valid;
  tid_t   fetch_tid;
  word_t  fetch_pc, pc_if, imem_rdata;
  word_t  pc_thread [N_THREADS];

  logic   ifid_v;  tid_t ifid_t_; ifid_t  ifid;
  logic   idex_v;  tid_t idex_t_; idex_t  idex;
  logic   exmem_v; tid_t exmem_t_; exmem_t exmem;
  logic   memwb_v; tid_t memwb_t_; memwb_t memwb;

  ctrl_t  id_ctrl;
  word_t  rs_data, rt_data, id_a, id_b, id_imm, pc4_id;
  logic   id_fwd_a, id_fwd_b;
  logic   id_redirect, id_take;
  logic [1:0] pc_src;
  word_t  pc1_id, pc2_id, pc3_id;
  logic   wait_req;

  logic [1:0] fwd_a, fwd_b;
  word_t  ex_a, ex_b, ex_alu_b, alu_y, ex_result, mfs_data;
  logic [4:0] ex_shamt;
  logic   mts_en;

  word_t  dmem_rdata, mem_result;

  // ---------------------------------------------------------------- scheduler
  nhse #(.N_THREADS(N_THREADS), .MAX_ILV(MAX_ILV)) u_nhse (
    .clk, .rst_n, .irq,
    .mts_en, .mts_tgt(idex.instr[4:0]), .mts_sel(idex.instr[11:8]), .mts_data(ex_b),
    .mfs_tgt(idex.instr[4:0]), .mfs_sel(idex.instr[11:8]), .mfs_data,
    .wait_req, .wait_tid(ifid_t_),
    .advance(!stall),
    .sel_valid, .sel_tid, .en_pipeline_thread, .sched_en, .n_ht, .n_st,
    .state(), .is_ht(), .pending()
  );

  // ---------------------------------------------------------------- select + IF
  pc_unit #(.N_THREADS(N_THREADS), .RESET_PC(RESET_PC), .PC_STRIDE(PC_STRIDE),
            .EXC_PC(EXC_PC)) u_pc (
    .clk, .rst_n,
    .en_pc_decode(sel_valid), .nhse_pc_select(sel_tid), .hold(stall),
    .id_redirect, .id_tid(ifid_t_), .pc_src, .pc_exception(exception),
    .pc1_id, .pc2_id, .pc3_id,
    .fetch_valid, .fetch_tid, .fetch_pc, .pc_if, .pc_thread
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(fetch_pc), .rdata(imem_rdata),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  pipe_stage_reg #(.T(ifid_t)) u_ifid (
    .clk, .rst_n, .hold(stall), .flush(1'b0),
    .d_valid(fetch_valid && !flush_if), .d_tid(fetch_tid),
    .d('{pc: fetch_pc, instr: imem_rdata}),
    .q_valid(ifid_v), .q_tid(ifid_t_), .q(ifid)
  );

  // ---------------------------------------------------------------- ID
  control_unit u_ctrl (.instr(ifid.instr), .ctrl(id_ctrl));

  regfile_bank #(.N_THREADS(N_THREADS)) u_rf (
    .clk,
    .rd_tid(ifid_t_), .rs_addr(ifid.instr[25:21]), .rt_addr(ifid.instr[20:16]),
    .rs_data, .rt_data,
    .we(memwb_v && memwb.reg_write), .wr_tid(memwb_t_), .wr_addr(memwb.dst),
    .wr_data(memwb.data)
  );

  assign id_a   = id_fwd_a ? mem_result : rs_data;
  assign id_b   = id_fwd_b ? mem_result : rt_data;
  assign pc4_id = ifid.pc + 32'd4;
  assign id_imm = id_ctrl.imm_zext ? {16'd0, ifid.instr[15:0]}
                                   : {{16{ifid.instr[15]}}, ifid.instr[15:0]};
  assign pc2_id = {pc4_id[31:28], ifid.instr[25:0], 2'b00};
  assign pc3_id = id_a;

  always_comb begin
    id_take = (id_ctrl.branch_eq && id_a == id_b) || (id_ctrl.branch_ne && id_a != id_b);
    pc1_id  = id_ctrl.nhse_wait ? pc4_id : pc4_id + {id_imm[29:0], 2'b00};
    pc_src  = 2'd0;
    if (id_take || id_ctrl.nhse_wait) pc_src = 2'd1;
    if (id_ctrl.jump)                 pc_src = 2'd2;
    if (id_ctrl.jump_reg)             pc_src = 2'd3;
    exception   = ifid_v && !stall && id_ctrl.illegal;
    id_redirect = ifid_v && !stall && (pc_src != 2'd0 || id_ctrl.illegal);
    wait_req    = ifid_v && !stall && id_ctrl.nhse_wait;
  end

  hazard_unit u_hz (
    .id_valid(ifid_v), .id_tid(ifid_t_),
    .id_rs(ifid.instr[25:21]), .id_rt(ifid.instr[20:16]),
    .id_use_rs(id_ctrl.use_rs), .id_use_rt(id_ctrl.use_rt),
    .id_resolves(id_ctrl.branch_eq || id_ctrl.branch_ne || id_ctrl.jump_reg),
    .ex_valid(idex_v), .ex_tid(idex_t_), .ex_reg_write(idex.ctrl.reg_write),
    .ex_mem_read(idex.ctrl.mem_read), .ex_dst(idex.ctrl.dst),
    .id_redirect, .fetch_valid, .fetch_tid,
    .stall, .flush_if
  );

  pipe_stage_reg #(.T(idex_t)) u_idex (
    .clk, .rst_n, .hold(1'b0), .flush(1'b0),
    .d_valid(ifid_v && !stall && !id_ctrl.illegal), .d_tid(ifid_t_),
    .d('{pc: ifid.pc, instr: ifid.instr, ctrl: id_ctrl, rs_val: rs_data,
         rt_val: rt_data, imm: id_imm}),
    .q_valid(idex_v), .q_tid(idex_t_), .q(idex)
  );

  // ---------------------------------------------------------------- EX
  forward_unit u_fw (
    .ex_valid(idex_v), .ex_tid(idex_t_),
    .ex_rs(idex.instr[25:21]), .ex_rt(idex.instr[20:16]),
    .mem_valid(exmem_v), .mem_tid(exmem_t_), .mem_reg_write(exmem.reg_write),
    .mem_dst(exmem.dst),
    .wb_valid(memwb_v), .wb_tid(memwb_t_), .wb_reg_write(memwb.reg_write),
    .wb_dst(memwb.dst),
    .id_valid(ifid_v), .id_tid(ifid_t_),
    .id_rs(ifid.instr[25:21]), .id_rt(ifid.instr[20:16]),
    .sched_en, .n_ht, .n_st,
    .fwd_a, .fwd_b, .id_fwd_a, .id_fwd_b, .fw_cfg
  );

  always_comb begin
    unique case (fwd_a)
      2'd1:    ex_a = exmem.result;
      2'd2:    ex_a = memwb.data;
      default: ex_a = idex.rs_val;
    endcase
    unique case (fwd_b)
      2'd1:    ex_b = exmem.result;
      2'd2:    ex_b = memwb.data;
      default: ex_b = idex.rt_val;
    endcase
  end

  assign ex_alu_b = idex.ctrl.alu_imm ? idex.imm : ex_b;
  assign ex_shamt = idex.ctrl.shamt_src ? idex.instr[10:6] : ex_a[4:0];

  alu u_alu (.op(idex.ctrl.alu_op), .a(ex_a), .b(ex_alu_b), .shamt(ex_shamt), .y(alu_y));

  assign ex_result = idex.ctrl.link     ? idex.pc + 32'd4 :
                     idex.ctrl.nhse_mfs ? mfs_data : alu_y;
  assign mts_en    = idex_v && idex.ctrl.nhse_mts;

  pipe_stage_reg #(.T(exmem_t)) u_exmem (
    .clk, .rst_n, .hold(1'b0), .flush(1'b0),
    .d_valid(idex_v), .d_tid(idex_t_),
    .d('{pc: idex.pc, reg_write: idex.ctrl.reg_write, mem_read: idex.ctrl.mem_read,
         mem_write: idex.ctrl.mem_write, dst: idex.ctrl.dst, result: ex_result,
         st_data: ex_b}),
    .q_valid(exmem_v), .q_tid(exmem_t_), .q(exmem)
  );

  // ---------------------------------------------------------------- MEM
  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(exmem.result), .we(exmem_v && exmem.mem_write), .wdata(exmem.st_data),
    .rdata(dmem_rdata),
    .ext_we(dmem_ext_we), .ext_addr(dmem_ext_addr), .ext_wdata(dmem_ext_wdata)
  );

  assign mem_result = exmem.mem_read ? dmem_rdata : exmem.result;

  pipe_stage_reg #(.T(memwb_t)) u_memwb (
    .clk, .rst_n, .hold(1'b0), .flush(1'b0),
    .d_valid(exmem_v), .d_tid(exmem_t_),
    .d('{pc: exmem.pc, reg_write: exmem.reg_write, dst: exmem.dst, data: mem_result}),
    .q_valid(memwb_v), .q_tid(memwb_t_), .q(memwb)
  );

  // ---------------------------------------------------------------- observation
  assign wb_valid = memwb_v;
  assign wb_tid   = memwb_t_;
  assign wb_pc    = memwb.pc;
  assign wb_we    = memwb_v && memwb.reg_write;
  assign wb_dst   = memwb.dst;
  assign wb_data  = memwb.data;
  assign st_valid = exmem_v && exmem.mem_write;
  assign st_tid   = exmem_t_;
  assign st_addr  = exmem.result;
  assign st_data  = exmem.st_data;
endmodule
