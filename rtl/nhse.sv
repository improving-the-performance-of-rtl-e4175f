// nhse: the hardware scheduler engine. It replaces the software scheduler
// and context switch of an RTOS: the Events Block turns interrupts, timers,
// the watchdog and two deadlines into per-thread pending events, the ID and
// STATE register block keeps each thread active, idle or sleeping, and the
// dynamic scheduler picks, every clock, the thread whose instruction enters
// the pipeline (en_pipeline_thread, one bit per thread, and its number).
// Register interface (driven by the pipeline):
//   MTS (EX stage)  writes register `sel` of thread `tgt`; SR_CTRL bit 0 is
//                   the global scheduler enable (0 after reset: only HT0
//                   runs until it enables the scheduler).
//   MFS (EX stage)  reads register `rsel` of thread `rtgt`, combinational.
//   WAIT (ID stage) puts the issuing thread to sleep unless an enabled event
//                   is already pending. The thread is withheld from the
//                   scheduler in that same cycle.
// A sleeping thread whose enabled event is pending is offered to the
// scheduler in the same cycle its pending bit is set, so it can be fetched
// one clock after the event is sampled.
// Structure (events, thread registers, scheduler, decoders) follows the
// scheduler-engine figure; the register map and instruction interface are
// this design's. One clock is used for the engine and the pipeline.
module nhse
  import mt_pkg::*;
#(
  parameter int unsigned N_THREADS = 16,
  parameter int unsigned MAX_ILV   = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_THREADS-1:0] irq,
  // MTS
  input  logic                 mts_en,
  input  tid_t                 mts_tgt,
  input  logic [3:0]           mts_sel,
  input  word_t                mts_data,
  // MFS
  input  tid_t                 mfs_tgt,
  input  logic [3:0]           mfs_sel,
  output word_t                mfs_data,
  // WAIT
  input  logic                 wait_req,
  input  tid_t                 wait_tid,
  // pipeline
  input  logic                 advance,
  output logic                 sel_valid,
  output tid_t                 sel_tid,
  output logic [N_THREADS-1:0] en_pipeline_thread,
  output logic                 sched_en,
  output logic [5:0]           n_ht,
  output logic [5:0]           n_st,
  output tstate_e              state [N_THREADS],
  output logic [N_THREADS-1:0] is_ht,
  output logic [NEV-1:0]       pending [N_THREADS]
);
  localparam int TW = (N_THREADS > 1) ? $clog2(N_THREADS) : 1;

  logic [NEV-1:0]       enable [N_THREADS];
  word_t                timer_period [N_THREADS];
  word_t                wdt_cnt [N_THREADS];
  word_t                dl1_cnt [N_THREADS];
  word_t                dl2_cnt [N_THREADS];
  logic [N_THREADS-1:0] wake, ready, urgent;
  logic [5:0]           id_reg [N_THREADS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             sched_en <= 1'b0;
    else if (mts_en && mts_sel == SR_CTRL) sched_en <= mts_data[0];
  end

  nhse_events #(.N_THREADS(N_THREADS)) u_events (
    .clk, .rst_n, .irq,
    .wr_en(mts_en), .wr_tid(mts_tgt), .wr_sel(mts_sel), .wr_data(mts_data),
    .pending, .enable, .timer_period, .wdt_cnt, .dl1_cnt, .dl2_cnt, .wake
  );

  nhse_thread_regs #(.N_THREADS(N_THREADS)) u_threads (
    .clk, .rst_n, .wake, .wait_req, .wait_tid,
    .wr_en(mts_en), .wr_tid(mts_tgt), .wr_sel(mts_sel), .wr_data(mts_data),
    .state, .is_ht, .id_reg
  );

  always_comb
    for (int i = 0; i < N_THREADS; i++)
      ready[i] = (state[i] == TS_ACTIVE || (state[i] == TS_SLEEP && wake[i])) &&
                 !(wait_req && wait_tid == tid_t'(i));

  always_comb
    for (int i = 0; i < N_THREADS; i++)
      urgent[i] = state[i] == TS_SLEEP && wake[i];

  nhse_scheduler #(.N_THREADS(N_THREADS), .MAX_ILV(MAX_ILV)) u_sched (
    .clk, .rst_n, .enable(sched_en), .ready, .is_ht, .urgent, .advance,
    .sel_valid, .sel_tid, .en_pipeline_thread, .n_ht, .n_st
  );

  // MFS read mux
  logic [TW-1:0] rt;
  assign rt = mfs_tgt[TW-1:0];
  always_comb begin
    unique case (mfs_sel)
      SR_CTRL:  mfs_data = {31'd0, sched_en};
      SR_STATE: mfs_data = {30'd0, state[rt]};
      SR_TYPE:  mfs_data = {31'd0, is_ht[rt]};
      SR_EVEN:  mfs_data = {{(XLEN-NEV){1'b0}}, enable[rt]};
      SR_TIMER: mfs_data = timer_period[rt];
      SR_WDT:   mfs_data = wdt_cnt[rt];
      SR_DL1:   mfs_data = dl1_cnt[rt];
      SR_DL2:   mfs_data = dl2_cnt[rt];
      SR_EVPND: mfs_data = {{(XLEN-NEV){1'b0}}, pending[rt]};
      SR_ID:    mfs_data = {26'd0, id_reg[rt]};
      default:  mfs_data = '0;
    endcase
  end
endmodule
