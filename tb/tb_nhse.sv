// tb_nhse: the scheduler engine through its instruction interface: power-up
// (only HT0, scheduler off), MTS writes of CTRL/STATE/TYPE/EVEN/DL1, MFS
// reads of every register, WAIT putting a thread to sleep and removing it
// from the schedule at once, and an interrupt waking it with the thread
// selected in the cycle after the sampling edge.
module tb_nhse;
  import mt_pkg::*;
  localparam int N = 4;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0, mts_en = 0, wreq = 0, adv = 1, sv, sen;
  tid_t mts_tgt = 0, mfs_tgt = 0, wtid = 0, stid;
  logic [3:0] mts_sel = 0, mfs_sel = 0; word_t mts_data = 0, mfs_data;
  logic [N-1:0] irq = 0, ept, is_ht; logic [5:0] nht, nst;
  tstate_e state [N]; logic [NEV-1:0] pending [N];
  int checks = 0, failures = 0;
  nhse #(.N_THREADS(N)) dut (.clk, .rst_n, .irq, .mts_en, .mts_tgt, .mts_sel, .mts_data,
    .mfs_tgt, .mfs_sel, .mfs_data, .wait_req(wreq), .wait_tid(wtid), .advance(adv),
    .sel_valid(sv), .sel_tid(stid), .en_pipeline_thread(ept), .sched_en(sen), .n_ht(nht),
    .n_st(nst), .state, .is_ht, .pending);
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic mts(int t, logic [3:0] s, word_t d);
    @(negedge clk); mts_en = 1; mts_tgt = t; mts_sel = s; mts_data = d;
    @(posedge clk); #1; mts_en = 0;
  endtask
  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #12 rst_n = 1; #1;
    chk(!sen && sv && stid == 0 && ept == 4'b0001, "power-up: HT0 only");
    mfs_tgt = 0; mfs_sel = SR_ID; #1; chk(mfs_data == 32'h20, "ID of thread 0 = HT, 0");
    mfs_sel = SR_CTRL; #1; chk(mfs_data == 0, "CTRL reads 0");
    mts(1, SR_STATE, 1); mts(2, SR_STATE, 1); mts(2, SR_TYPE, 1);
    mfs_tgt = 1; mfs_sel = SR_STATE; #1; chk(mfs_data == 1, "thread 1 active");
    mfs_tgt = 2; mfs_sel = SR_TYPE; #1; chk(mfs_data == 1, "thread 2 HT");
    mts(3, SR_EVEN, 5'h1F); mfs_tgt = 3; mfs_sel = SR_EVEN; #1; chk(mfs_data == 32'h1F, "EVEN readback");
    mts(3, SR_TIMER, 1000); mfs_sel = SR_TIMER; #1; chk(mfs_data == 1000, "TIMER readback");
    mts(3, SR_TIMER, 0);
    mts(3, SR_WDT, 50); mfs_sel = SR_WDT; #1; chk(mfs_data == 50, "WDT loaded"); @(posedge clk); #1; chk(mfs_data == 49, "WDT counts down");
    mts(3, SR_WDT, 0);
    mts(3, SR_DL2, 70); mfs_sel = SR_DL2; #1; chk(mfs_data == 70, "DL2 loaded"); @(posedge clk); #1; chk(mfs_data == 69, "DL2 counts down");
    mts(3, SR_DL2, 0);
    mts(0, SR_CTRL, 1); chk(sen, "scheduler enabled");
    // threads 0 (HT), 1 (ST), 2 (HT) active: round-robin over three
    begin
      int seen [N]; seen = '{default: 0};
      repeat (12) begin @(negedge clk); if (sv) seen[stid]++; end
      chk(seen[0] == 4 && seen[1] == 4 && seen[2] == 4 && seen[3] == 0, "three threads share the slots");
    end
    // thread 1 enables its interrupt and waits
    mts(1, SR_EVEN, 1 << EV_INT);
    do @(negedge clk); while (!(sv && stid == 1));   // thread 1 is being selected
    wreq = 1; wtid = 1; #1;
    chk(!(sv && stid == 1), "waiting thread not selected in the WAIT cycle");
    @(posedge clk); #1; wreq = 0;
    chk(state[1] == TS_SLEEP, "thread 1 sleeps");
    repeat (6) begin @(negedge clk); chk(!(sv && stid == 1), "sleeping thread never selected"); end
    // deadline event without enable does not wake it
    mts(1, SR_DL1, 3); repeat (5) @(posedge clk); #1;
    chk(state[1] == TS_SLEEP && pending[1][EV_DL1], "disabled event pends but does not wake");
    mfs_tgt = 1; mfs_sel = SR_EVPND; #1; chk(mfs_data == (1 << EV_DL1), "EVPND readback");
    mts(1, SR_EVPND, 1 << EV_DL1);
    // interrupt mid-cycle
    @(negedge clk); #1 irq[1] = 1;
    @(posedge clk); #1;
    chk(sv && stid == 1 && ept[1], "woken thread selected right after the sampling edge");
    @(posedge clk); #1;
    chk(state[1] == TS_ACTIVE, "thread 1 active again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
