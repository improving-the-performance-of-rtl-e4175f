// tb_nmpra_mt: end-to-end test of the multithreaded core at its default
// size (16 threads). One program per thread is loaded into instruction
// memory, then:
//  * thread 0 runs alone with the scheduler off (configuration UFW1):
//    EX/MEM forwarding, a load-use stall, a branch that needs a stall and
//    is taken (flush of the wrong-path fetch); it then makes thread 1 a hard
//    thread, activates threads 1-3, enables its interrupt and the scheduler,
//    and sleeps (WAIT).
//  * threads 1-3 each sum 1..K with a loop (different K, so they finish one
//    after the other and the interleave set shrinks through the forward
//    configurations), store the sum, then sleep on one event type each:
//    thread 1 on its periodic timer (three periods), thread 2 on deadline 1
//    and then deadline 2, thread 3 on its watchdog.
//  * the testbench raises irq[0] half-way through a clock; thread 0 must be
//    selected before the second clock edge (response <= 1.5 cycles); it
//    stores the pending event bits, then executes an undefined instruction,
//    and the exception handler stores a marker.
// Every store is checked against values worked out here, and while thread 1
// is the only hard thread of the interleave set it must be chosen on every
// second clock. Each mechanism
// (stall, flush, both EX forwarding paths, ID forwarding, exception,
// every forward-unit configuration, each of the five event sources, sleep,
// event wake, urgent dispatch) is counted, and one that never happens
// counts as a failure.
`timescale 1ns/1ps
module tb_nmpra_mt;
  import mt_pkg::*;
  import mt_asm_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] irq = '0;
  logic imem_we = 1'b0, dmem_ext_we = 1'b0;
  word_t imem_waddr = '0, imem_wdata = '0, dmem_ext_addr = '0, dmem_ext_wdata = '0;
  logic [N-1:0] en_pipeline_thread;
  logic sched_en, wb_valid, wb_we, st_valid, stall, flush_if, exception;
  fwcfg_e fw_cfg;
  tid_t wb_tid, st_tid;
  word_t wb_pc, wb_data, st_addr, st_data;
  reg_t wb_dst;

  nmpra_mt dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------- programs
  word_t prog [int];
  task automatic put(input int addr, input word_t w); prog[addr] = w; endtask

  localparam int K1 = 40, K2 = 14, K3 = 4;
  localparam int RES1 = 'h110, RES2 = 'h114, RES3 = 'h118;
  localparam int EVT1 = 'h120, CNT1 = 'h124, EVT2A = 'h128, EVT2B = 'h12C, EVT3 = 'h130;
  localparam int DONE1 = 'h140, DONE2 = 'h144, DONE3 = 'h148;

  task automatic build();
    int a;
    // ---- thread 0 (HT0), base 0x000
    a = 'h000;
    put(a, ADDI(5, 0, 1));    a += 4;
    put(a, ADDI(1, 0, 5));    a += 4;
    put(a, ADDI(2, 1, 3));    a += 4;   // r2 = 8, forwarded from EX/MEM
    put(a, LW(3, 0, 0));      a += 4;   // r3 = M[0] = 100
    put(a, ADD(4, 3, 2));     a += 4;   // load-use stall, r4 = 108
    put(a, BEQ(4, 4, 1));     a += 4;   // stall (r4 in EX), taken
    put(a, ADDI(5, 0, 99));   a += 4;   // wrong path: flushed
    put(a, SW(4, 'h100, 0));  a += 4;   // M[100] = 108
    put(a, SW(5, 'h104, 0));  a += 4;   // M[104] = 1
    put(a, ADDI(6, 0, 1));    a += 4;
    put(a, MTS(6, SR_TYPE, 1));  a += 4;   // thread 1 is a hard thread
    put(a, MTS(6, SR_STATE, 1)); a += 4;
    put(a, MTS(6, SR_STATE, 2)); a += 4;
    put(a, MTS(6, SR_STATE, 3)); a += 4;
    put(a, MTS(6, SR_EVEN, 0));  a += 4;   // interrupt event for thread 0
    put(a, MTS(6, SR_CTRL, 0));  a += 4;   // scheduler on
    put(a, WAIT());              a += 4;
    put(a, MFS(7, SR_EVPND, 0)); a += 4;
    put(a, MTS(7, SR_EVPND, 0)); a += 4;   // clear
    put(a, SW(7, 'h108, 0));     a += 4;   // M[108] = 1 (interrupt)
    put(a, 32'hFC00_0000);       a += 4;   // undefined opcode -> exception
    put(a, ADDI(8, 0, 1));       a += 4;   // never executed
    put(a, SW(8, 'h10C, 0));     a += 4;
    // ---- exception handler at 0xFF0
    a = 'hFF0;
    put(a, ADDI(9, 0, 'h77));    a += 4;
    put(a, SW(9, 'h10C, 0));     a += 4;   // M[10C] = 0x77
    put(a, MTS(0, SR_EVEN, 0));  a += 4;
    put(a, WAIT());              a += 4;
    // ---- workers
    for (int t = 1; t <= 3; t++) begin
      int k, res;
      k   = (t == 1) ? K1 : (t == 2) ? K2 : K3;
      res = (t == 1) ? RES1 : (t == 2) ? RES2 : RES3;
      a = t * 'h100;
      put(a, ADDI(1, 0, 0));  a += 4;
      put(a, ADDI(2, 0, k));  a += 4;
      put(a, ADD(1, 1, 2));   a += 4;     // loop
      put(a, ADDI(2, 2, -1)); a += 4;
      put(a, BNE(2, 0, -3));  a += 4;
      put(a, SW(1, res, 0));  a += 4;
      if (t == 1) begin
        put(a, ADDI(3, 0, 20));          a += 4;
        put(a, MTS(3, SR_TIMER, 1));     a += 4;
        put(a, ADDI(3, 0, 1 << EV_TIMER)); a += 4;
        put(a, MTS(3, SR_EVEN, 1));      a += 4;
        put(a, ADDI(4, 0, 0));           a += 4;
        put(a, ADDI(5, 0, 3));           a += 4;
        put(a, WAIT());                  a += 4;   // W
        put(a, MFS(6, SR_EVPND, 1));     a += 4;
        put(a, MTS(6, SR_EVPND, 1));     a += 4;
        put(a, ADDI(4, 4, 1));           a += 4;
        put(a, BNE(4, 5, -5));           a += 4;   // -> W
        put(a, MTS(0, SR_TIMER, 1));     a += 4;
        put(a, SW(6, EVT1, 0));          a += 4;
        put(a, SW(4, CNT1, 0));          a += 4;
      end else if (t == 2) begin
        put(a, ADDI(3, 0, 30));          a += 4;
        put(a, MTS(3, SR_DL1, 2));       a += 4;
        put(a, ADDI(3, 0, 120));         a += 4;
        put(a, MTS(3, SR_DL2, 2));       a += 4;
        put(a, ADDI(3, 0, (1 << EV_DL1) | (1 << EV_DL2))); a += 4;
        put(a, MTS(3, SR_EVEN, 2));      a += 4;
        put(a, WAIT());                  a += 4;
        put(a, MFS(6, SR_EVPND, 2));     a += 4;
        put(a, MTS(6, SR_EVPND, 2));     a += 4;
        put(a, SW(6, EVT2A, 0));         a += 4;
        put(a, WAIT());                  a += 4;
        put(a, MFS(7, SR_EVPND, 2));     a += 4;
        put(a, MTS(7, SR_EVPND, 2));     a += 4;
        put(a, SW(7, EVT2B, 0));         a += 4;
      end else begin
        put(a, ADDI(3, 0, 25));          a += 4;
        put(a, MTS(3, SR_WDT, 3));       a += 4;
        put(a, ADDI(3, 0, 1 << EV_WDT)); a += 4;
        put(a, MTS(3, SR_EVEN, 3));      a += 4;
        put(a, WAIT());                  a += 4;
        put(a, MFS(6, SR_EVPND, 3));     a += 4;
        put(a, SW(6, EVT3, 0));          a += 4;
      end
      put(a, MTS(0, SR_EVEN, t));        a += 4;
      put(a, ADDI(8, 0, t));             a += 4;
      put(a, SW(8, (t == 1) ? DONE1 : (t == 2) ? DONE2 : DONE3, 0)); a += 4;
      put(a, WAIT());                    a += 4;
    end
  endtask

  // ------------------------------------------------------------- observers
  word_t mem [int];
  always @(posedge clk) if (rst_n && st_valid) mem[int'(st_addr)] = st_data;

  int n_stall = 0, n_flush = 0, n_exc = 0, n_fwd_mem = 0, n_fwd_wb = 0, n_fwd_id = 0;
  int n_cfg [8];
  int n_ev [NEV];
  int n_wait = 0, n_wake = 0, n_urgent = 0;
  bit stall_outside_ufw1 = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall)    n_stall++;
    if (flush_if) n_flush++;
    if (exception) n_exc++;
    if (stall && fw_cfg != FW_UFW1) stall_outside_ufw1 = 1;
    if (dut.idex_v && (dut.fwd_a == 2'd1 || dut.fwd_b == 2'd1)) n_fwd_mem++;
    if (dut.idex_v && (dut.fwd_a == 2'd2 || dut.fwd_b == 2'd2)) n_fwd_wb++;
    if (dut.ifid_v && !stall && (dut.id_fwd_a || dut.id_fwd_b) &&
        (dut.id_ctrl.branch_eq || dut.id_ctrl.branch_ne || dut.id_ctrl.jump_reg)) n_fwd_id++;
    if (sched_en) n_cfg[fw_cfg]++;
    if (dut.wait_req) n_wait++;
    for (int i = 0; i < N; i++)
      if (dut.u_nhse.urgent[i]) n_wake++;
    if (dut.u_nhse.u_sched.urgent_hit) n_urgent++;
  end
  // hard-thread spacing: while the set holds exactly one HT (thread 1;
  // configurations UFW3 and UFW4) on two consecutive clocks, thread 1 must
  // be chosen on every second clock, never twice in a row nor skipped twice
  int n_ht_pairs = 0, n_ht_bad = 0;
  logic ht_cfg_q = 1'b0, ht_sel_q = 1'b0;
  always @(posedge clk) begin
    logic ht_cfg;
    ht_cfg = rst_n && sched_en && (fw_cfg == FW_UFW3 || fw_cfg == FW_UFW4);
    if (ht_cfg && ht_cfg_q) begin
      n_ht_pairs++;
      if (en_pipeline_thread[1] == ht_sel_q) n_ht_bad++;
    end
    ht_cfg_q <= ht_cfg;
    ht_sel_q <= en_pipeline_thread[1];
  end
  // rising pending bits = events that fired
  logic [NEV-1:0] pend_q [N];
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (rst_n)
        for (int e = 0; e < NEV; e++)
          if (dut.u_nhse.pending[i][e] && !pend_q[i][e]) n_ev[e]++;
      pend_q[i] <= dut.u_nhse.pending[i];
    end
  end

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rd(int addr);
    return mem.exists(addr) ? mem[addr] : 32'hDEAD_BEEF;
  endfunction

  // ------------------------------------------------------------- stimulus
  initial begin
    int resp;
    build();
    for (int i = 0; i < N; i++) pend_q[i] = '0;
    repeat (2) @(posedge clk);
    // load instruction memory (all words: unused ones become NOP)
    for (int w = 0; w < 1024; w++) begin
      imem_we    <= 1'b1;
      imem_waddr <= w * 4;
      imem_wdata <= prog.exists(w * 4) ? prog[w * 4] : NOP();
      @(posedge clk);
    end
    imem_we        <= 1'b0;
    dmem_ext_we    <= 1'b1;
    dmem_ext_addr  <= 0;
    dmem_ext_wdata <= 100;
    @(posedge clk);
    dmem_ext_we <= 1'b0;
    @(negedge clk);
    rst_n = 1'b1;

    // wait for thread 2 to finish, then interrupt thread 0
    wait (mem.exists(DONE2));
    @(negedge clk);
    check(dut.u_nhse.state[0] == TS_SLEEP, "thread 0 sleeps before the interrupt");
    irq[0] = 1'b1;                     // mid-cycle: asynchronous to the clock
    resp = -1;
    for (int k = 0; k < 4 && resp < 0; k++) begin
      @(posedge clk); #1;
      if (en_pipeline_thread[0]) resp = k;
    end
    check(resp == 0, $sformatf("interrupt response: thread 0 selected after %0d extra cycles", resp));
    @(negedge clk) irq[0] = 1'b0;

    wait (mem.exists(DONE1) && mem.exists(DONE3) && mem.exists('h10C));
    repeat (20) @(posedge clk);

    check(rd('h100) == 108, $sformatf("forward/stall/branch result %0d", rd('h100)));
    check(rd('h104) == 1,   "wrong-path instruction was flushed");
    check(rd('h108) == 32'h1, $sformatf("thread 0 woke on interrupt, pending=%h", rd('h108)));
    check(rd('h10C) == 32'h77, "exception handler ran");
    check(rd(RES1) == K1 * (K1 + 1) / 2, $sformatf("thread 1 sum %0d", rd(RES1)));
    check(rd(RES2) == K2 * (K2 + 1) / 2, $sformatf("thread 2 sum %0d", rd(RES2)));
    check(rd(RES3) == K3 * (K3 + 1) / 2, $sformatf("thread 3 sum %0d", rd(RES3)));
    check(rd(EVT1) == (1 << EV_TIMER), $sformatf("thread 1 timer event %h", rd(EVT1)));
    check(rd(CNT1) == 3, "thread 1 woke three times on its timer");
    check(rd(EVT2A) == (1 << EV_DL1), $sformatf("thread 2 deadline 1 %h", rd(EVT2A)));
    check(rd(EVT2B) == (1 << EV_DL2), $sformatf("thread 2 deadline 2 %h", rd(EVT2B)));
    check(rd(EVT3) == (1 << EV_WDT), $sformatf("thread 3 watchdog %h", rd(EVT3)));
    check(rd(DONE1) == 1 && rd(DONE2) == 2 && rd(DONE3) == 3, "done markers");
    check(!stall_outside_ufw1, "no stall outside single-thread configuration");
    check(n_ht_pairs > 0 && n_ht_bad == 0,
          $sformatf("hard thread every second clock: %0d clock pairs, %0d broken", n_ht_pairs, n_ht_bad));

    // every mechanism must have happened
    check(n_stall > 0,   $sformatf("stalls %0d", n_stall));
    check(n_flush > 0,   $sformatf("flushes %0d", n_flush));
    check(n_exc == 1,    $sformatf("exceptions %0d", n_exc));
    check(n_fwd_mem > 0, $sformatf("EX/MEM forwards %0d", n_fwd_mem));
    check(n_fwd_wb > 0,  $sformatf("MEM/WB forwards %0d", n_fwd_wb));
    check(n_fwd_id > 0,  $sformatf("ID branch forwards %0d", n_fwd_id));
    check(n_wait > 0,    $sformatf("WAITs %0d", n_wait));
    check(n_wake > 0,    $sformatf("event wakes %0d", n_wake));
    check(n_urgent > 0,  $sformatf("urgent dispatches %0d", n_urgent));
    for (int c = FW_UFW1; c <= FW_NOFW; c++)
      check(n_cfg[c] > 0, $sformatf("configuration %0d seen %0d cycles", c, n_cfg[c]));
    for (int e = 0; e < NEV; e++)
      check(n_ev[e] > 0, $sformatf("event source %0d fired %0d times", e, n_ev[e]));
    $display("stalls=%0d flushes=%0d fwd_mem=%0d fwd_wb=%0d fwd_id=%0d waits=%0d wakes=%0d urgent=%0d cycles=%0d",
             n_stall, n_flush, n_fwd_mem, n_fwd_wb, n_fwd_id, n_wait, n_wake, n_urgent, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
