// tb_nmpra_mt_threads: all sixteen threads of the core at its default size.
// Thread 0 makes threads 1 and 9 hard threads, activates threads 1..15,
// switches the scheduler on and sleeps for good. Every worker t sums 1..K(t)
// in a loop (K(t) = 3 + (7t mod 11)), stores the sum at 0x200 + 4t and
// sleeps for good (WAIT with no event enabled). More threads are ready
// than the scheduler interleaves, so lower-priority threads only get the
// pipeline as higher-priority ones finish.
// Thread 0 sleeps with its interrupt enabled. While the set is full, irq[0]
// is raised half-way through a clock: thread 0 must be chosen in the clock
// after the edge that samples it, pushing the lowest-priority member out of
// the set; it stores its pending bits at 0x300 and sleeps again.
// Checked on every clock while the scheduler is on:
//  * the chosen thread is one of the MAX_ILV (4) ready threads with the
//    lowest numbers (priority filter of the interleave set);
//  * the set never holds more than 4 threads, and the forward-unit
//    configuration matches the set's mix of hard and soft threads;
//  * no thread is chosen on consecutive clocks while the set holds more
//    than one thread, and the pipeline never stalls then.
// At the end: all fifteen sums, the interrupt marker, every thread issued at least once, set
// sizes 4, 3, 2 and 1 all seen, and every thread asleep.
// Interface timing and programs use the same encoder package as the other
// core test; thread i's code starts at 0x100 * i.
`timescale 1ns/1ps
module tb_nmpra_mt_threads;
  import mt_pkg::*;
  import mt_asm_pkg::*;

  localparam int N = 16;
  localparam int ILV = 4;

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

  function automatic int kval(int t);
    return 3 + (7 * t) % 11;
  endfunction

  // ------------------------------------------------------------- programs
  word_t prog [int];

  task automatic build();
    int a;
    a = 'h000;
    prog[a] = ADDI(6, 0, 1);          a += 4;
    prog[a] = MTS(6, SR_TYPE, 1);     a += 4;
    prog[a] = MTS(6, SR_TYPE, 9);     a += 4;
    for (int t = 1; t < N; t++) begin
      prog[a] = MTS(6, SR_STATE, t);  a += 4;
    end
    prog[a] = MTS(6, SR_EVEN, 0);     a += 4;   // interrupt event for thread 0
    prog[a] = MTS(6, SR_CTRL, 0);     a += 4;
    prog[a] = WAIT();                 a += 4;
    prog[a] = MFS(7, SR_EVPND, 0);    a += 4;
    prog[a] = MTS(7, SR_EVPND, 0);    a += 4;
    prog[a] = SW(7, 'h300, 0);        a += 4;
    prog[a] = WAIT();                 a += 4;
    for (int t = 1; t < N; t++) begin
      a = t * 'h100;
      prog[a] = ADDI(1, 0, 0);        a += 4;
      prog[a] = ADDI(2, 0, kval(t));  a += 4;
      prog[a] = ADD(1, 1, 2);         a += 4;
      prog[a] = ADDI(2, 2, -1);       a += 4;
      prog[a] = BNE(2, 0, -3);        a += 4;
      prog[a] = SW(1, 'h200 + 4 * t, 0); a += 4;
      prog[a] = WAIT();               a += 4;
    end
  endtask

  // ------------------------------------------------------------- observers
  word_t mem [int];
  always @(posedge clk) if (rst_n && st_valid) mem[int'(st_addr)] = st_data;

  int n_preempt = 0;
  int n_filter_bad = 0, n_size_bad = 0, n_cfg_bad = 0, n_b2b_bad = 0, n_stall_ilv = 0;
  int n_issued [N];
  int n_size [ILV + 1];
  int last_sel = -1;

  always @(posedge clk) if (rst_n && sched_en) begin
    int sel, rank, nready, nh, ns, setsz;
    logic [N-1:0] rdy;
    fwcfg_e exp_cfg;
    rdy = dut.u_nhse.ready;
    sel = -1;
    for (int i = 0; i < N; i++) if (en_pipeline_thread[i]) sel = i;
    // rank of the chosen thread among the ready ones, set contents
    rank = 0; nready = 0; nh = 0; ns = 0;
    for (int i = 0; i < N; i++) if (rdy[i]) begin
      if (sel >= 0 && i < sel) rank++;
      if (nready < ILV) begin
        if (dut.u_nhse.is_ht[i]) nh++; else ns++;
      end
      nready++;
    end
    setsz = nh + ns;
    if (rdy[0] && nready > ILV) n_preempt++;
    if (sel >= 0) begin
      n_issued[sel]++;
      if (!rdy[sel] || rank >= ILV) n_filter_bad++;
    end
    if (int'(dut.n_ht) + int'(dut.n_st) > ILV ||
        int'(dut.n_ht) != nh || int'(dut.n_st) != ns) n_size_bad++;
    if (setsz <= ILV) n_size[setsz]++;
    if      (setsz == 0)                      exp_cfg = FW_NOFW;
    else if (setsz == 1)                      exp_cfg = (nh == 1) ? FW_UFW2 : FW_UFW1;
    else if (setsz == 2)                      exp_cfg = (nh == 1) ? FW_UFW3 : FW_UFW2;
    else if (setsz == 3)                      exp_cfg = (nh == 1) ? FW_UFW4 : FW_NOFW;
    else                                      exp_cfg = FW_NOFW;
    if (fw_cfg != exp_cfg) n_cfg_bad++;
    if (setsz > 1) begin
      if (sel >= 0 && sel == last_sel) n_b2b_bad++;
      if (stall) n_stall_ilv++;
    end
    last_sel = sel;
  end

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_stored();
    for (int t = 1; t < N; t++)
      if (!mem.exists('h200 + 4 * t)) return 1'b0;
    return 1'b1;
  endfunction

  // ------------------------------------------------------------- stimulus
  initial begin
    bit all_sleep;
    int resp;
    build();
    foreach (n_issued[i]) n_issued[i] = 0;
    foreach (n_size[i])   n_size[i] = 0;
    repeat (2) @(posedge clk);
    for (int w = 0; w < 1024; w++) begin
      imem_we    <= 1'b1;
      imem_waddr <= w * 4;
      imem_wdata <= prog.exists(w * 4) ? prog[w * 4] : NOP();
      @(posedge clk);
    end
    imem_we <= 1'b0;
    @(negedge clk);
    rst_n = 1'b1;

    while (!sched_en) @(posedge clk);
    repeat (40) @(negedge clk);
    check(dut.u_nhse.state[0] == TS_SLEEP && int'(dut.n_ht) + int'(dut.n_st) == ILV,
          "thread 0 asleep and the set full before the interrupt");
    irq[0] = 1'b1;
    resp = -1;
    for (int k = 0; k < 4 && resp < 0; k++) begin
      @(posedge clk); #1;
      if (en_pipeline_thread[0]) resp = k;
    end
    check(resp == 0, $sformatf("interrupt response: thread 0 chosen after %0d extra clocks", resp));
    @(negedge clk) irq[0] = 1'b0;

    while (!all_stored()) @(posedge clk);
    repeat (20) @(negedge clk);

    for (int t = 1; t < N; t++)
      check(mem['h200 + 4 * t] == kval(t) * (kval(t) + 1) / 2,
            $sformatf("thread %0d sum %0d, expected %0d", t, mem['h200 + 4 * t],
                      kval(t) * (kval(t) + 1) / 2));
    check(mem.exists('h300) && mem['h300] == (1 << EV_INT), "thread 0 woke on its interrupt");
    check(n_preempt > 0, $sformatf("thread 0 displaced a lower-priority thread for %0d clocks", n_preempt));
    check(n_filter_bad == 0, $sformatf("chosen thread outside the 4 highest-priority ready: %0d", n_filter_bad));
    check(n_size_bad == 0,   $sformatf("interleave set size or mix wrong: %0d", n_size_bad));
    check(n_cfg_bad == 0,    $sformatf("forward configuration wrong: %0d", n_cfg_bad));
    check(n_b2b_bad == 0,    $sformatf("same thread on consecutive clocks while interleaved: %0d", n_b2b_bad));
    check(n_stall_ilv == 0,  $sformatf("stalls while interleaved: %0d", n_stall_ilv));
    for (int t = 1; t < N; t++)
      check(n_issued[t] > 0, $sformatf("thread %0d issued %0d times", t, n_issued[t]));
    for (int s = 1; s <= ILV; s++)
      check(n_size[s] > 0, $sformatf("set of %0d threads seen %0d clocks", s, n_size[s]));
    all_sleep = 1'b1;
    for (int t = 0; t < N; t++)
      if (dut.u_nhse.state[t] != TS_SLEEP) all_sleep = 1'b0;
    check(all_sleep, "every thread asleep at the end");
    $display("clocks=%0d sets: 1=%0d 2=%0d 3=%0d 4=%0d", cyc, n_size[1], n_size[2], n_size[3], n_size[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
