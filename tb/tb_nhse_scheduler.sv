// tb_nhse_scheduler: issue spacing for every row of the hazard/forward
// configuration table (numbers of HT and ST threads -> cycles between two
// instructions of the same thread), the power-up rule (only thread 0), the
// priority filter (at most four threads, highest priority first), urgent
// dispatch of a woken thread, and stall (advance = 0). Finally the ready
// set changes at random every clock (the type mix every 50 clocks), and no
// thread may be chosen on two consecutive clocks while the interleave set
// holds more than one thread, including the clocks where the set switches
// between the single-HT pattern and plain round-robin.
module tb_nhse_scheduler;
  import mt_pkg::*;
  localparam int N = 8;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0, en = 0, adv = 1, sv;
  logic [N-1:0] ready = 0, is_ht = 0, urgent = 0, onehot;
  tid_t st; logic [5:0] nht, nst;
  int checks = 0, failures = 0;
  nhse_scheduler #(.N_THREADS(N)) dut (.clk, .rst_n, .enable(en), .ready, .is_ht, .urgent,
    .advance(adv), .sel_valid(sv), .sel_tid(st), .en_pipeline_thread(onehot), .n_ht(nht), .n_st(nst));
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // run `cyc` cycles and return, per thread, the set of gaps between issues
  task automatic measure(int cyc, output int gap_min [N], output int gap_max [N], output int cnt [N]);
    int last [N];
    for (int i = 0; i < N; i++) begin last[i] = -1; gap_min[i] = 1000; gap_max[i] = 0; cnt[i] = 0; end
    for (int c = 0; c < cyc; c++) begin
      @(negedge clk);
      chk(onehot == (sv ? (N'(1) << st) : '0), "decoder output one-hot matches the selection");
      if (sv) begin
        if (last[st] >= 0) begin
          if (c - last[st] < gap_min[st]) gap_min[st] = c - last[st];
          if (c - last[st] > gap_max[st]) gap_max[st] = c - last[st];
        end
        last[st] = c; cnt[st]++;
      end
    end
  endtask
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int gmin [N], gmax [N], cnt [N];
    int rows [8][4] = '{'{0, 1, 0, 1}, '{2, 0, 2, 0}, '{1, 1, 2, 2}, '{1, 2, 2, 4},
                        '{0, 2, 0, 2}, '{2, 2, 4, 4}, '{4, 0, 4, 0}, '{0, 4, 0, 4}};
    #12 rst_n = 1;
    // scheduler off: thread 0 only, every cycle
    ready = 8'b0000_0111;
    measure(20, gmin, gmax, cnt);
    chk(cnt[0] == 20 && cnt[1] == 0 && cnt[2] == 0, "disabled: only thread 0 issues");
    en = 1;
    foreach (rows[r]) begin
      int nh, ns;
      nh = rows[r][0]; ns = rows[r][1];
      ready = '0; is_ht = '0;
      for (int i = 0; i < nh; i++) begin ready[2 * i] = 1; is_ht[2 * i] = 1; end
      for (int i = 0; i < ns; i++) ready[2 * i + 1] = 1;
      measure(4, gmin, gmax, cnt);     // settle
      measure(48, gmin, gmax, cnt);
      for (int i = 0; i < N; i++) if (ready[i]) begin
        int exp_gap;
        exp_gap = is_ht[i] ? rows[r][2] : rows[r][3];
        chk(gmin[i] == exp_gap && gmax[i] == exp_gap,
            $sformatf("HT=%0d ST=%0d thread %0d gaps %0d..%0d, table %0d", nh, ns, i, gmin[i], gmax[i], exp_gap));
      end
      chk(nht == 6'(nh) && nst == 6'(ns), "set counts");
    end
    // priority filter: six ready soft threads, only 0..3 issue
    ready = 8'b0011_1111; is_ht = 0;
    measure(40, gmin, gmax, cnt);
    chk(cnt[0] == 10 && cnt[3] == 10 && cnt[4] == 0 && cnt[5] == 0, "four highest-priority threads only");
    // urgent dispatch: threads 0,1 active; thread 6 woken
    ready = 8'b0100_0011; urgent = 8'b0100_0000; #1;
    chk(sv && st == 6, "woken thread selected in the same cycle");
    @(negedge clk); urgent = 0; ready = 8'b0100_0011;
    // stall: choice repeats while advance = 0
    #1; begin
      tid_t hold_t; hold_t = st;
      adv = 0; @(negedge clk); chk(st == hold_t, "choice held while stalled");
      @(negedge clk); chk(st == hold_t, "choice held while stalled (2)");
      adv = 1;
    end
    // directed: HT 0 chosen by plain round-robin, then the set drops to one
    // HT; the next slot must go to the soft thread
    is_ht = 8'b0000_0011; ready = 8'b0000_0111;
    do @(negedge clk); while (!(sv && st == 0));
    @(posedge clk); #1 ready = 8'b0000_0101; #1;
    chk(sv && st == 2, $sformatf("after HT 0, pattern change gives thread %0d, expected 2", st));
    // random ready sets
    begin
      int prev, setn;
      prev = -1;
      for (int c = 0; c < 3000; c++) begin
        @(negedge clk);
        if (c % 50 == 0) begin
          is_ht = N'($urandom);
          prev = -1;
        end
        ready = N'($urandom);
        #1;
        setn = 0;
        for (int i = 0; i < N; i++) if (ready[i] && setn < 4) setn++;
        if (setn > 1 && prev >= 0)
          chk(!(sv && int'(st) == prev), $sformatf("thread %0d chosen on consecutive clocks, ready=%b ht=%b", st, ready, is_ht));
        prev = sv ? int'(st) : -1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
