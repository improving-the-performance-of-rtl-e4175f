// tb_nhse_events: every event source of the Events Block with exact cycle
// counts: a counter written with V fires V clocks after the write; the
// periodic timer fires every P clocks; a watchdog kick restarts it; the
// interrupt sets pending on the first clock edge after its rising edge;
// pending bits clear by writing 1s; wake needs the enable bit.
module tb_nhse_events;
  import mt_pkg::*;
  localparam int N = 2;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0, wr_en = 0; tid_t wr_tid = 0; logic [3:0] wr_sel = 0; word_t wr_data = 0;
  logic [N-1:0] irq = 0, wake;
  logic [NEV-1:0] pending [N], enable [N];
  word_t tp [N], wc [N], d1 [N], d2 [N];
  int checks = 0, failures = 0;
  int cyc = 0; always @(posedge clk) cyc <= cyc + 1;
  nhse_events #(.N_THREADS(N)) dut (.clk, .rst_n, .irq, .wr_en, .wr_tid, .wr_sel, .wr_data,
    .pending, .enable, .timer_period(tp), .wdt_cnt(wc), .dl1_cnt(d1), .dl2_cnt(d2), .wake);
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL @%0d %s", cyc, what); end
  endtask
  task automatic wr(int t, logic [3:0] s, word_t d);
    @(negedge clk); wr_en = 1; wr_tid = t; wr_sel = s; wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask
  // after a write completed at the previous edge, count edges until bit e of
  // thread t is pending
  task automatic expect_fire(int t, int e, int v, string what);
    int k; k = 1;
    while (!pending[t][e] && k < v + 5) begin @(posedge clk); #1; if (!pending[t][e]) k++; end
    chk(pending[t][e] && k == v, $sformatf("%s fired after %0d clocks, expected %0d", what, k, v));
  endtask
  initial begin
    repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #22 rst_n = 1;
    chk(pending[0] == 0 && pending[1] == 0 && wake == 0, "reset");
    // deadline 1 on thread 1: V = 9 (write happens at the edge before the negedge in wr)
    @(negedge clk); wr_en = 1; wr_tid = 1; wr_sel = SR_DL1; wr_data = 9;
    @(posedge clk); #1; wr_en = 0;
    expect_fire(1, EV_DL1, 9, "deadline 1");
    chk(pending[0] == 0, "thread 0 untouched");
    chk(!wake[1], "no wake without enable");
    wr(1, SR_EVEN, 1 << EV_DL1); #1;
    chk(wake[1], "wake with enable");
    wr(1, SR_EVPND, 1 << EV_DL1); #1;
    chk(pending[1] == 0 && !wake[1], "write-1-to-clear");
    // deadline 2 on thread 0
    @(negedge clk); wr_en = 1; wr_tid = 0; wr_sel = SR_DL2; wr_data = 5;
    @(posedge clk); #1; wr_en = 0;
    expect_fire(0, EV_DL2, 5, "deadline 2");
    // watchdog with a kick half-way
    @(negedge clk); wr_en = 1; wr_tid = 0; wr_sel = SR_WDT; wr_data = 10;
    @(posedge clk); #1; wr_en = 0;
    repeat (6) @(posedge clk); #1;
    chk(!pending[0][EV_WDT], "watchdog not yet expired");
    @(negedge clk); wr_en = 1; wr_sel = SR_WDT; wr_data = 10;
    @(posedge clk); #1; wr_en = 0;
    expect_fire(0, EV_WDT, 10, "watchdog after kick");
    // periodic timer, period 7, three periods
    @(negedge clk); wr_en = 1; wr_tid = 1; wr_sel = SR_TIMER; wr_data = 7;
    @(posedge clk); #1; wr_en = 0;
    expect_fire(1, EV_TIMER, 7, "timer first period");
    for (int p = 0; p < 3; p++) begin
      // clear on the next edge (one clock of the new period), then count the rest
      @(negedge clk); wr_en = 1; wr_sel = SR_EVPND; wr_data = 1 << EV_TIMER;
      @(posedge clk); #1; wr_en = 0;
      chk(!pending[1][EV_TIMER], "timer pending cleared");
      begin
        int k; k = 1;
        while (!pending[1][EV_TIMER] && k < 12) begin @(posedge clk); #1; if (!pending[1][EV_TIMER]) k++; end
        chk(k == 6, $sformatf("timer period %0d: fired %0d clocks after the clear, expected 6", p, k));
      end
    end
    wr(1, SR_TIMER, 0);
    // interrupt: asynchronous rising edge mid-cycle
    @(negedge clk); #2 irq[0] = 1;
    @(posedge clk); #1;
    chk(pending[0][EV_INT], "interrupt pending at first edge");
    wr(0, SR_EVPND, 5'h1F);
    repeat (3) @(posedge clk); #1;
    chk(!pending[0][EV_INT], "level held high does not fire again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
