// tb_nhse_thread_regs: reset state (only HT0 active), WAIT to sleeping,
// WAIT with an event already pending, event wake, MTS writes of STATE and
// TYPE, and the ID register.
module tb_nhse_thread_regs;
  import mt_pkg::*;
  localparam int N = 4;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0, wreq = 0, wr_en = 0; tid_t wtid = 0, wr_tid = 0;
  logic [3:0] wr_sel = 0; word_t wr_data = 0; logic [N-1:0] wake = 0, is_ht;
  tstate_e st [N]; logic [5:0] idr [N];
  int checks = 0, failures = 0;
  nhse_thread_regs #(.N_THREADS(N)) dut (.clk, .rst_n, .wake, .wait_req(wreq), .wait_tid(wtid),
    .wr_en, .wr_tid, .wr_sel, .wr_data, .state(st), .is_ht, .id_reg(idr));
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic step(); @(posedge clk); #1; endtask
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #12 rst_n = 1; #1;
    chk(st[0] == TS_ACTIVE && st[1] == TS_IDLE && st[2] == TS_IDLE && st[3] == TS_IDLE, "reset states");
    chk(is_ht == 4'b0001, "reset types");
    chk(idr[0] == 6'b100000 && idr[3] == 6'b000011, "ID register");
    @(negedge clk); wr_en = 1; wr_tid = 2; wr_sel = SR_STATE; wr_data = 1; step(); wr_en = 0;
    chk(st[2] == TS_ACTIVE, "MTS activates thread 2");
    @(negedge clk); wr_en = 1; wr_tid = 2; wr_sel = SR_TYPE; wr_data = 1; step(); wr_en = 0;
    chk(is_ht[2] && idr[2][5], "MTS makes thread 2 an HT");
    @(negedge clk); wreq = 1; wtid = 2; step(); wreq = 0;
    chk(st[2] == TS_SLEEP, "WAIT puts thread 2 to sleep");
    step(); chk(st[2] == TS_SLEEP, "stays asleep");
    @(negedge clk); wake[2] = 1; step();
    chk(st[2] == TS_ACTIVE, "event wakes thread 2");
    @(negedge clk); wreq = 1; wtid = 2; step(); wreq = 0;
    chk(st[2] == TS_ACTIVE, "WAIT with event pending keeps it active");
    @(negedge clk); wake[2] = 0; wreq = 1; wtid = 1; step(); wreq = 0;
    chk(st[1] == TS_IDLE, "WAIT of an idle thread changes nothing");
    @(negedge clk); wr_en = 1; wr_tid = 0; wr_sel = SR_STATE; wr_data = 0; step(); wr_en = 0;
    chk(st[0] == TS_IDLE, "MTS idles thread 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
