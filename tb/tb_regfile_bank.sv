// tb_regfile_bank: per-thread isolation of the register files, r0 = 0 and
// write-before-read, against a reference array kept here.
module tb_regfile_bank;
  import mt_pkg::*;
  localparam int N = 4;
  logic clk = 0; always #5 clk = ~clk;
  tid_t rd_tid, wr_tid; reg_t rs, rt, wa; word_t rsd, rtd, wd; logic we;
  word_t ref_m [N][32];
  int checks = 0, failures = 0;
  regfile_bank #(.N_THREADS(N)) dut (.clk, .rd_tid, .rs_addr(rs), .rt_addr(rt), .rs_data(rsd),
    .rt_data(rtd), .we, .wr_tid, .wr_addr(wa), .wr_data(wd));
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0;
    // fill every register of every thread with a distinct value
    for (int t = 0; t < N; t++) for (int r = 0; r < 32; r++) begin
      @(negedge clk); we = 1; wr_tid = t; wa = r; wd = 32'h1000 * t + r; ref_m[t][r] = (r == 0) ? 0 : wd;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < N; t++) for (int r = 0; r < 32; r++) begin
      rd_tid = t; rs = r; rt = 31 - r; #1;
      chk(rsd == ref_m[t][r] && rtd == ref_m[t][31 - r], $sformatf("read t%0d r%0d", t, r));
    end
    // random traffic with same-cycle bypass
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wr_tid = $urandom_range(0, N - 1); wa = $urandom; wd = $urandom;
      rd_tid = (n % 3 == 0) ? wr_tid : tid_t'($urandom_range(0, N - 1));
      rs = (n % 5 == 0) ? wa : reg_t'($urandom); rt = $urandom;
      #1;
      begin
        word_t e_rs, e_rt;
        e_rs = ref_m[rd_tid][rs]; e_rt = ref_m[rd_tid][rt];
        if (we && wr_tid == rd_tid && wa == rs && rs != 0) e_rs = wd;
        if (we && wr_tid == rd_tid && wa == rt && rt != 0) e_rt = wd;
        chk(rsd == e_rs && rtd == e_rt, $sformatf("random read %0d", n));
      end
      @(posedge clk); if (we && wa != 0) ref_m[wr_tid][wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
