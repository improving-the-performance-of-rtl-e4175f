// tb_pc_unit: reset addresses, fetch of the selected thread, +4 per fetch,
// back-to-back fetch of one thread, redirects through PC1/PC2/PC3 and the
// exception address, and hold. A reference copy of every thread's PC is
// kept here.
module tb_pc_unit;
  import mt_pkg::*;
  localparam int N = 4;
  localparam word_t STRIDE = 32'h100, EXC = 32'hFF0;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0, en = 0, hold = 0, redir = 0, exc = 0, fv;
  tid_t sel = 0, idt = 0, ft; logic [1:0] src = 0;
  word_t p1 = 0, p2 = 0, p3 = 0, fpc, pcif;
  word_t pct [N];
  word_t refpc [N];
  int checks = 0, failures = 0;
  pc_unit #(.N_THREADS(N), .PC_STRIDE(STRIDE), .EXC_PC(EXC)) dut (.clk, .rst_n,
    .en_pc_decode(en), .nhse_pc_select(sel), .hold, .id_redirect(redir), .id_tid(idt),
    .pc_src(src), .pc_exception(exc), .pc1_id(p1), .pc2_id(p2), .pc3_id(p3),
    .fetch_valid(fv), .fetch_tid(ft), .fetch_pc(fpc), .pc_if(pcif), .pc_thread(pct));
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit efv; tid_t eft; word_t efpc;
    #12;
    for (int i = 0; i < N; i++) begin refpc[i] = STRIDE * i; chk(pct[i] == STRIDE * i, "reset PC"); end
    chk(!fv, "fetch register empty after reset");
    rst_n = 1; efv = 0; eft = 0; efpc = 0;
    for (int n = 0; n < 400; n++) begin
      word_t nxt [N];
      @(negedge clk);
      en = $urandom_range(0, 4) != 0;
      sel = (n % 7 < 3) ? tid_t'(1) : tid_t'($urandom_range(0, N - 1));
      hold = ($urandom_range(0, 9) == 0);
      redir = !hold && ($urandom_range(0, 4) == 0);
      idt = $urandom_range(0, N - 1);
      src = $urandom_range(1, 3); exc = ($urandom_range(0, 5) == 0);
      p1 = $urandom & 32'hFFC; p2 = $urandom & 32'hFFC; p3 = $urandom & 32'hFFC;
      // reference next PC
      for (int i = 0; i < N; i++) begin
        nxt[i] = refpc[i];
        if (redir && idt == i) nxt[i] = exc ? EXC : (src == 1) ? p1 : (src == 2) ? p2 : p3;
        else if (efv && !hold && eft == i) nxt[i] = efpc + 4;
      end
      #1;
      for (int i = 0; i < N; i++) chk(pct[i] == nxt[i], $sformatf("PC_thread %0d cycle %0d", i, n));
      chk(pcif == efpc + 4 || !efv, "PC_IF = fetch + 4");
      @(posedge clk);
      if (!hold) begin efv = en; if (en) begin eft = sel; efpc = nxt[sel]; end end
      for (int i = 0; i < N; i++) refpc[i] = nxt[i];
      #1;
      chk(fv == efv && (!efv || (ft == eft && fpc == efpc)), $sformatf("fetch register cycle %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
