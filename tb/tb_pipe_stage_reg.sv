// tb_pipe_stage_reg: load, hold (stall), flush and reset of one tagged
// pipeline register.
module tb_pipe_stage_reg;
  import mt_pkg::*;
  logic clk = 0; always #5 clk = ~clk;
  logic rst_n = 0, hold = 0, flush = 0, dv = 0, qv;
  tid_t dt, qt; word_t d, q;
  int checks = 0, failures = 0;
  pipe_stage_reg #(.T(word_t)) dut (.clk, .rst_n, .hold, .flush, .d_valid(dv), .d_tid(dt), .d,
    .q_valid(qv), .q_tid(qt), .q);
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic ev; tid_t et; word_t e;
    dt = 0; d = 0;
    #12; chk(!qv, "empty after reset");
    rst_n = 1; ev = 0; et = 0; e = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      hold = ($urandom_range(0, 3) == 0); flush = ($urandom_range(0, 5) == 0);
      dv = $urandom_range(0, 1); dt = $urandom; d = $urandom;
      @(posedge clk);
      if (flush) ev = 0;
      else if (!hold) begin ev = dv; et = dt; e = d; end
      #1;
      chk(qv == ev && (!ev || (qt == et && q == e)), $sformatf("cycle %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
