// tb_instr_mem: writes a pattern through the load port and reads it back.
module tb_instr_mem;
  import mt_pkg::*;
  logic clk = 0; always #5 clk = ~clk;
  logic we = 0; word_t addr = 0, rdata, waddr = 0, wdata = 0;
  int checks = 0, failures = 0;
  instr_mem #(.WORDS(256)) dut (.clk, .addr, .rdata, .we, .waddr, .wdata);
  initial begin
    repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int w = 0; w < 256; w++) begin
      @(negedge clk); we = 1; waddr = w * 4; wdata = w * 32'h0101_0101 ^ 32'hA5A5_0000;
    end
    @(negedge clk); we = 0;
    for (int w = 0; w < 256; w++) begin
      addr = w * 4 + (w % 4 == 1 ? 1024 : 0); #1;   // address wraps
      checks++;
      if (rdata != (w * 32'h0101_0101 ^ 32'hA5A5_0000)) begin failures++; $display("FAIL word %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
