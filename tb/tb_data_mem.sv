// tb_data_mem: random stores through both write ports (pipeline port has
// priority) and loads, against a reference array.
module tb_data_mem;
  import mt_pkg::*;
  logic clk = 0; always #5 clk = ~clk;
  logic we = 0, ext_we = 0; word_t addr = 0, wdata = 0, rdata, ext_addr = 0, ext_wdata = 0;
  word_t ref_m [64];
  int checks = 0, failures = 0;
  data_mem #(.WORDS(64)) dut (.clk, .addr, .we, .wdata, .rdata, .ext_we, .ext_addr, .ext_wdata);
  initial begin
    repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int w = 0; w < 64; w++) begin
      @(negedge clk); ext_we = 1; ext_addr = w * 4; ext_wdata = w; ref_m[w] = w;
    end
    @(negedge clk); ext_we = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); ext_we = $urandom_range(0, 1);
      addr = $urandom_range(0, 63) * 4; wdata = $urandom;
      ext_addr = $urandom_range(0, 63) * 4; ext_wdata = $urandom;
      #1; checks++;
      if (rdata != ref_m[addr[7:2]]) begin failures++; $display("FAIL read %h", addr); end
      @(posedge clk);
      if (we) ref_m[addr[7:2]] = wdata; else if (ext_we) ref_m[ext_addr[7:2]] = ext_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
