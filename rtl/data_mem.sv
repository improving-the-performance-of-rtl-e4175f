// data_mem: data memory shared by all threads, accessed in the MEM stage.
// 32-bit words only (LW/SW): combinational read, synchronous write, byte
// address with the low two bits ignored, addresses wrap modulo the size.
// Size is this design's choice (not given by the architecture). A second
// synchronous write port lets the environment preload data; the pipeline
// port wins if both write the same cycle. Contents are not reset.
module data_mem
  import mt_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  input  word_t addr,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata,
  input  logic  ext_we,
  input  word_t ext_addr,
  input  word_t ext_wdata
);
  localparam int AW = $clog2(WORDS);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we)          mem[addr[AW+1:2]]     <= wdata;
    else if (ext_we) mem[ext_addr[AW+1:2]] <= ext_wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
