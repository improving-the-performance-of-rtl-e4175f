// instr_mem: instruction memory shared by all threads. One combinational
// read port addressed by the fetch PC register (byte address, word aligned)
// and one synchronous write port used to load programs. Size is this
// design's choice (the architecture does not give it): WORDS 32-bit words,
// addresses wrap modulo the size. Contents are not reset.
module instr_mem
  import mt_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  input  word_t addr,     // byte address of the fetch
  output word_t rdata,
  input  logic  we,       // program load
  input  word_t waddr,    // byte address
  input  word_t wdata
);
  localparam int AW = $clog2(WORDS);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
