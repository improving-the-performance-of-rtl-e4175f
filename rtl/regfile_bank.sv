// regfile_bank: the replicated general-purpose registers, one 32 x 32-bit
// register file per thread, so that a thread switch needs no save/restore:
// the thread tag of an instruction selects its own file.
// Two combinational read ports (rs, rt) for the instruction in ID and one
// write port for the instruction in WB. A write to the same thread and
// register as a read in the same cycle is passed through to the read
// (write-before-read), which is what lets an instruction see a result of its
// own thread three or more slots earlier without forwarding. Register 0 of
// every thread reads as zero. The files are a plain memory array with no
// reset (so it maps onto RAM, as the replicated register files are meant
// to); software initialises a register before reading it.
module regfile_bank
  import mt_pkg::*;
#(
  parameter int unsigned N_THREADS = 16
) (
  input  logic  clk,
  // read ports (ID stage)
  input  tid_t  rd_tid,
  input  reg_t  rs_addr,
  input  reg_t  rt_addr,
  output word_t rs_data,
  output word_t rt_data,
  // write port (WB stage)
  input  logic  we,
  input  tid_t  wr_tid,
  input  reg_t  wr_addr,
  input  word_t wr_data
);
  localparam int TW = (N_THREADS > 1) ? $clog2(N_THREADS) : 1;

  word_t regs [N_THREADS][32];

  logic [TW-1:0] rd_t, wr_t;
  assign rd_t = rd_tid[TW-1:0];
  assign wr_t = wr_tid[TW-1:0];

  always_ff @(posedge clk) begin
    if (we && wr_addr != 5'd0) regs[wr_t][wr_addr] <= wr_data;
  end

  always_comb begin
    rs_data = regs[rd_t][rs_addr];
    rt_data = regs[rd_t][rt_addr];
    if (we && wr_tid == rd_tid && wr_addr == rs_addr) rs_data = wr_data;
    if (we && wr_tid == rd_tid && wr_addr == rt_addr) rt_data = wr_data;
    if (rs_addr == 5'd0) rs_data = '0;
    if (rt_addr == 5'd0) rt_data = '0;
  end
endmodule
