// hazard_unit: the cases the forward unit cannot cover, all of them inside
// one thread issued on consecutive cycles (configuration UFW1):
//  * stall: the instruction in ID needs, from the same thread's instruction
//    in EX, a load result (load-use) or any result for a branch/JR compare
//    (which happens in ID). One bubble is inserted into EX and the fetch
//    register, IF/ID and the program counters hold.
//  * flush_if: ID redirects its thread (taken branch, jump, WAIT, exception)
//    while the fetch register holds a younger instruction of the same thread;
//    that fetch is discarded.
// When threads are interleaved every second cycle or slower, a thread's
// previous instruction is already in MEM when the next one is in ID, so
// neither case can arise: the hard threads run with no stall and no flush.
// Combinational.
module hazard_unit
  import mt_pkg::*;
(
  input  logic id_valid,
  input  tid_t id_tid,
  input  reg_t id_rs,
  input  reg_t id_rt,
  input  logic id_use_rs,
  input  logic id_use_rt,
  input  logic id_resolves,    // BEQ/BNE/JR: operands needed in ID
  input  logic ex_valid,
  input  tid_t ex_tid,
  input  logic ex_reg_write,
  input  logic ex_mem_read,
  input  reg_t ex_dst,
  input  logic id_redirect,
  input  logic fetch_valid,
  input  tid_t fetch_tid,
  output logic stall,
  output logic flush_if
);
  logic dep;
  always_comb begin
    dep = id_valid && ex_valid && ex_reg_write && ex_tid == id_tid && ex_dst != 5'd0 &&
          ((id_use_rs && ex_dst == id_rs) || (id_use_rt && ex_dst == id_rt));
    stall    = dep && (ex_mem_read || id_resolves);
    flush_if = id_redirect && fetch_valid && fetch_tid == id_tid;
  end
endmodule
