// nhse_thread_regs: the ID and STATE register block of every thread.
// ID holds the thread's number, which is also its priority (0 highest,
// N_THREADS-1 lowest), and its type: hard thread (HT, hard real-time) or
// soft thread (ST). STATE is idle (not in use), active (may be scheduled) or
// sleeping (waiting for one of its enabled events).
// Transitions, all on the clock edge:
//   sleeping -> active   an enabled event is pending (wake)
//   active   -> sleeping WAIT executed by the thread while no enabled event
//                        is pending (otherwise it stays active)
//   any      -> any      written by MTS to the STATE register (wins)
// The type is written by MTS to the TYPE register.
// Reset: only thread 0 is active, and it is a hard thread; all others are
// idle soft threads. The state set and the power-up rule (only HT0 runs)
// follow the architecture; the transition rules and write priority are this
// design's.
module nhse_thread_regs
  import mt_pkg::*;
#(
  parameter int unsigned N_THREADS = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N_THREADS-1:0] wake,
  input  logic          wait_req,
  input  tid_t          wait_tid,
  input  logic          wr_en,
  input  tid_t          wr_tid,
  input  logic [3:0]    wr_sel,
  input  word_t         wr_data,
  output tstate_e       state [N_THREADS],
  output logic [N_THREADS-1:0] is_ht,
  output logic [5:0]    id_reg [N_THREADS]  // {type, thread number}
);
  always_comb
    for (int i = 0; i < N_THREADS; i++) id_reg[i] = {is_ht[i], 5'(i)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_THREADS; i++) state[i] <= (i == 0) ? TS_ACTIVE : TS_IDLE;
      is_ht <= N_THREADS'(1);
    end else begin
      for (int i = 0; i < N_THREADS; i++) begin
        logic wr;
        wr = wr_en && wr_tid == tid_t'(i);
        if (state[i] == TS_SLEEP && wake[i])
          state[i] <= TS_ACTIVE;
        if (wait_req && wait_tid == tid_t'(i) && state[i] == TS_ACTIVE && !wake[i])
          state[i] <= TS_SLEEP;
        if (wr && wr_sel == SR_STATE) begin
          unique case (wr_data[1:0])
            2'd1:    state[i] <= TS_ACTIVE;
            2'd2:    state[i] <= TS_SLEEP;
            default: state[i] <= TS_IDLE;
          endcase
        end
        if (wr && wr_sel == SR_TYPE) is_ht[i] <= wr_data[0];
      end
    end
  end
endmodule
