// nhse_scheduler: the n-thread dynamic scheduler and its output decoders.
// Every clock it picks the thread whose next instruction enters the
// pipeline, and drives en_pipeline_thread (one-hot, o_i) plus the encoded
// thread number (nHSE_PC_select) and a valid bit (en_PC_decode).
// Policy:
//  * Disabled (power-up): only thread 0 (HT0) is issued, every cycle.
//  * Enabled: the interleave set is the up to MAX_ILV ready threads of
//    highest priority (lowest number); a lower-priority thread only runs
//    when fewer higher-priority threads are ready.
//  * If the set holds exactly one hard thread, that HT gets every second
//    slot (fixed rate, so its timing is known at compile time) and the soft
//    threads of the set share the other slots round-robin; a slot with no
//    ST left is a bubble.
//  * Otherwise the members of the set are issued round-robin, one per slot.
//  * A thread that is woken by an event in this cycle (urgent) and is in the
//    set takes the slot at once, the highest-priority one first, and the
//    round-robin continues after it. With a single HT this only happens in
//    an ST slot (an urgent HT then counts the slot as its own), so the HT
//    keeps its spacing of two. This bounds the event response to the next
//    fetch when the woken thread is not held back by the HT slot.
// These rules reproduce every row of the hazard/forward configuration table
// (1 ST: latency 1; 2 HT, 2 ST, 1 HT + 1 ST: latency 2; 1 HT + 2 ST: HT 2,
// ST 4; 4 threads: 4). The table fixes the latencies; the rules that give
// them, the set size of 4 and the priority filter are this design's.
// advance = 0 (pipeline stall) keeps the round-robin position and slot
// phase, so the same choice is repeated. n_ht/n_st report the set.
// The one-hot assertion is disabled during reset, which is why rst_n is
// seen both as an asynchronous reset and as a sampled signal.
module nhse_scheduler
  import mt_pkg::*;
#(
  parameter int unsigned N_THREADS = 16,
  parameter int unsigned MAX_ILV   = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,       // Enable SCHEDULER
  input  logic [N_THREADS-1:0] ready,
  input  logic [N_THREADS-1:0] is_ht,
  input  logic [N_THREADS-1:0] urgent,       // woken by an event this cycle
  input  logic                 advance,
  output logic                 sel_valid,    // en_PC_decode
  output tid_t                 sel_tid,      // nHSE_PC_select
  output logic [N_THREADS-1:0] en_pipeline_thread,
  output logic [5:0]           n_ht,
  output logic [5:0]           n_st
);
  logic [N_THREADS-1:0] set_m, ht_m, st_m, cand;
  tid_t                 last_q;     // last thread chosen (round-robin)
  tid_t                 last_st_q;  // last soft thread chosen (ST slots)
  logic                 phase_q;    // 0: HT slot, 1: ST slot
  logic                 ht_mode;
  logic                 urgent_hit;
  tid_t                 last_d, last_st_d;
  tid_t                 rr_from;
  logic                 phase_d;

  localparam int TW = (N_THREADS > 1) ? $clog2(N_THREADS) : 1;

  // interleave set: first MAX_ILV ready threads by priority
  always_comb begin
    int cnt;
    cnt   = 0;
    set_m = '0;
    n_ht  = '0;
    n_st  = '0;
    for (int i = 0; i < N_THREADS; i++) begin
      if (ready[i] && cnt < int'(MAX_ILV)) begin
        set_m[i] = 1'b1;
        cnt++;
        if (is_ht[i]) n_ht++;
        else          n_st++;
      end
    end
    ht_m = set_m & is_ht;
    st_m = set_m & ~is_ht;
  end

  assign ht_mode = (n_ht == 6'd1);

  // round-robin pick among cand, starting after the last choice of the
  // same kind of slot
  always_comb begin
    logic found;
    if (!ht_mode)     cand = set_m;
    else if (!phase_q) cand = ht_m;
    else              cand = st_m;
    rr_from = (ht_mode && phase_q) ? last_st_q : last_q;
    found   = 1'b0;
    sel_tid = '0;
    for (int i = 0; i < N_THREADS; i++)
      if (!found && cand[i] && tid_t'(i) > rr_from) begin
        found   = 1'b1;
        sel_tid = tid_t'(i);
      end
    for (int i = 0; i < N_THREADS; i++)
      if (!found && cand[i]) begin
        found   = 1'b1;
        sel_tid = tid_t'(i);
      end
    sel_valid  = found;
    urgent_hit = 1'b0;
    // urgent dispatch; in HT mode only in the ST slot, so the HT keeps its
    // fixed rate and never issues on two consecutive cycles
    if (!ht_mode || phase_q)
      for (int i = 0; i < N_THREADS; i++)
        if (!urgent_hit && urgent[i] && set_m[i]) begin
          urgent_hit = 1'b1;
          sel_valid  = 1'b1;
          sel_tid    = tid_t'(i);
        end
    if (!enable) begin
      urgent_hit = 1'b0;
      sel_valid  = ready[0];
      sel_tid    = '0;
    end
  end

  // round-robin positions and slot phase after this cycle's choice. The
  // phase follows the kind of thread just issued, so a change of the set
  // between the two slot patterns never issues one thread twice in a row.
  always_comb begin
    logic sel_is_ht;
    sel_is_ht = is_ht[sel_tid[TW-1:0]];
    last_d    = sel_valid ? sel_tid : last_q;
    last_st_d = (sel_valid && !sel_is_ht) ? sel_tid : last_st_q;
    if (ht_mode)
      // an urgent HT taking the ST slot counts as its HT slot: next is ST
      phase_d = (urgent_hit && sel_is_ht) ? 1'b1 : ~phase_q;
    else
      phase_d = sel_valid && sel_is_ht;
  end

  always_comb begin
    en_pipeline_thread = '0;
    for (int i = 0; i < N_THREADS; i++)
      en_pipeline_thread[i] = sel_valid && sel_tid == tid_t'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q    <= tid_t'(N_THREADS - 1);
      last_st_q <= tid_t'(N_THREADS - 1);
      phase_q   <= 1'b0;
    end else if (advance) begin
      last_q    <= last_d;
      last_st_q <= last_st_d;
      phase_q   <= phase_d;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(en_pipeline_thread));
endmodule
