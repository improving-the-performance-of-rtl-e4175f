// pc_unit: program counters of all threads and the fetch PC register.
// Each thread i owns a program counter PC[i]. Its next value PC_thread_i is
// chosen by two muxes: the first (PC_src) picks between PC_IF_i (the fetch
// address + 4 when thread i is the one being fetched), PC1_ID_i (branch
// target, or the address after WAIT), PC2_ID_i (J/JAL target) and PC3_ID_i
// (JR target); the second (PC_Exception) overrides with Exception_PC. The
// ID-stage sources only apply to the thread whose instruction is in ID.
// A decoder enabled by en_PC_decode and steered by nHSE_PC_select (the
// thread the scheduler picked this cycle) loads PC_thread of that thread
// into the fetch register on the clock edge; the fetch register addresses
// the instruction memory and feeds the +4 adder. Because the decoder reads
// the next-PC value rather than the stored PC, a thread can be fetched on
// consecutive cycles and a redirect from ID reaches a fetch in the same
// cycle.
// Timing: select in cycle t, instruction memory read in cycle t+1.
// hold (pipeline stall) freezes the fetch register and withholds PC_IF.
// Reset: PC[i] = RESET_PC + i*PC_STRIDE, fetch register empty.
// Follows the PC-selection figure of the architecture; reset addresses, the
// meaning of the three ID inputs and the bypass of the next-PC value into
// the fetch register are this design's choices.
module pc_unit
  import mt_pkg::*;
#(
  parameter int unsigned N_THREADS = 16,
  parameter word_t       RESET_PC  = 32'h0000_0000,
  parameter word_t       PC_STRIDE = 32'h0000_0100,
  parameter word_t       EXC_PC    = 32'h0000_0FF0
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the scheduler
  input  logic        en_pc_decode,    // a thread is selected this cycle
  input  tid_t        nhse_pc_select,  // the selected thread
  input  logic        hold,            // pipeline stall
  // from the ID stage
  input  logic        id_redirect,     // ID changes its thread's PC
  input  tid_t        id_tid,
  input  logic [1:0]  pc_src,          // 1: PC1_ID, 2: PC2_ID, 3: PC3_ID
  input  logic        pc_exception,    // take Exception_PC
  input  word_t       pc1_id,
  input  word_t       pc2_id,
  input  word_t       pc3_id,
  // fetch register
  output logic        fetch_valid,
  output tid_t        fetch_tid,
  output word_t       fetch_pc,
  output word_t       pc_if,           // fetch_pc + 4
  output word_t       pc_thread [N_THREADS]
);
  localparam int TW = (N_THREADS > 1) ? $clog2(N_THREADS) : 1;

  word_t pc_q [N_THREADS];

  assign pc_if = fetch_pc + 32'd4;

  always_comb begin
    for (int i = 0; i < N_THREADS; i++) begin
      pc_thread[i] = pc_q[i];
      if (id_redirect && id_tid == tid_t'(i)) begin
        if (pc_exception)       pc_thread[i] = EXC_PC;
        else unique case (pc_src)
          2'd1:    pc_thread[i] = pc1_id;
          2'd2:    pc_thread[i] = pc2_id;
          2'd3:    pc_thread[i] = pc3_id;
          default: pc_thread[i] = pc_q[i];
        endcase
      end else if (fetch_valid && !hold && fetch_tid == tid_t'(i)) begin
        pc_thread[i] = pc_if;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_THREADS; i++) pc_q[i] <= RESET_PC + PC_STRIDE * i;
      fetch_valid <= 1'b0;
      fetch_tid   <= '0;
      fetch_pc    <= RESET_PC;
    end else begin
      for (int i = 0; i < N_THREADS; i++) pc_q[i] <= pc_thread[i];
      if (!hold) begin
        fetch_valid <= en_pc_decode;
        if (en_pc_decode) begin
          fetch_tid <= nhse_pc_select;
          fetch_pc  <= pc_thread[nhse_pc_select[TW-1:0]];
        end
      end
    end
  end

  // the scheduler never selects a thread outside the configured range
  a_sel_range: assert property (@(posedge clk) disable iff (!rst_n)
    en_pc_decode |-> nhse_pc_select < tid_t'(N_THREADS));
endmodule
