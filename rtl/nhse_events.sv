// nhse_events: the Events Block of the hardware scheduler. Each thread owns
// five event sources, and an event inherits the priority of its thread:
//   bit 0  interrupt   - rising edge of irq[i] (one line per thread)
//   bit 1  timer       - periodic down-counter, reloads from its period
//   bit 2  watchdog    - one-shot down-counter, restarted ("kicked") by a
//                        write, fires if not kicked before it expires
//   bit 3  deadline 1  - one-shot down-counter (alarm)
//   bit 4  deadline 2  - one-shot down-counter (fault)
// A firing source sets its pending bit; pending bits are cleared by writing
// 1s to the pending register (write wins only where no new event fires the
// same cycle). wake[i] = |(pending[i] & enable[i]) is what the thread
// registers and the scheduler use.
// Counter semantics: writing value V loads the counter; it counts down one
// per clock and the event fires on the clock where it goes from 1 to 0, so
// it fires V cycles after the write. V = 0 switches the source off. The
// periodic timer then restarts from its period.
// The interrupt input is sampled by a single flip-flop and its rising edge
// sets pending on the next clock, so a thread sleeping on it can be fetched
// in the cycle after the edge is sampled (about 1.5 clocks on average from
// an asynchronous edge). The five sources follow the scheduler-engine figure;
// counter widths, counting rules and the single-stage sampling (chosen for
// the response time; no metastability filter) are this design's choices.
module nhse_events
  import mt_pkg::*;
#(
  parameter int unsigned N_THREADS = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_THREADS-1:0] irq,
  // register writes from MTS
  input  logic            wr_en,
  input  tid_t            wr_tid,
  input  logic [3:0]      wr_sel,
  input  word_t           wr_data,
  // state
  output logic [NEV-1:0]  pending [N_THREADS],
  output logic [NEV-1:0]  enable  [N_THREADS],
  output word_t           timer_period [N_THREADS],
  output word_t           wdt_cnt [N_THREADS],
  output word_t           dl1_cnt [N_THREADS],
  output word_t           dl2_cnt [N_THREADS],
  output logic [N_THREADS-1:0] wake
);
  word_t timer_cnt [N_THREADS];
  logic [N_THREADS-1:0] irq_q;

  always_comb
    for (int i = 0; i < N_THREADS; i++) wake[i] = |(pending[i] & enable[i]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q <= '0;
      for (int i = 0; i < N_THREADS; i++) begin
        pending[i]      <= '0;
        enable[i]       <= '0;
        timer_period[i] <= '0;
        timer_cnt[i]    <= '0;
        wdt_cnt[i]      <= '0;
        dl1_cnt[i]      <= '0;
        dl2_cnt[i]      <= '0;
      end
    end else begin
      irq_q <= irq;
      for (int i = 0; i < N_THREADS; i++) begin
        logic [NEV-1:0] fire;
        logic           wr;
        wr   = wr_en && wr_tid == tid_t'(i);
        fire = '0;
        fire[EV_INT] = irq[i] && !irq_q[i];
        // periodic timer
        if (wr && wr_sel == SR_TIMER) begin
          timer_period[i] <= wr_data;
          timer_cnt[i]    <= wr_data;
        end else if (timer_period[i] != '0) begin
          if (timer_cnt[i] == 32'd1) begin
            fire[EV_TIMER] = 1'b1;
            timer_cnt[i]   <= timer_period[i];
          end else begin
            timer_cnt[i]   <= timer_cnt[i] - 32'd1;
          end
        end
        // watchdog and the two deadlines: one-shot counters
        if (wr && wr_sel == SR_WDT) wdt_cnt[i] <= wr_data;
        else if (wdt_cnt[i] != '0) begin
          wdt_cnt[i] <= wdt_cnt[i] - 32'd1;
          fire[EV_WDT] = (wdt_cnt[i] == 32'd1);
        end
        if (wr && wr_sel == SR_DL1) dl1_cnt[i] <= wr_data;
        else if (dl1_cnt[i] != '0) begin
          dl1_cnt[i] <= dl1_cnt[i] - 32'd1;
          fire[EV_DL1] = (dl1_cnt[i] == 32'd1);
        end
        if (wr && wr_sel == SR_DL2) dl2_cnt[i] <= wr_data;
        else if (dl2_cnt[i] != '0) begin
          dl2_cnt[i] <= dl2_cnt[i] - 32'd1;
          fire[EV_DL2] = (dl2_cnt[i] == 32'd1);
        end
        if (wr && wr_sel == SR_EVEN) enable[i] <= wr_data[NEV-1:0];
        if (wr && wr_sel == SR_EVPND) pending[i] <= (pending[i] & ~wr_data[NEV-1:0]) | fire;
        else                          pending[i] <= pending[i] | fire;
      end
    end
  end
endmodule
