// thread_scheduler: interleaved (block) multithreading control.
//
// Exactly one hardware thread is active at a time. The active thread leaves
// the processor when it misses in a first-level cache (instruction or data)
// or when its quantum expires (QTE); the next ready thread in round-robin
// order, wrapping from the last thread to the first, then takes over. There
// are no priorities. Per cycle the checks are made in the order
// QTE -> instruction in cache -> all data in cache, so a cycle in which the
// quantum expires issues nothing and never reports a miss.
//
// A switch costs one cycle: in the cycle after the switch decision
// `switching` is high, nothing issues, and the new thread's replicated
// pipeline registers become the live ones. A missing thread is marked not
// ready until the miss unit raises its `wake` bit. When no thread is ready
// the processor idles and restarts with the first thread that wakes up.
//
// Choices of this design: a quantum that expires while no other thread is
// ready simply starts again (no switch, no penalty); `hold` (the cache port
// is taken by a refill for one cycle) blocks issue but not the quantum.
//
// Interface: `miss` may only be raised in a cycle with `issue_ok` high.
// `sw_take` pulses in the cycle of the decision, with `sw_reason` and
// `sw_from` (the thread that leaves).
module thread_scheduler
  import mt_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 3,
  parameter int unsigned CNT_W       = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [CNT_W-1:0]       qte_limit,
  input  logic                   hold,
  input  logic                   miss,
  input  logic                   miss_icache,
  input  logic [NUM_THREADS-1:0] wake,
  output tid_t                   active_tid,
  output logic                   active_valid,
  output logic                   switching,
  output logic                   issue_ok,
  output logic [NUM_THREADS-1:0] ready,
  output logic                   sw_take,
  output switch_reason_e         sw_reason,
  output tid_t                   sw_from,
  output logic                   qte_renew
);

  logic running, expire, other_ready, qte_switch, found;
  logic [NUM_THREADS-1:0] cand, active_bit;
  logic [CNT_W-1:0] qcount;
  tid_t next_tid;

  assign running    = active_valid && !switching;
  assign active_bit = NUM_THREADS'(1) << active_tid;

  qte_timer #(.CNT_W(CNT_W)) u_qte (
    .clk, .rst_n,
    .limit    (qte_limit),
    .count_en (running),
    .restart  (!running || qte_renew),
    .expire,
    .count    (qcount)
  );

  assign other_ready = |(ready & ~active_bit);
  assign qte_switch  = expire && other_ready;
  assign qte_renew   = expire && !other_ready;
  assign issue_ok    = running && !hold && !qte_switch;
  assign sw_take     = running && (qte_switch || miss);
  assign sw_from     = active_tid;

  always_comb begin
    if (!sw_take)         sw_reason = SW_NONE;
    else if (qte_switch)  sw_reason = SW_QTE;
    else if (miss_icache) sw_reason = SW_IMISS;
    else                  sw_reason = SW_DMISS;
  end

  // Threads that may be chosen next. On a miss the active thread is out.
  always_comb begin
    cand = ready | wake;
    if (running && miss) cand &= ~active_bit;
  end

  // Round-robin search starting after the active (or last active) thread.
  always_comb begin
    int unsigned idx;
    found    = 1'b0;
    next_tid = active_tid;
    for (int unsigned i = 1; i <= NUM_THREADS; i++) begin
      idx = (int'(active_tid) + i) % NUM_THREADS;
      if (!found && cand[idx]) begin
        found    = 1'b1;
        next_tid = tid_t'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready        <= '1;     // every hardware thread starts runnable
      active_tid   <= tid_t'(NUM_THREADS - 1);
      active_valid <= 1'b0;
      switching    <= 1'b0;
    end else begin
      ready <= (ready | wake) & ~((running && miss) ? active_bit : '0);
      switching <= 1'b0;
      if (sw_take) begin
        if (found) begin
          active_tid <= next_tid;
          switching  <= 1'b1;
        end else begin
          active_valid <= 1'b0;
        end
      end else if (!active_valid && found) begin
        active_tid   <= next_tid;
        active_valid <= 1'b1;
        switching    <= 1'b1;
      end
    end
  end

  // A miss is only meaningful for an instruction that was allowed to issue.
  a_miss_when_issued: assert property (@(posedge clk) disable iff (!rst_n)
    miss |-> issue_ok);
  a_threads: assert property (@(posedge clk) NUM_THREADS <= MAX_THREADS);

endmodule
