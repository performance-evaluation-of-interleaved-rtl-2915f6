// copy_back_buffer: lines that are being copied back, one entry per thread.
//
// When a refill for thread t displaces a dirty line, the address of that
// line is written into entry t until the copy-back to memory has completed.
// A thread that misses checks the buffer before it may fetch: if the line it
// wants is still being copied back it does not continue (it would otherwise
// read the stale memory copy); it is recorded as a waiter of that entry and
// switched out. When the copy-back completes the entry is cleared, the
// waiters are woken, and their retried access fetches the line again.
//
// Choice of this design: a thread whose own entry is still busy is blocked
// in the same way on any miss, so that its next refill always finds its
// entry free. A miss that arrives in the cycle the blocking entry clears is
// woken in that cycle.
//
// Timing: `blocked` and `wake` are combinational; entries change at the
// clock edge.
module copy_back_buffer
  import mt_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // a thread that missed asks whether it may fetch
  input  logic                   ck_valid,
  input  tid_t                   ck_tid,
  input  line_addr_t             ck_addr,
  output logic                   blocked,
  // a refill of thread st_tid displaced dirty line st_addr
  input  logic                   st_valid,
  input  tid_t                   st_tid,
  input  line_addr_t             st_addr,
  // the copy-back of entry cl_tid has completed
  input  logic                   cl_valid,
  input  tid_t                   cl_tid,
  output logic [NUM_THREADS-1:0] wake,
  output logic [NUM_THREADS-1:0] valid
);

  line_addr_t             addr    [NUM_THREADS];
  logic [NUM_THREADS-1:0] waiters [NUM_THREADS];
  logic [NUM_THREADS-1:0] block_by;

  always_comb begin
    for (int e = 0; e < NUM_THREADS; e++)
      block_by[e] = valid[e] && (addr[e] == ck_addr || int'(ck_tid) == e);
  end

  assign blocked = ck_valid && |block_by;

  always_comb begin
    wake = '0;
    if (cl_valid && int'(cl_tid) < NUM_THREADS) begin
      wake = waiters[cl_tid];
      if (blocked && block_by[cl_tid]) wake |= NUM_THREADS'(1) << ck_tid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int e = 0; e < NUM_THREADS; e++) begin
        addr[e]    <= '0;
        waiters[e] <= '0;
      end
    end else begin
      for (int e = 0; e < NUM_THREADS; e++) begin
        if (blocked && block_by[e])
          waiters[e] <= waiters[e] | (NUM_THREADS'(1) << ck_tid);
        if (cl_valid && int'(cl_tid) == e) begin
          valid[e]   <= 1'b0;
          waiters[e] <= '0;
        end
        if (st_valid && int'(st_tid) == e) begin
          valid[e]   <= 1'b1;
          addr[e]    <= st_addr;
          waiters[e] <= '0;
        end
      end
    end
  end

  a_entry_free: assert property (@(posedge clk) disable iff (!rst_n)
    st_valid |-> !valid[st_tid]);
  a_clear_busy: assert property (@(posedge clk) disable iff (!rst_n)
    cl_valid |-> valid[cl_tid]);

endmodule
