// pending_buffer: lines that are being fetched, one entry per thread.
//
// Shared by all hardware threads of the CPU and by both caches. Entry t
// belongs to hardware thread t and holds the tag and set of the line that
// thread is fetching, with a valid bit. When a thread misses, the whole
// buffer is searched (fully associative compare of all entries):
//   * no match: the thread writes the line into its own entry, sets valid
//     and the line must be requested from memory (`fetch`);
//   * match in entry o: no second request is made; the thread is recorded
//     as a waiter of entry o instead.
// When the line of entry o arrives, the entry is released and `wake`
// returns thread o together with every waiter of that line, so all of them
// become ready again. This keeps a line from being requested twice and keeps
// a read after another thread's write miss from overtaking it.
//
// Choices of this design: the waiters are kept as a bit mask per entry; each
// entry also records which cache missed, so an instruction miss never merges
// with a data miss on the same address; the tag/set split uses SET_W set
// bits (the data cache's 32 sets by default), the match itself compares the
// full line address. A join that arrives in the cycle its line is released
// is woken in that same cycle.
//
// Timing: `hit`, `fetch` and `wake` are combinational; entries change at the
// clock edge. One miss and one release per cycle.
module pending_buffer
  import mt_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 3,
  parameter int unsigned SET_W       = 5,
  localparam int unsigned TAG_W      = LINE_ADDR_W - SET_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // a miss that is allowed to proceed (not blocked by a copy-back)
  input  logic                   miss_valid,
  input  tid_t                   miss_tid,
  input  logic                   miss_icache,
  input  line_addr_t             miss_addr,
  output logic                   hit,
  output logic                   fetch,
  // arrival of the line of entry rel_tid
  input  logic                   rel_valid,
  input  tid_t                   rel_tid,
  output logic [NUM_THREADS-1:0] wake,
  output logic [NUM_THREADS-1:0] valid
);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [SET_W-1:0] set;
    logic             icache;
  } pb_entry_t;

  pb_entry_t              ent     [NUM_THREADS];
  logic [NUM_THREADS-1:0] waiters [NUM_THREADS];
  logic [NUM_THREADS-1:0] match;
  logic [TAG_W-1:0]       m_tag;
  logic [SET_W-1:0]       m_set;

  assign m_tag = miss_addr[LINE_ADDR_W-1:SET_W];
  assign m_set = miss_addr[SET_W-1:0];

  always_comb begin
    for (int e = 0; e < NUM_THREADS; e++)
      match[e] = valid[e] && ent[e].tag == m_tag && ent[e].set == m_set
                 && ent[e].icache == miss_icache;
  end

  assign hit   = miss_valid && |match;
  assign fetch = miss_valid && !(|match);

  always_comb begin
    wake = '0;
    if (rel_valid && int'(rel_tid) < NUM_THREADS) begin
      wake = waiters[rel_tid] | (NUM_THREADS'(1) << rel_tid);
      if (hit && match[rel_tid]) wake |= NUM_THREADS'(1) << miss_tid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int e = 0; e < NUM_THREADS; e++) begin
        ent[e]     <= '0;
        waiters[e] <= '0;
      end
    end else begin
      for (int e = 0; e < NUM_THREADS; e++) begin
        if (hit && match[e])
          waiters[e] <= waiters[e] | (NUM_THREADS'(1) << miss_tid);
        if (fetch && int'(miss_tid) == e) begin
          valid[e]   <= 1'b1;
          ent[e]     <= '{tag: m_tag, set: m_set, icache: miss_icache};
          waiters[e] <= '0;
        end
        if (rel_valid && int'(rel_tid) == e) begin
          valid[e]   <= 1'b0;
          waiters[e] <= '0;
        end
      end
    end
  end

  // A thread has at most one outstanding line, so its own entry is free
  // whenever it misses, and only a pending entry can be released.
  a_own_entry_free: assert property (@(posedge clk) disable iff (!rst_n)
    fetch |-> !valid[miss_tid]);
  a_release_pending: assert property (@(posedge clk) disable iff (!rst_n)
    rel_valid |-> valid[rel_tid]);

endmodule
