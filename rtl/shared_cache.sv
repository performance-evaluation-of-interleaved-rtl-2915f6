// shared_cache: first-level cache shared by all hardware threads.
//
// Set-associative, 64-byte lines, copy-back. Used twice in the top level:
// as the 32 KB instruction cache and as the 16 KB data cache, both 8-way.
// The caches are not duplicated per thread: the threads share them, so a
// line brought in by one thread is a hit for the others.
//
// Replacement is LRU implemented with a global clock: every line remembers
// the value of the free-running `now` counter at its last use, and a refill
// replaces an invalid way if there is one, otherwise the way whose last use
// lies furthest in the past (largest `now - stamp`, modular so the counter
// may wrap). Because the clock is global, a use by any thread makes the line
// recent for all threads.
//
// Lookup port (core side), combinational: `lk_hit`/`lk_rdata` answer in the
// same cycle for the 32-bit word at `lk_addr`. When `lk_commit` is high at
// the clock edge a hit refreshes the line's stamp and, if `lk_we`, writes the
// enabled bytes and marks the line dirty. Misses change nothing here; the
// miss unit fetches the line.
//
// Refill port: `fill_valid` with a line address and 512 bits of data writes
// the line into the victim way at the clock edge, clean, stamped `now`. In
// that same cycle `evict_valid`/`evict_addr`/`evict_data` describe the dirty
// line being displaced (to be copied back). The owner must not present a
// lookup and a refill in the same cycle (asserted).
module shared_cache
  import mt_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned WAYS       = 8,
  parameter int unsigned STAMP_W    = 32,
  localparam int unsigned SETS      = SIZE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned SET_W     = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TAG_W     = LINE_ADDR_W - SET_W,
  localparam int unsigned WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [STAMP_W-1:0] now,
  // lookup
  input  addr_t              lk_addr,
  input  logic               lk_commit,
  input  logic               lk_we,
  input  word_t              lk_wdata,
  input  logic [3:0]         lk_be,
  output logic               lk_hit,
  output word_t              lk_rdata,
  // refill and eviction
  input  logic               fill_valid,
  input  line_addr_t         fill_addr,
  input  line_t              fill_data,
  output logic               evict_valid,
  output line_addr_t         evict_addr,
  output line_t              evict_data
);

  line_t              data  [SETS][WAYS];
  logic [TAG_W-1:0]   tag   [SETS][WAYS];
  logic [STAMP_W-1:0] stamp [SETS][WAYS];
  logic [WAYS-1:0]    valid [SETS];
  logic [WAYS-1:0]    dirty [SETS];

  // ---- lookup -----------------------------------------------------------
  logic [SET_W-1:0] lk_set;
  logic [TAG_W-1:0] lk_tag;
  logic [3:0]       lk_word;
  logic [WAY_W-1:0] hit_way;

  assign lk_set  = (SETS > 1) ? SET_W'(lk_addr[OFFS_W +: SET_W]) : '0;
  assign lk_tag  = lk_addr[ADDR_W-1 -: TAG_W];
  assign lk_word = lk_addr[OFFS_W-1:2];

  always_comb begin
    lk_hit  = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (!lk_hit && valid[lk_set][w] && tag[lk_set][w] == lk_tag) begin
        lk_hit  = 1'b1;
        hit_way = WAY_W'(w);
      end
  end

  assign lk_rdata = lk_hit ? data[lk_set][hit_way][lk_word*32 +: 32] : '0;

  // ---- victim selection -------------------------------------------------
  logic [SET_W-1:0] f_set;
  logic [TAG_W-1:0] f_tag;
  logic [WAY_W-1:0] vic_way;

  assign f_set = (SETS > 1) ? SET_W'(fill_addr[SET_W-1:0]) : '0;
  assign f_tag = fill_addr[LINE_ADDR_W-1 -: TAG_W];

  always_comb begin
    logic               have_inv;
    logic [STAMP_W-1:0] best_age, age;
    have_inv = 1'b0;
    vic_way  = '0;
    best_age = '0;
    age      = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!have_inv) begin
        if (!valid[f_set][w]) begin
          have_inv = 1'b1;
          vic_way  = WAY_W'(w);
        end else begin
          age = now - stamp[f_set][w];
          if (w == 0 || age > best_age) begin
            best_age = age;
            vic_way  = WAY_W'(w);
          end
        end
      end
    end
  end

  assign evict_valid = fill_valid && valid[f_set][vic_way] && dirty[f_set][vic_way];
  assign evict_addr  = {tag[f_set][vic_way], SET_W'(f_set)};
  assign evict_data  = data[f_set][vic_way];

  // ---- state update -----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
      end
    end else begin
      if (fill_valid) begin
        valid[f_set][vic_way] <= 1'b1;
        dirty[f_set][vic_way] <= 1'b0;
      end else if (lk_commit && lk_hit && lk_we) begin
        dirty[lk_set][hit_way] <= 1'b1;
      end
    end
  end

  // Arrays without reset: tags, stamps and data are qualified by `valid`.
  always_ff @(posedge clk) begin
    if (fill_valid) begin
      data [f_set][vic_way] <= fill_data;
      tag  [f_set][vic_way] <= f_tag;
      stamp[f_set][vic_way] <= now;
    end else if (lk_commit && lk_hit) begin
      stamp[lk_set][hit_way] <= now;
      if (lk_we)
        for (int b = 0; b < 4; b++)
          if (lk_be[b]) data[lk_set][hit_way][lk_word*32 + b*8 +: 8] <= lk_wdata[b*8 +: 8];
    end
  end

  a_no_lookup_during_fill: assert property (@(posedge clk) disable iff (!rst_n)
    fill_valid |-> !lk_commit);

endmodule
