// mt_trimedia_top: interleaved-multithreading extension of a 5-slot VLIW
// media processor (instruction set, decoder and functional units excluded).
//
// NUM_THREADS hardware threads share one core. One thread runs at a time;
// it gives up the processor on a first-level cache miss or when its quantum
// (QTE_CYCLES active cycles) expires, and the next ready thread in
// round-robin order runs after a one-cycle switch. What a thread needs to
// resume is replicated per thread: the 128 general purpose registers
// (gpr_file), the MMIO registers (mmio_regs), the pipeline registers
// (pipe_context) and the load-link reservation (ll_sc_monitor). What is
// shared: the functional units (in the core, outside this block), the
// 32 KB instruction cache and the 16 KB data cache (shared_cache, 8-way,
// 64-byte lines, LRU on a global clock), and the path to memory: the
// miss_unit with its pending buffer and copy-back buffer, the mss buffer and
// NUM_BUS single-request bus interfaces.
//
// Core interface, one instruction per cycle. In each cycle the core shows
// the fetch address of the active thread's next instruction (normally from
// `pipe_q`) and its data access, if any. `commit` says the instruction
// completed: its instruction word was in the I-cache and its data access
// hit the D-cache; the core then advances (`pipe_d` is stored as the
// thread's new pipeline state), loads return `d_rdata`, stores and
// successful SCs are written. Without `commit` the core must present the
// same instruction again when its thread next runs. Register writes carry
// their own thread id, so results of long-latency units land in the bank
// of the thread that issued them.
//
// Memory interface: per bus interface a request (valid/ready, line address,
// write flag, 512-bit data) and a response (valid, 512-bit read data).
//
// Defaults follow the evaluated configurations: caches of the TM1000 class
// processor, QTE of 90 cycles (the best value for the optimised decoder),
// three threads and two bus interfaces. The single-cycle refill stall
// (`stall_fill`) and the cache-line-wide bus are this design's choices.
module mt_trimedia_top
  import mt_pkg::*;
#(
  parameter int unsigned NUM_THREADS  = 3,
  parameter int unsigned NUM_BUS      = 2,
  parameter int unsigned QTE_CYCLES   = 90,
  parameter int unsigned QTE_W        = 16,
  parameter int unsigned ICACHE_BYTES = 32768,
  parameter int unsigned DCACHE_BYTES = 16384,
  parameter int unsigned CACHE_WAYS   = 8,
  parameter int unsigned NUM_GPR      = 128,
  parameter int unsigned RD_PORTS     = 15,
  parameter int unsigned WR_PORTS     = 5,
  parameter int unsigned NUM_MMIO     = 16,
  parameter int unsigned PIPE_W       = 64,
  parameter logic [31:0] BOOT_ADDR    = 32'h0000_0000,
  localparam int unsigned RA_W        = $clog2(NUM_GPR),
  localparam int unsigned MA_W        = $clog2(NUM_MMIO)
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- thread control / status
  output tid_t              active_tid,
  output logic              active_valid,
  output logic              switching,
  output logic              stall_fill,
  output logic [NUM_THREADS-1:0] thread_ready,
  output logic              sw_take,
  output switch_reason_e    sw_reason,
  // ---- pipeline state of the active thread
  output logic [PIPE_W-1:0] pipe_q,
  input  logic [PIPE_W-1:0] pipe_d,
  // ---- instruction fetch and data access
  input  addr_t             fetch_addr,
  output word_t             fetch_word,
  input  dop_e              d_op,
  input  addr_t             d_addr,
  input  word_t             d_wdata,
  input  logic [3:0]        d_be,
  output word_t             d_rdata,
  output logic              sc_ok,
  output logic              commit,
  input  logic              snoop_valid,
  input  addr_t             snoop_addr,
  // ---- register file
  input  logic [RA_W-1:0]   rf_rd_addr [RD_PORTS],
  output word_t             rf_rd_data [RD_PORTS],
  input  logic              rf_wr_en   [WR_PORTS],
  input  tid_t              rf_wr_tid  [WR_PORTS],
  input  logic [RA_W-1:0]   rf_wr_addr [WR_PORTS],
  input  word_t             rf_wr_data [WR_PORTS],
  // ---- MMIO (performed on commit)
  input  logic              mmio_req,
  input  logic              mmio_we,
  input  logic [MA_W-1:0]   mmio_addr,
  input  word_t             mmio_wdata,
  output word_t             mmio_rdata,
  // ---- main memory, one port per bus interface
  output logic              m_req_valid [NUM_BUS],
  output logic              m_req_write [NUM_BUS],
  output line_addr_t        m_req_addr  [NUM_BUS],
  output line_t             m_req_wdata [NUM_BUS],
  input  logic              m_req_ready [NUM_BUS],
  input  logic              m_rsp_valid [NUM_BUS],
  input  line_t             m_rsp_rdata [NUM_BUS],
  // ---- event strobes for performance counting
  output logic              ev_merge,
  output logic              ev_cb_block,
  output logic              ev_fetch,
  output logic              ev_copyback,
  output logic              ev_qte_renew
);

  // ---- global clock for LRU ---------------------------------------------
  logic [31:0] now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;

  // ---- scheduler ----------------------------------------------------------
  logic issue_ok, miss, imiss, dmiss, ic_hit, dc_hit, dacc;
  logic [NUM_THREADS-1:0] wake;
  tid_t sw_from;

  thread_scheduler #(.NUM_THREADS(NUM_THREADS), .CNT_W(QTE_W)) u_sched (
    .clk, .rst_n,
    .qte_limit    (QTE_W'(QTE_CYCLES)),
    .hold         (stall_fill),
    .miss,
    .miss_icache  (imiss),
    .wake,
    .active_tid,
    .active_valid,
    .switching,
    .issue_ok,
    .ready        (thread_ready),
    .sw_take,
    .sw_reason,
    .sw_from,
    .qte_renew    (ev_qte_renew)
  );

  // ---- instruction completion (QTE -> I-cache -> D-cache) ---------------
  assign dacc   = d_op != DOP_NONE;
  assign imiss  = issue_ok && !ic_hit;
  assign dmiss  = issue_ok && ic_hit && dacc && !dc_hit;
  assign miss   = imiss || dmiss;
  assign commit = issue_ok && ic_hit && (!dacc || dc_hit);

  // ---- replicated per-thread state ----------------------------------------
  logic [PIPE_W-1:0] pipe_reset [NUM_THREADS];
  always_comb for (int t = 0; t < NUM_THREADS; t++) pipe_reset[t] = PIPE_W'(BOOT_ADDR);

  pipe_context #(.NUM_THREADS(NUM_THREADS), .STATE_W(PIPE_W)) u_ctx (
    .clk, .rst_n,
    .reset_state (pipe_reset),
    .tid         (active_tid),
    .we          (commit),
    .state_d     (pipe_d),
    .state_q     (pipe_q)
  );

  gpr_file #(.NUM_THREADS(NUM_THREADS), .NUM_REGS(NUM_GPR),
             .RD_PORTS(RD_PORTS), .WR_PORTS(WR_PORTS)) u_gpr (
    .clk, .rst_n,
    .rd_tid  (active_tid),
    .rd_addr (rf_rd_addr),
    .rd_data (rf_rd_data),
    .wr_en   (rf_wr_en),
    .wr_tid  (rf_wr_tid),
    .wr_addr (rf_wr_addr),
    .wr_data (rf_wr_data)
  );

  mmio_regs #(.NUM_THREADS(NUM_THREADS), .NUM_REGS(NUM_MMIO)) u_mmio (
    .clk, .rst_n,
    .tid   (active_tid),
    .req   (mmio_req && commit),
    .we    (mmio_we),
    .addr  (mmio_addr),
    .wdata (mmio_wdata),
    .rdata (mmio_rdata)
  );

  logic [NUM_THREADS-1:0] linked;
  ll_sc_monitor #(.NUM_THREADS(NUM_THREADS)) u_llsc (
    .clk, .rst_n,
    .tid        (active_tid),
    .addr       (d_addr),
    .ll         (commit && d_op == DOP_LL),
    .sc         (commit && d_op == DOP_SC),
    .sc_ok,
    .sw_out     (sw_take),
    .sw_tid     (sw_from),
    .snoop      (snoop_valid),
    .snoop_addr,
    .linked
  );

  // ---- shared caches --------------------------------------------------------
  logic       ifill_valid, dfill_valid, devict_valid, ievict_valid;
  line_addr_t fill_addr, devict_addr, ievict_addr;
  line_t      fill_data, devict_data, ievict_data;

  shared_cache #(.SIZE_BYTES(ICACHE_BYTES), .WAYS(CACHE_WAYS)) u_icache (
    .clk, .rst_n, .now,
    .lk_addr     (fetch_addr),
    .lk_commit   (commit),
    .lk_we       (1'b0),
    .lk_wdata    ('0),
    .lk_be       ('0),
    .lk_hit      (ic_hit),
    .lk_rdata    (fetch_word),
    .fill_valid  (ifill_valid),
    .fill_addr,
    .fill_data,
    .evict_valid (ievict_valid),   // never dirty: nothing to copy back
    .evict_addr  (ievict_addr),
    .evict_data  (ievict_data)
  );

  shared_cache #(.SIZE_BYTES(DCACHE_BYTES), .WAYS(CACHE_WAYS)) u_dcache (
    .clk, .rst_n, .now,
    .lk_addr     (d_addr),
    .lk_commit   (commit && dacc),
    .lk_we       (d_op == DOP_STORE || (d_op == DOP_SC && sc_ok)),
    .lk_wdata    (d_wdata),
    .lk_be       (d_op == DOP_SC ? 4'hf : d_be),
    .lk_hit      (dc_hit),
    .lk_rdata    (d_rdata),
    .fill_valid  (dfill_valid),
    .fill_addr,
    .fill_data,
    .evict_valid (devict_valid),
    .evict_addr  (devict_addr),
    .evict_data  (devict_data)
  );

  // ---- miss handling and memory path --------------------------------------
  logic      mreq_valid [2];
  mem_xfer_t mreq_xfer  [2];
  logic      bi_req_valid [NUM_BUS];
  mem_xfer_t bi_req       [NUM_BUS];
  logic      bi_req_ready [NUM_BUS];
  logic      bi_rsp_valid [NUM_BUS];
  mem_xfer_t bi_rsp       [NUM_BUS];
  logic      bi_rsp_ready [NUM_BUS];
  logic      bi_busy      [NUM_BUS];
  logic [NUM_THREADS-1:0] pb_valid, cb_valid;
  logic [$clog2(2*NUM_THREADS+1)-1:0] mss_count;

  miss_unit #(.NUM_THREADS(NUM_THREADS), .NUM_BUS(NUM_BUS),
              .PB_SET_W($clog2(DCACHE_BYTES / (LINE_BYTES * CACHE_WAYS)))) u_miss (
    .clk, .rst_n,
    .miss_valid  (miss),
    .miss_tid    (active_tid),
    .miss_icache (imiss),
    .miss_addr   (imiss ? fetch_addr[ADDR_W-1:OFFS_W] : d_addr[ADDR_W-1:OFFS_W]),
    .req_valid   (mreq_valid),
    .req_xfer    (mreq_xfer),
    .rsp_valid   (bi_rsp_valid),
    .rsp         (bi_rsp),
    .rsp_ready   (bi_rsp_ready),
    .ifill_valid,
    .dfill_valid,
    .fill_addr,
    .fill_data,
    .devict_valid,
    .devict_addr,
    .devict_data,
    .wake,
    .busy        (stall_fill),
    .ev_merge,
    .ev_cb_block,
    .ev_fetch,
    .ev_copyback,
    .pb_valid,
    .cb_valid
  );

  mss_buffer #(.NUM_THREADS(NUM_THREADS), .NUM_BUS(NUM_BUS), .NUM_IN(2)) u_mss (
    .clk, .rst_n,
    .in_valid  (mreq_valid),
    .in_xfer   (mreq_xfer),
    .out_valid (bi_req_valid),
    .out_xfer  (bi_req),
    .out_ready (bi_req_ready),
    .count     (mss_count)
  );

  for (genvar b = 0; b < NUM_BUS; b++) begin : g_bi
    bus_interface u_bi (
      .clk, .rst_n,
      .req_valid   (bi_req_valid[b]),
      .req         (bi_req[b]),
      .req_ready   (bi_req_ready[b]),
      .rsp_valid   (bi_rsp_valid[b]),
      .rsp         (bi_rsp[b]),
      .rsp_ready   (bi_rsp_ready[b]),
      .m_req_valid (m_req_valid[b]),
      .m_req_write (m_req_write[b]),
      .m_req_addr  (m_req_addr[b]),
      .m_req_wdata (m_req_wdata[b]),
      .m_req_ready (m_req_ready[b]),
      .m_rsp_valid (m_rsp_valid[b]),
      .m_rsp_rdata (m_rsp_rdata[b]),
      .busy        (bi_busy[b])
    );
  end

  a_icache_clean: assert property (@(posedge clk) disable iff (!rst_n) !ievict_valid);

endmodule
