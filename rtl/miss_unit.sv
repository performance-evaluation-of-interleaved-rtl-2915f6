// miss_unit: first-level miss handling shared by all hardware threads.
//
// On a miss of the active thread (instruction or data cache) the line address
// is first checked against the copy-back buffer: a line that is still being
// copied back may not be read yet, so the thread only waits for that
// copy-back. Otherwise the pending buffer is searched: a line already being
// fetched for another thread is not requested again, the thread joins it.
// Only a new line produces a fetch request into the memory subsystem buffer.
// In every case the thread is switched out by the scheduler and woken again
// by this unit; it then retries its access.
//
// Returning transfers are taken from the bus interfaces one per cycle
// (lowest-numbered first). A fetched line is written into its cache; if that
// displaces a dirty data-cache line, the line's address goes into the
// copy-back buffer (entry of the same thread) and a copy-back request is
// queued. The pending entry is released and its thread plus all threads
// waiting for the line are woken. A completed copy-back clears its entry and
// wakes the threads that were blocked on it.
//
// Timing: everything is combinational from the miss or response to the
// request/refill/wake outputs; buffer state changes at the clock edge.
// `busy` is high in every cycle in which a response is handled: the caches'
// single port is used by the refill, so the core does not issue then.
// A fetch request carries no data (its data field is zero) and a copy-back
// request always belongs to the data cache; those request fields are
// therefore constant.
module miss_unit
  import mt_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 3,
  parameter int unsigned NUM_BUS     = 2,
  parameter int unsigned PB_SET_W    = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // miss of the active thread
  input  logic                   miss_valid,
  input  tid_t                   miss_tid,
  input  logic                   miss_icache,
  input  line_addr_t             miss_addr,
  // requests into the mss buffer: [0] fetch, [1] copy-back
  output logic                   req_valid [2],
  output mem_xfer_t              req_xfer  [2],
  // responses from the bus interfaces
  input  logic                   rsp_valid [NUM_BUS],
  input  mem_xfer_t              rsp       [NUM_BUS],
  output logic                   rsp_ready [NUM_BUS],
  // refill of the caches
  output logic                   ifill_valid,
  output logic                   dfill_valid,
  output line_addr_t             fill_addr,
  output line_t                  fill_data,
  input  logic                   devict_valid,
  input  line_addr_t             devict_addr,
  input  line_t                  devict_data,
  // results
  output logic [NUM_THREADS-1:0] wake,
  output logic                   busy,
  output logic                   ev_merge,     // miss joined a pending line
  output logic                   ev_cb_block,  // miss blocked by a copy-back
  output logic                   ev_fetch,     // new fetch request
  output logic                   ev_copyback,  // copy-back request
  output logic [NUM_THREADS-1:0] pb_valid,
  output logic [NUM_THREADS-1:0] cb_valid
);

  logic      cb_blocked, pb_hit, pb_fetch;
  logic      any_rsp;
  mem_xfer_t r;
  logic      r_fetch, r_wb;
  logic [NUM_THREADS-1:0] pb_wake, cb_wake;

  // ---- pick one response ------------------------------------------------
  always_comb begin
    any_rsp = 1'b0;
    r       = '0;
    for (int b = 0; b < NUM_BUS; b++) begin
      rsp_ready[b] = 1'b0;
      if (!any_rsp && rsp_valid[b]) begin
        any_rsp      = 1'b1;
        r            = rsp[b];
        rsp_ready[b] = 1'b1;
      end
    end
  end

  assign busy    = any_rsp;
  assign r_fetch = any_rsp && r.kind == REQ_FETCH;
  assign r_wb    = any_rsp && r.kind == REQ_WRITEBACK;

  assign ifill_valid = r_fetch && r.icache;
  assign dfill_valid = r_fetch && !r.icache;
  assign fill_addr   = r.addr;
  assign fill_data   = r.data;

  // ---- buffers ------------------------------------------------------------
  copy_back_buffer #(.NUM_THREADS(NUM_THREADS)) u_cbb (
    .clk, .rst_n,
    .ck_valid (miss_valid),
    .ck_tid   (miss_tid),
    .ck_addr  (miss_addr),
    .blocked  (cb_blocked),
    .st_valid (dfill_valid && devict_valid),
    .st_tid   (r.tid),
    .st_addr  (devict_addr),
    .cl_valid (r_wb),
    .cl_tid   (r.tid),
    .wake     (cb_wake),
    .valid    (cb_valid)
  );

  pending_buffer #(.NUM_THREADS(NUM_THREADS), .SET_W(PB_SET_W)) u_pb (
    .clk, .rst_n,
    .miss_valid  (miss_valid && !cb_blocked),
    .miss_tid,
    .miss_icache,
    .miss_addr,
    .hit         (pb_hit),
    .fetch       (pb_fetch),
    .rel_valid   (r_fetch),
    .rel_tid     (r.tid),
    .wake        (pb_wake),
    .valid       (pb_valid)
  );

  assign wake = pb_wake | cb_wake;

  // ---- requests -----------------------------------------------------------
  assign req_valid[0] = pb_fetch;
  assign req_xfer[0]  = '{kind: REQ_FETCH, icache: miss_icache, tid: miss_tid,
                          addr: miss_addr, data: '0};
  assign req_valid[1] = dfill_valid && devict_valid;
  assign req_xfer[1]  = '{kind: REQ_WRITEBACK, icache: 1'b0, tid: r.tid,
                          addr: devict_addr, data: devict_data};

  assign ev_merge    = pb_hit;
  assign ev_cb_block = cb_blocked;
  assign ev_fetch    = pb_fetch;
  assign ev_copyback = req_valid[1];

endmodule
