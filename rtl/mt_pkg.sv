// mt_pkg: constants and types shared by the interleaved-multithreading
// extension of a 5-slot VLIW media processor.
//
// The geometry follows the processor the design extends: 32-bit addresses,
// 64-byte cache lines, 8-way caches, 128 general purpose registers per thread
// and five issue slots. The thread-id width, the request/response records that
// travel between the miss unit, the memory subsystem buffer and the bus
// interfaces, and the data-operation codes are this design's own choices.
package mt_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned OFFS_W      = $clog2(LINE_BYTES);    // 6
  localparam int unsigned LINE_ADDR_W = ADDR_W - OFFS_W;       // 26
  localparam int unsigned LINE_W      = LINE_BYTES * 8;        // 512
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / 4;     // 16

  // Up to eight hardware threads.
  localparam int unsigned MAX_THREADS = 8;
  localparam int unsigned TID_W       = 3;

  typedef logic [ADDR_W-1:0]      addr_t;
  typedef logic [WORD_W-1:0]      word_t;
  typedef logic [LINE_ADDR_W-1:0] line_addr_t;
  typedef logic [LINE_W-1:0]      line_t;
  typedef logic [TID_W-1:0]       tid_t;

  // Why the scheduler left a thread (checked in this order every cycle).
  typedef enum logic [1:0] {
    SW_NONE  = 2'd0,
    SW_QTE   = 2'd1,   // quantum time expiration
    SW_IMISS = 2'd2,   // instruction cache miss
    SW_DMISS = 2'd3    // data cache miss
  } switch_reason_e;

  // Data-memory operation presented by the core in a cycle.
  typedef enum logic [2:0] {
    DOP_NONE  = 3'd0,
    DOP_LOAD  = 3'd1,
    DOP_STORE = 3'd2,
    DOP_LL    = 3'd3,  // load link
    DOP_SC    = 3'd4   // store conditional
  } dop_e;

  typedef enum logic {
    REQ_FETCH     = 1'b0,  // read a whole line into a cache
    REQ_WRITEBACK = 1'b1   // copy a dirty line back to memory
  } req_kind_e;

  // One line transfer between the CPU and main memory, tagged with the
  // hardware thread and the cache it belongs to.
  typedef struct packed {
    req_kind_e  kind;
    logic       icache;
    tid_t       tid;
    line_addr_t addr;
    line_t      data;
  } mem_xfer_t;

endpackage
