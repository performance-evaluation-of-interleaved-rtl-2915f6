// mmio_regs: internal memory-mapped I/O registers, duplicated per thread.
//
// The MMIO space of the processor (which holds, among others, the interrupt
// vectors) is small, so rather than sorting shared from private registers
// every hardware thread gets a full private copy. Accesses address the copy
// of the active thread. Register 0 of each copy is read-only and returns the
// hardware thread number, which boot code reads to tell the threads apart.
// The number of registers (NUM_REGS) is this design's choice; the real MMIO
// map is not modelled.
//
// Interface: one access per cycle; `req` with `we` writes `wdata` at the
// clock edge, `rdata` is combinational. All registers reset to 0.
module mmio_regs
  import mt_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 3,
  parameter int unsigned NUM_REGS    = 16,
  localparam int unsigned A_W        = $clog2(NUM_REGS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  tid_t           tid,
  input  logic           req,
  input  logic           we,
  input  logic [A_W-1:0] addr,
  input  word_t          wdata,
  output word_t          rdata
);

  word_t regs [NUM_THREADS][NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_THREADS; t++)
        for (int r = 0; r < NUM_REGS; r++)
          regs[t][r] <= '0;
    end else if (req && we && addr != '0 && int'(tid) < NUM_THREADS) begin
      regs[tid][addr] <= wdata;
    end
  end

  always_comb begin
    if (addr == '0)                     rdata = word_t'(tid);
    else if (int'(tid) < NUM_THREADS)   rdata = regs[tid][addr];
    else                                rdata = '0;
  end

endmodule
