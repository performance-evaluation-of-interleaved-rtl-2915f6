// gpr_file: general purpose register file duplicated per hardware thread.
//
// Every hardware thread owns a full bank of NUM_REGS 32-bit registers, so
// the compiler's view of the register set is unchanged. Read ports index the
// bank of the active thread. Each write port carries its own thread id:
// a multi-cycle functional unit that was issued before a thread switch
// delivers its result into the bank of the thread that issued it, not into
// the bank of the thread that is active when the result appears.
//
// As in the processor this extends, register 0 reads as 0 and register 1
// reads as 1 in every bank (register 1 is the always-true guard), and writes
// to them are ignored. Port counts follow the five issue slots: three reads
// per slot (guard and two operands) and one write per slot.
//
// Timing: reads are combinational; writes take effect at the clock edge.
// If two write ports hit the same register of the same bank in one cycle,
// the higher-numbered port wins (the compiler is expected to avoid this).
module gpr_file
  import mt_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 3,
  parameter int unsigned NUM_REGS    = 128,
  parameter int unsigned RD_PORTS    = 15,
  parameter int unsigned WR_PORTS    = 5,
  localparam int unsigned RA_W       = $clog2(NUM_REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  tid_t              rd_tid,
  input  logic [RA_W-1:0]   rd_addr [RD_PORTS],
  output word_t             rd_data [RD_PORTS],
  input  logic              wr_en   [WR_PORTS],
  input  tid_t              wr_tid  [WR_PORTS],
  input  logic [RA_W-1:0]   wr_addr [WR_PORTS],
  input  word_t             wr_data [WR_PORTS]
);

  word_t regs [NUM_THREADS][NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_THREADS; t++)
        for (int r = 0; r < NUM_REGS; r++)
          regs[t][r] <= '0;
    end else begin
      for (int p = 0; p < WR_PORTS; p++)
        if (wr_en[p] && wr_addr[p] > RA_W'(1) && int'(wr_tid[p]) < NUM_THREADS)
          regs[wr_tid[p]][wr_addr[p]] <= wr_data[p];
    end
  end

  always_comb begin
    for (int p = 0; p < RD_PORTS; p++) begin
      if (rd_addr[p] == RA_W'(0))      rd_data[p] = '0;
      else if (rd_addr[p] == RA_W'(1)) rd_data[p] = word_t'(1);
      else if (int'(rd_tid) < NUM_THREADS) rd_data[p] = regs[rd_tid][rd_addr[p]];
      else                             rd_data[p] = '0;
    end
  end

endmodule
