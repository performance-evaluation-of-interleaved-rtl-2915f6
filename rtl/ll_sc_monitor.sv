// ll_sc_monitor: load-link / store-conditional reservations per thread.
//
// LL records a reservation on a word address for the issuing hardware
// thread; SC by the same thread succeeds only if that reservation is still
// intact, and always consumes it. The reservation is lost when another
// processor writes the word (`snoop`) and, because the hardware threads
// behave as separate virtual processors, whenever the thread is switched
// out: a switch between LL and SC therefore always makes the SC fail and the
// software loop runs once more. Clearing on switch and on any snooped write
// to the reserved word is how this design realises that rule.
//
// Interface: `ll`/`sc` are single-cycle strobes for a committed operation by
// `tid` at word address `addr`; `sc_ok` is combinational and valid in the
// cycle of the SC. `sw_out` with `sw_tid` clears that thread's reservation.
module ll_sc_monitor
  import mt_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  tid_t        tid,
  input  addr_t       addr,
  input  logic        ll,
  input  logic        sc,
  output logic        sc_ok,
  input  logic        sw_out,
  input  tid_t        sw_tid,
  input  logic        snoop,
  input  addr_t       snoop_addr,
  output logic [NUM_THREADS-1:0] linked
);

  addr_t link_addr [NUM_THREADS];

  assign sc_ok = sc && int'(tid) < NUM_THREADS && linked[tid]
                 && link_addr[tid][ADDR_W-1:2] == addr[ADDR_W-1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      linked <= '0;
      for (int t = 0; t < NUM_THREADS; t++) link_addr[t] <= '0;
    end else begin
      for (int t = 0; t < NUM_THREADS; t++) begin
        if (snoop && linked[t] && link_addr[t][ADDR_W-1:2] == snoop_addr[ADDR_W-1:2])
          linked[t] <= 1'b0;
        if (sw_out && int'(sw_tid) == t)
          linked[t] <= 1'b0;
        if (int'(tid) == t && sc)
          linked[t] <= 1'b0;
        if (int'(tid) == t && ll) begin
          linked[t]    <= 1'b1;
          link_addr[t] <= addr;
        end
      end
    end
  end

  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(ll && sc));

endmodule
