// qte_timer: quantum time expiration (QTE) counter.
//
// Counts the cycles the current hardware thread has been active. When the
// count reaches `limit` the `expire` output is raised, and the scheduler
// forces a thread switch, so that a thread spinning in a busy-wait loop that
// never misses in the first-level caches cannot hold the processor forever.
// The limit is a run-time input so a system can tune it per program; the
// default used by the top level is 90 cycles, the best value found for an
// optimised MPEG-2 decoder.
//
// Interface: `count_en` is high in every cycle a thread is active (switch
// penalty cycles excluded), `restart` clears the count (a switch happened or
// the quantum was renewed). `expire` is combinational: it is high in the
// cycle in which the thread would start its `limit`-th+1 active cycle, i.e.
// after exactly `limit` active cycles. A limit of 0 disables expiration.
module qte_timer #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] limit,
  input  logic             count_en,
  input  logic             restart,
  output logic             expire,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           count <= '0;
    else if (restart)     count <= '0;
    else if (count_en && count != '1) count <= count + 1'b1;
  end

  assign expire = (limit != '0) && count_en && (count >= limit);

endmodule
