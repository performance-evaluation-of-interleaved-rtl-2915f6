// mss_buffer: memory subsystem buffer between the CPU and its bus interfaces.
//
// A bus interface handles one request at a time, but a multithreaded CPU can
// have one outstanding line per hardware thread (plus the copy-backs those
// refills cause). The mss buffer collects every request in arrival order and
// hands them out one by one: with a single bus interface it sequentialises
// all traffic; with several ("variable bus interface") it gives the oldest
// request to a free interface, so requests are spread over the interfaces.
//
// Choices of this design: a FIFO of DEPTH entries (default: two per thread,
// which cannot overflow since each thread has at most one fetch and one
// copy-back in flight; asserted); up to NUM_IN requests may enter per cycle,
// lower port first; one request leaves per cycle, to the lowest-numbered
// free interface.
//
// Interface: inputs are valid-only; each output b is a valid/ready pair.
// A request entered in cycle n can leave in cycle n+1.
module mss_buffer
  import mt_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 3,
  parameter int unsigned NUM_BUS     = 2,
  parameter int unsigned NUM_IN      = 2,
  parameter int unsigned DEPTH       = 2 * NUM_THREADS,
  localparam int unsigned PTR_W      = $clog2(DEPTH),
  localparam int unsigned CNT_W      = $clog2(DEPTH + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid  [NUM_IN],
  input  mem_xfer_t  in_xfer   [NUM_IN],
  output logic       out_valid [NUM_BUS],
  output mem_xfer_t  out_xfer  [NUM_BUS],
  input  logic       out_ready [NUM_BUS],
  output logic [CNT_W-1:0] count
);

  mem_xfer_t        q [DEPTH];
  logic [PTR_W-1:0] head, tail;
  logic             found;
  logic [$clog2(NUM_BUS+1)-1:0] sel;
  logic             deq;

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int b = 0; b < NUM_BUS; b++)
      if (!found && out_ready[b]) begin
        found = 1'b1;
        sel   = ($clog2(NUM_BUS+1))'(b);
      end
  end

  assign deq = found && count != '0;

  always_comb begin
    for (int b = 0; b < NUM_BUS; b++) begin
      out_valid[b] = (count != '0) && found && int'(sel) == b;
      out_xfer[b]  = q[head];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      logic [PTR_W-1:0] t;
      logic [CNT_W-1:0] c;
      t = tail;
      c = count;
      for (int i = 0; i < NUM_IN; i++)
        if (in_valid[i]) begin
          q[t] <= in_xfer[i];
          t = inc(t);
          c = c + 1'b1;
        end
      if (deq) begin
        head <= inc(head);
        c = c - 1'b1;
      end
      tail  <= t;
      count <= c;
    end
  end

  always_ff @(posedge clk) begin
    int n;
    n = 0;
    for (int i = 0; i < NUM_IN; i++) n += int'(in_valid[i]);
    if (rst_n) assert (int'(count) + n <= DEPTH) else $error("mss_buffer overflow");
  end

endmodule
