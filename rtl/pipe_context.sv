// pipe_context: replicated pipeline registers for a one-cycle thread switch.
//
// Instead of draining the pipeline on a switch, every hardware thread keeps
// its own copy of the pipeline state (program counter and the contents of
// the pipeline registers). The copy of the active thread is the live one:
// it is presented on `state_q` and updated from `state_d` whenever the core
// advances (`we`). Switching threads only changes which copy is live, so the
// switched-out thread resumes exactly where it stopped. Width STATE_W is a
// parameter because the pipeline contents are those of the core that uses
// it; the default is this design's choice.
//
// Each copy resets to its own entry of `reset_state` (for example a boot
// address per thread).
//
// Timing: `state_q` is combinational on `tid`; writes land at the edge.
module pipe_context
  import mt_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 3,
  parameter int unsigned STATE_W     = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [STATE_W-1:0] reset_state [NUM_THREADS],
  input  tid_t               tid,
  input  logic               we,
  input  logic [STATE_W-1:0] state_d,
  output logic [STATE_W-1:0] state_q
);

  logic [STATE_W-1:0] ctx [NUM_THREADS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_THREADS; t++) ctx[t] <= reset_state[t];
    end else if (we && int'(tid) < NUM_THREADS) begin
      ctx[tid] <= state_d;
    end
  end

  assign state_q = (int'(tid) < NUM_THREADS) ? ctx[tid] : '0;

endmodule
