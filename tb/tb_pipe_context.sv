// tb_pipe_context: per-thread pipeline state copies. Checks the reset value
// of each copy, then random writes under random thread selection against a
// shadow array, i.e. that a switched-out thread's state is kept intact.
module tb_pipe_context;
  import mt_pkg::*;
  localparam int NT = 3, W = 64;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] reset_state [NT];
  tid_t tid;
  logic we;
  logic [W-1:0] state_d, state_q;
  logic [W-1:0] shadow [NT];
  int checks = 0, failures = 0;

  pipe_context dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < NT; t++) begin reset_state[t] = 64'h1000 * (t + 1); shadow[t] = reset_state[t]; end
    tid = 0; we = 0; state_d = 0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      tid = tid_t'($urandom % NT); we = ($urandom % 3) == 0; state_d = {$urandom, $urandom};
      #1;
      check(state_q == shadow[tid], $sformatf("t%0d %h exp %h", tid, state_q, shadow[tid]));
      @(posedge clk);
      if (we) shadow[tid] = state_d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
