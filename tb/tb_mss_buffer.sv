// tb_mss_buffer: random requests on both input ports and random readiness
// of two bus interfaces. Checks that requests leave in exactly the order
// they entered (port 0 before port 1 within a cycle), each exactly once, at
// most one per cycle, only to a ready interface, and that a request entered
// into an empty buffer with an idle interface leaves in the next cycle.
module tb_mss_buffer;
  import mt_pkg::*;
  localparam int NT = 3, NB = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid [2];
  mem_xfer_t in_xfer [2];
  logic out_valid [NB];
  mem_xfer_t out_xfer [NB];
  logic out_ready [NB];
  logic [2:0] count;
  mem_xfer_t exp_q [$];
  int checks = 0, failures = 0, n_out = 0, n_bus1 = 0;

  mss_buffer #(.NUM_THREADS(NT), .NUM_BUS(NB), .NUM_IN(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic mem_xfer_t rnd();
    mem_xfer_t x;
    x = '0;
    x.kind = req_kind_e'($urandom % 2); x.tid = tid_t'($urandom % NT);
    x.addr = line_addr_t'($urandom); x.data[31:0] = $urandom;
    return x;
  endfunction

  initial begin
    in_valid[0] = 0; in_valid[1] = 0; in_xfer[0] = '0; in_xfer[1] = '0;
    out_ready[0] = 0; out_ready[1] = 0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    // latency: one request, both interfaces idle
    out_ready[0] = 1; out_ready[1] = 1;
    in_valid[0] = 1; in_xfer[0] = rnd(); exp_q.push_back(in_xfer[0]);
    #1; check(!out_valid[0] && !out_valid[1], "nothing leaves in the entry cycle");
    @(negedge clk); in_valid[0] = 0; #1;
    check(out_valid[0] && out_xfer[0] == exp_q[0], "leaves one cycle later on bus 0");
    @(posedge clk); void'(exp_q.pop_front()); n_out++;
    for (int i = 0; i < 5000; i++) begin
      int nv, seen;
      @(negedge clk);
      out_ready[0] = $urandom % 3 == 0; out_ready[1] = $urandom % 2;
      nv = 0;
      for (int p = 0; p < 2; p++) begin
        in_valid[p] = 0;
        if (int'(count) + nv + 1 <= 2 * NT - 1 && ($urandom % 3 == 0)) begin
          in_valid[p] = 1; in_xfer[p] = rnd(); nv++;
        end
      end
      #1;
      check(int'(count) == exp_q.size(), "count");
      seen = 0;
      for (int b = 0; b < NB; b++) if (out_valid[b]) begin
        seen++;
        check(out_ready[b], "only to a ready interface");
        check(exp_q.size() > 0 && out_xfer[b] == exp_q[0], "in order");
        if (b == 1) n_bus1++;
      end
      check(seen <= 1, "one per cycle");
      check(seen == 1 || exp_q.size() == 0 || (!out_ready[0] && !out_ready[1]), "dispatch when possible");
      @(posedge clk);
      if (seen == 1) begin void'(exp_q.pop_front()); n_out++; end
      for (int p = 0; p < 2; p++) if (in_valid[p]) exp_q.push_back(in_xfer[p]);
    end
    check(n_out > 500 && n_bus1 > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
