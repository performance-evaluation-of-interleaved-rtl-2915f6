// tb_copy_back_buffer: directed copy-back scenario (a thread asks for a line
// that another thread's refill is still copying back: blocked until the
// copy-back completes, then woken) plus random set/check/clear traffic
// against a reference model of entries and waiters.
module tb_copy_back_buffer;
  import mt_pkg::*;
  localparam int NT = 3;
  logic clk = 0, rst_n = 0;
  logic ck_valid, blocked, st_valid, cl_valid;
  tid_t ck_tid, st_tid, cl_tid;
  line_addr_t ck_addr, st_addr;
  logic [NT-1:0] wake, valid;
  int checks = 0, failures = 0, n_block = 0;
  bit r_v [NT]; line_addr_t r_a [NT]; logic [NT-1:0] r_w [NT];

  copy_back_buffer #(.NUM_THREADS(NT)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cycle();
    logic [NT-1:0] by, ew;
    #1;
    by = '0;
    if (ck_valid) for (int e = 0; e < NT; e++) by[e] = r_v[e] && (r_a[e] == ck_addr || e == int'(ck_tid));
    check(blocked == (|by), "blocked");
    ew = '0;
    if (cl_valid) begin
      ew = r_w[cl_tid];
      if (by[cl_tid]) ew |= NT'(1) << ck_tid;
    end
    check(wake == ew, $sformatf("wake %b exp %b", wake, ew));
    for (int e = 0; e < NT; e++) check(valid[e] == r_v[e], "valid");
    if (|by) n_block++;
    @(posedge clk);
    for (int e = 0; e < NT; e++) if (by[e]) r_w[e] |= NT'(1) << ck_tid;
    if (cl_valid) begin r_v[cl_tid] = 0; r_w[cl_tid] = 0; end
    if (st_valid) begin r_v[st_tid] = 1; r_a[st_tid] = st_addr; r_w[st_tid] = 0; end
    @(negedge clk);
    ck_valid = 0; st_valid = 0; cl_valid = 0;
  endtask

  initial begin
    for (int e = 0; e < NT; e++) begin r_v[e] = 0; r_a[e] = 0; r_w[e] = 0; end
    ck_valid = 0; st_valid = 0; cl_valid = 0; ck_tid = 0; st_tid = 0; cl_tid = 0; ck_addr = 0; st_addr = 0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    // thread 0's refill displaces dirty line A
    st_valid = 1; st_tid = 0; st_addr = 26'h0A; cycle();
    // thread 1 misses on A: must not fetch
    ck_valid = 1; ck_tid = 1; ck_addr = 26'h0A; #1; check(blocked, "read of a line being copied back blocks"); cycle();
    // thread 2 misses on another line: free to go
    ck_valid = 1; ck_tid = 2; ck_addr = 26'h0B; #1; check(!blocked, "other line not blocked"); cycle();
    // copy-back completes: thread 1 woken
    cl_valid = 1; cl_tid = 0; #1; check(wake == 3'b010, "waiter woken on completion"); cycle();
    ck_valid = 1; ck_tid = 1; ck_addr = 26'h0A; #1; check(!blocked, "line may be fetched again"); cycle();
    for (int i = 0; i < 4000; i++) begin
      int t, e;
      t = $urandom % NT;
      if ($urandom % 2) begin ck_valid = 1; ck_tid = tid_t'(t); ck_addr = line_addr_t'($urandom % 4); end
      e = $urandom % NT;
      if ($urandom % 3 == 0) begin
        if (r_v[e]) begin cl_valid = 1; cl_tid = tid_t'(e); end
        else begin st_valid = 1; st_tid = tid_t'(e); st_addr = line_addr_t'($urandom % 4); end
      end
      cycle();
    end
    check(n_block > 20, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
