// tb_pending_buffer: the situation of the pending-buffer figure (four
// threads, entries with tags 0xC0002000 / 0xC0005060 / 0xC0002000 /
// 0xC0003000 in sets 19, 4, 17, 19) and random misses/releases against a
// reference model. Checks that a line already pending is never fetched
// twice, that joining threads are woken with the owner, and that I- and
// D-cache misses do not merge.
module tb_pending_buffer;
  import mt_pkg::*;
  localparam int NT = 4, SW = 5;
  logic clk = 0, rst_n = 0;
  logic miss_valid, miss_icache, hit, fetch, rel_valid;
  tid_t miss_tid, rel_tid;
  line_addr_t miss_addr;
  logic [NT-1:0] wake, valid;
  int checks = 0, failures = 0, n_merge = 0, n_fetch = 0;
  bit r_v [NT]; line_addr_t r_a [NT]; bit r_i [NT]; logic [NT-1:0] r_w [NT];

  pending_buffer #(.NUM_THREADS(NT), .SET_W(SW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic line_addr_t la(logic [20:0] tag, logic [4:0] set);
    return {tag, set};
  endfunction

  task automatic cycle();
    int m; logic [NT-1:0] ew;
    #1;
    m = -1;
    if (miss_valid) for (int e = 0; e < NT; e++) if (r_v[e] && r_a[e] == miss_addr && r_i[e] == miss_icache) m = e;
    check(hit == (miss_valid && m >= 0), "hit");
    check(fetch == (miss_valid && m < 0), "fetch");
    ew = '0;
    if (rel_valid) begin
      ew = r_w[rel_tid] | (NT'(1) << rel_tid);
      if (m == int'(rel_tid)) ew |= NT'(1) << miss_tid;
    end
    check(wake == ew, $sformatf("wake %b exp %b", wake, ew));
    for (int e = 0; e < NT; e++) check(valid[e] == r_v[e], "valid");
    if (hit) n_merge++;
    if (fetch) n_fetch++;
    @(posedge clk);
    if (m >= 0) r_w[m] |= NT'(1) << miss_tid;
    if (miss_valid && m < 0) begin r_v[miss_tid] = 1; r_a[miss_tid] = miss_addr; r_i[miss_tid] = miss_icache; r_w[miss_tid] = 0; end
    if (rel_valid) begin r_v[rel_tid] = 0; r_w[rel_tid] = 0; end
    @(negedge clk);
    miss_valid = 0; rel_valid = 0;
  endtask

  task automatic do_miss(int t, line_addr_t a, bit ic);
    miss_valid = 1; miss_tid = tid_t'(t); miss_addr = a; miss_icache = ic;
  endtask

  initial begin
    for (int e = 0; e < NT; e++) begin r_v[e] = 0; r_a[e] = 0; r_i[e] = 0; r_w[e] = 0; end
    miss_valid = 0; rel_valid = 0; miss_tid = 0; rel_tid = 0; miss_addr = 0; miss_icache = 0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1; @(negedge clk);
    // figure scenario
    do_miss(0, la(21'(32'hC0002000 >> 11), 19), 0); cycle(); check(valid[0], "entry 1 set");
    do_miss(2, la(21'(32'hC0002000 >> 11), 17), 0); cycle();
    do_miss(3, la(21'(32'hC0003000 >> 11), 19), 0); cycle();
    do_miss(1, la(21'(32'hC0002000 >> 11), 19), 0); #1; check(hit && !fetch, "thread 2 joins thread 1's line"); cycle();
    check(!valid[1], "entry 2 stays FALSE");
    do_miss(1, la(21'(32'hC0002000 >> 11), 19), 1); #1; check(fetch, "I-miss does not merge with D-miss"); cycle();
    rel_valid = 1; rel_tid = 0; #1; check(wake == 4'b0011, "owner and joiner woken"); cycle();
    rel_valid = 1; rel_tid = 1; cycle();
    rel_valid = 1; rel_tid = 2; cycle();
    rel_valid = 1; rel_tid = 3; cycle();
    // random: few lines so that merging is frequent
    for (int i = 0; i < 4000; i++) begin
      int t;
      bit waiting;
      t = $urandom % NT;
      waiting = 0;
      for (int e = 0; e < NT; e++) if ((r_v[e] && e == t) || r_w[e][t]) waiting = 1;
      if (!waiting && ($urandom % 2)) do_miss(t, line_addr_t'($urandom % 4), $urandom % 2);
      if ($urandom % 3 == 0) begin
        int e;
        e = $urandom % NT;
        if (r_v[e]) begin rel_valid = 1; rel_tid = tid_t'(e); end
      end
      cycle();
    end
    check(n_merge > 10 && n_fetch > 10, "coverage");
    $display("merges=%0d fetches=%0d", n_merge, n_fetch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
