// tb_miss_unit: directed sequence through the miss path of three threads
// and two bus interfaces: a new miss produces one fetch; a second thread
// missing on the same line joins it instead; an instruction miss on the
// same address is fetched separately; a returning line is refilled and wakes
// owner and joiner; a refill that displaces a dirty line queues a copy-back
// and blocks a later read of that line until the copy-back completes; two
// simultaneous responses are taken one per cycle, lowest bus first.
module tb_miss_unit;
  import mt_pkg::*;
  localparam int NT = 3, NB = 2;
  logic clk = 0, rst_n = 0;
  logic miss_valid, miss_icache;
  tid_t miss_tid;
  line_addr_t miss_addr;
  logic req_valid [2]; mem_xfer_t req_xfer [2];
  logic rsp_valid [NB]; mem_xfer_t rsp [NB]; logic rsp_ready [NB];
  logic ifill_valid, dfill_valid; line_addr_t fill_addr; line_t fill_data;
  logic devict_valid; line_addr_t devict_addr; line_t devict_data;
  logic [NT-1:0] wake, pb_valid, cb_valid;
  logic busy, ev_merge, ev_cb_block, ev_fetch, ev_copyback;
  int checks = 0, failures = 0;

  miss_unit #(.NUM_THREADS(NT), .NUM_BUS(NB)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic idle();
    miss_valid = 0; rsp_valid[0] = 0; rsp_valid[1] = 0; devict_valid = 0;
  endtask

  task automatic miss(int t, int a, bit ic);
    miss_valid = 1; miss_tid = tid_t'(t); miss_addr = line_addr_t'(a); miss_icache = ic;
  endtask

  function automatic mem_xfer_t resp(req_kind_e k, int t, int a, bit ic, line_t d);
    mem_xfer_t x;
    x.kind = k; x.tid = tid_t'(t); x.addr = line_addr_t'(a); x.icache = ic; x.data = d;
    return x;
  endfunction

  task automatic step();
    @(posedge clk); @(negedge clk); idle();
  endtask

  initial begin
    line_t d5, dirty9;
    d5 = {16{32'h5555_0005}}; dirty9 = {16{32'h9999_0009}};
    idle(); miss_tid = 0; miss_addr = 0; miss_icache = 0; devict_addr = 0; devict_data = '0;
    rsp[0] = '0; rsp[1] = '0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    // thread 0 misses on data line 5
    miss(0, 5, 0); #1;
    check(req_valid[0] && req_xfer[0].kind == REQ_FETCH && req_xfer[0].tid == 0 && req_xfer[0].addr == 5, "fetch issued");
    check(!req_valid[1] && !busy, "no copy-back, not busy");
    step();
    check(pb_valid == 3'b001, "pending entry of thread 0");
    // thread 1 misses on the same line: joins, no request
    miss(1, 5, 0); #1;
    check(ev_merge && !req_valid[0], "second miss merged");
    step();
    // thread 2 misses on instruction line 5: separate fetch
    miss(2, 5, 1); #1;
    check(req_valid[0] && req_xfer[0].icache, "instruction miss fetched separately");
    step();
    // both responses arrive at once; data line on bus 1, instruction line on bus 0
    rsp_valid[0] = 1; rsp[0] = resp(REQ_FETCH, 2, 5, 1, d5);
    rsp_valid[1] = 1; rsp[1] = resp(REQ_FETCH, 0, 5, 0, d5);
    #1;
    check(rsp_ready[0] && !rsp_ready[1], "bus 0 first");
    check(ifill_valid && !dfill_valid && fill_addr == 5 && fill_data == d5 && busy, "instruction refill");
    check(wake == 3'b100, "thread 2 woken");
    step();
    // the data line displaces dirty line 9
    rsp_valid[1] = 1; rsp[1] = resp(REQ_FETCH, 0, 5, 0, d5);
    devict_valid = 1; devict_addr = 9; devict_data = dirty9;
    #1;
    check(rsp_ready[1] && dfill_valid && fill_data == d5, "data refill");
    check(wake == 3'b011, "owner and joiner woken");
    check(req_valid[1] && req_xfer[1].kind == REQ_WRITEBACK && req_xfer[1].addr == 9 && req_xfer[1].data == dirty9 && ev_copyback, "copy-back queued");
    step();
    check(cb_valid == 3'b001 && pb_valid == 3'b000, "copy-back entry set, pending entries free");
    // thread 1 now wants line 9: blocked, nothing fetched
    miss(1, 9, 0); #1;
    check(ev_cb_block && !req_valid[0], "read of line being copied back is blocked");
    step();
    // thread 0 itself misses while its copy-back is outstanding: blocked
    miss(0, 12, 0); #1;
    check(ev_cb_block && !req_valid[0], "own copy-back entry busy blocks");
    step();
    // copy-back completes
    rsp_valid[0] = 1; rsp[0] = resp(REQ_WRITEBACK, 0, 9, 0, dirty9); #1;
    check(wake == 3'b011 && !ifill_valid && !dfill_valid, "blocked threads woken");
    step();
    check(cb_valid == 3'b000, "copy-back entry cleared");
    miss(1, 9, 0); #1;
    check(req_valid[0] && req_xfer[0].addr == 9, "line fetched again after copy-back");
    step();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
