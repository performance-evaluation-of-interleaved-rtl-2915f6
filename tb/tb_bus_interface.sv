// tb_bus_interface: a memory model with a fixed latency behind the
// interface. Checks that only one request is outstanding, that fetches
// return the memory line and copy-backs update memory, that the tags of the
// request come back with the response, and the round-trip cycle count.
module tb_bus_interface;
  import mt_pkg::*;
  localparam int LAT = 7;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rsp_valid, rsp_ready;
  mem_xfer_t req, rsp;
  logic m_req_valid, m_req_write, m_req_ready, m_rsp_valid, busy;
  line_addr_t m_req_addr;
  line_t m_req_wdata, m_rsp_rdata;
  line_t mem [16];
  int checks = 0, failures = 0;

  bus_interface dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // memory: accepts at once, answers LAT cycles after acceptance
  initial begin
    m_req_ready = 0; m_rsp_valid = 0; m_rsp_rdata = '0;
    forever begin
      @(negedge clk);
      m_req_ready = m_req_valid;
      if (m_req_valid) begin
        logic w; line_addr_t a; line_t d;
        w = m_req_write; a = m_req_addr; d = m_req_wdata;
        @(negedge clk); m_req_ready = 0;
        repeat (LAT - 1) @(negedge clk);
        if (w) mem[a[3:0]] = d;
        m_rsp_rdata = mem[a[3:0]]; m_rsp_valid = 1;
        @(negedge clk); m_rsp_valid = 0;
      end
    end
  end

  initial begin
    line_t ref_mem [16];
    for (int i = 0; i < 16; i++) begin mem[i] = {16{$urandom}}; ref_mem[i] = mem[i]; end
    req_valid = 0; req = '0; rsp_ready = 0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      mem_xfer_t x; int cyc;
      x = '0;
      x.kind = req_kind_e'($urandom % 2); x.icache = $urandom % 2; x.tid = tid_t'($urandom % 3);
      x.addr = line_addr_t'($urandom % 16); x.data = {16{$urandom}};
      @(negedge clk);
      check(req_ready && !busy, "idle before request");
      req_valid = 1; req = x;
      @(negedge clk); req_valid = 0;
      cyc = 1;
      check(!req_ready, "single outstanding request");
      rsp_ready = 0;
      while (!rsp_valid && cyc < 100) begin @(negedge clk); cyc++; end
      check(cyc == LAT + 2, $sformatf("round trip %0d cycles, expected %0d", cyc, LAT + 2));
      check(rsp.kind == x.kind && rsp.tid == x.tid && rsp.icache == x.icache && rsp.addr == x.addr, "tags");
      if (x.kind == REQ_FETCH) check(rsp.data == ref_mem[x.addr[3:0]], "fetched line");
      else ref_mem[x.addr[3:0]] = x.data;
      // hold the response a random time before taking it
      repeat ($urandom % 3) begin @(negedge clk); check(rsp_valid, "response held"); end
      rsp_ready = 1; @(negedge clk); rsp_ready = 0;
    end
    for (int i = 0; i < 16; i++) check(mem[i] == ref_mem[i], "memory after copy-backs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
