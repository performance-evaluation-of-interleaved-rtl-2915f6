// tb_ll_sc_monitor: directed LL/SC sequences (plain success, failure after a
// thread switch, failure after a snooped write, wrong address) followed by
// random operations checked against a reference reservation model.
module tb_ll_sc_monitor;
  import mt_pkg::*;
  localparam int NT = 3;
  logic clk = 0, rst_n = 0;
  tid_t tid, sw_tid;
  addr_t addr, snoop_addr;
  logic ll, sc, sc_ok, sw_out, snoop;
  logic [NT-1:0] linked;
  bit   r_link [NT];
  addr_t r_addr [NT];
  int checks = 0, failures = 0;

  ll_sc_monitor dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step();
    bit exp;
    #1;
    exp = sc && r_link[tid] && r_addr[tid][31:2] == addr[31:2];
    check(sc_ok == exp, $sformatf("sc_ok=%0d exp %0d (tid %0d)", sc_ok, exp, tid));
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      if (snoop && r_link[t] && r_addr[t][31:2] == snoop_addr[31:2]) r_link[t] = 0;
      if (sw_out && sw_tid == t) r_link[t] = 0;
      if (tid == t && sc) r_link[t] = 0;
      if (tid == t && ll) begin r_link[t] = 1; r_addr[t] = addr; end
    end
    @(negedge clk);
    ll = 0; sc = 0; sw_out = 0; snoop = 0;
  endtask

  initial begin
    for (int t = 0; t < NT; t++) begin r_link[t] = 0; r_addr[t] = 0; end
    tid = 0; sw_tid = 0; addr = 0; snoop_addr = 0; ll = 0; sc = 0; sw_out = 0; snoop = 0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1; @(negedge clk);
    // LL then SC: succeeds
    tid = 1; addr = 32'h100; ll = 1; step();
    tid = 1; addr = 32'h100; sc = 1; #1; check(sc_ok, "plain LL/SC"); step();
    // LL, switch out, SC: fails
    tid = 1; addr = 32'h100; ll = 1; step();
    sw_out = 1; sw_tid = 1; step();
    tid = 1; addr = 32'h100; sc = 1; #1; check(!sc_ok, "SC after switch"); step();
    // LL, other processor writes, SC: fails
    tid = 2; addr = 32'h200; ll = 1; step();
    snoop = 1; snoop_addr = 32'h202; step();
    tid = 2; addr = 32'h200; sc = 1; #1; check(!sc_ok, "SC after snoop"); step();
    // random
    for (int i = 0; i < 3000; i++) begin
      tid = tid_t'($urandom % NT);
      addr = {28'h0, 2'($urandom), 2'b00};
      case ($urandom % 4)
        0: ll = 1;
        1: sc = 1;
        default: ;
      endcase
      sw_out = ($urandom % 6) == 0; sw_tid = tid_t'($urandom % NT);
      snoop = ($urandom % 8) == 0; snoop_addr = {28'h0, 2'($urandom), 2'b00};
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
