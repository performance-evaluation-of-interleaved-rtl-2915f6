// tb_mmio_regs: random accesses from three threads against a shadow copy;
// checks per-thread privacy, register 0 returning the thread number, and
// that accesses without `req` change nothing.
module tb_mmio_regs;
  import mt_pkg::*;
  localparam int NT = 3, NR = 16;
  logic clk = 0, rst_n = 0;
  tid_t tid;
  logic req, we;
  logic [3:0] addr;
  word_t wdata, rdata;
  word_t shadow [NT][NR];
  int checks = 0, failures = 0;

  mmio_regs dut (.*);
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
    for (int t = 0; t < NT; t++) for (int r = 0; r < NR; r++) shadow[t][r] = (r == 0) ? t : 0;
    tid = 0; req = 0; we = 0; addr = 0; wdata = 0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      tid = tid_t'($urandom % NT); addr = 4'($urandom); wdata = $urandom;
      req = $urandom % 2; we = $urandom % 2;
      #1;
      check(rdata == shadow[tid][addr], $sformatf("t%0d a%0d %h exp %h", tid, addr, rdata, shadow[tid][addr]));
      @(posedge clk);
      if (req && we && addr != 0) shadow[tid][addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
