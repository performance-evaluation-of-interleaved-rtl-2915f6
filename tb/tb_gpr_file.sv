// tb_gpr_file: random reads and writes on all 15 read / 5 write ports of a
// 3-thread, 128-register file against a shadow array; checks that banks are
// private per thread, that writes use their own thread id, and that
// registers 0 and 1 read as constants.
module tb_gpr_file;
  import mt_pkg::*;
  localparam int NT = 3, NR = 128, RP = 15, WP = 5;
  logic clk = 0, rst_n = 0;
  tid_t rd_tid;
  logic [6:0] rd_addr [RP];
  word_t rd_data [RP];
  logic wr_en [WP];
  tid_t wr_tid [WP];
  logic [6:0] wr_addr [WP];
  word_t wr_data [WP];
  word_t shadow [NT][NR];
  int checks = 0, failures = 0;

  gpr_file dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < NT; t++) for (int r = 0; r < NR; r++) shadow[t][r] = 0;
    shadow[0][1] = 1; shadow[1][1] = 1; shadow[2][1] = 1;
    for (int p = 0; p < WP; p++) begin wr_en[p] = 0; wr_tid[p] = 0; wr_addr[p] = 0; wr_data[p] = 0; end
    for (int p = 0; p < RP; p++) rd_addr[p] = 0;
    rd_tid = 0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rd_tid = tid_t'($urandom % NT);
      for (int p = 0; p < RP; p++) rd_addr[p] = 7'($urandom % (i < 1000 ? 8 : NR));
      #1;
      for (int p = 0; p < RP; p++)
        check(rd_data[p] == shadow[rd_tid][rd_addr[p]],
              $sformatf("t%0d r%0d = %h exp %h", rd_tid, rd_addr[p], rd_data[p], shadow[rd_tid][rd_addr[p]]));
      for (int p = 0; p < WP; p++) begin
        wr_en[p]   = $urandom % 2;
        wr_tid[p]  = tid_t'($urandom % NT);
        wr_addr[p] = 7'(p * 25 + ($urandom % (i < 1000 ? 8 : 25)));  // distinct per port
        wr_data[p] = $urandom;
      end
      @(posedge clk);
      for (int p = 0; p < WP; p++)
        if (wr_en[p] && wr_addr[p] > 1) shadow[wr_tid[p]][wr_addr[p]] = wr_data[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
