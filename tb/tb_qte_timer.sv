// tb_qte_timer: random count-enable/restart/limit stimulus against a
// cycle-level reference counter; checks `count` and `expire` every cycle and
// that a thread gets exactly `limit` active cycles before expiration.
module tb_qte_timer;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] limit, count;
  logic count_en, restart, expire;
  int checks = 0, failures = 0;
  int ref_cnt;

  qte_timer #(.CNT_W(W)) dut (.clk, .rst_n, .limit, .count_en, .restart, .expire, .count);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run;
    limit = 8'd5; count_en = 0; restart = 0; ref_cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // exact quantum: with count_en always high, expire on the 6th cycle
    @(negedge clk); restart = 1; @(negedge clk); restart = 0; count_en = 1;
    run = 0;
    while (!expire && run < 20) begin @(negedge clk); run++; end
    check(run == 5, $sformatf("quantum length %0d, expected 5", run));
    restart = 1; @(negedge clk); restart = 0; ref_cnt = 0;
    // random phase
    for (int i = 0; i < 3000; i++) begin
      count_en = ($urandom % 4) != 0;
      restart  = ($urandom % 13) == 0;
      if (i % 500 == 0) limit = W'($urandom % 12);
      if (i > 2000) limit = 8'd250;   // let the counter saturate
      #1;
      check(count == W'(ref_cnt), $sformatf("count %0d vs %0d", count, ref_cnt));
      check(expire == (limit != 0 && count_en && ref_cnt >= limit), "expire");
      @(posedge clk);
      if (restart) ref_cnt = 0;
      else if (count_en && ref_cnt < 255) ref_cnt++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
