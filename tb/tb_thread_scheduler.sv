// tb_thread_scheduler: random misses, wake-ups and holds against a
// behavioural reference of the switching rules (round robin, switch on miss
// or quantum expiration, one dead cycle per switch, idle when nobody is
// ready). Also checks a directed case: a lone thread's quantum renews
// without a switch, and with two threads the quantum of 6 active cycles
// is followed by exactly one switch cycle.
module tb_thread_scheduler;
  import mt_pkg::*;
  localparam int NT = 3, W = 8, QTE = 6;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] qte_limit;
  logic hold, miss, miss_icache;
  logic [NT-1:0] wake, ready;
  tid_t active_tid, sw_from;
  logic active_valid, switching, issue_ok, sw_take, qte_renew;
  switch_reason_e sw_reason;
  int checks = 0, failures = 0;
  int n_qte = 0, n_imiss = 0, n_dmiss = 0, n_idle = 0, n_renew = 0;

  // reference state
  int  r_cur;  bit r_val; bit r_pen; int r_q; bit r_rdy [NT];

  thread_scheduler #(.NUM_THREADS(NT), .CNT_W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int pick(int from, bit excl_cur, logic [NT-1:0] wk);
    for (int i = 1; i <= NT; i++) begin
      int k;
      k = (from + i) % NT;
      if ((r_rdy[k] || wk[k]) && !(excl_cur && k == r_cur)) return k;
    end
    return -1;
  endfunction

  // compare, then advance the reference by one clock
  task automatic cycle();
    bit run, others, qsw, iss, take; int nx;
    #1;
    run = r_val && !r_pen;
    others = 0;
    for (int k = 0; k < NT; k++) if (k != r_cur && r_rdy[k]) others = 1;
    qsw = run && r_q >= QTE && others;
    iss = run && !hold && !qsw;
    take = run && (qsw || miss);
    check(issue_ok == iss, "issue_ok");
    check(sw_take == take, "sw_take");
    check(active_valid == r_val && (!r_val || int'(active_tid) == r_cur), $sformatf("active %0d/%0d exp %0d/%0d", active_valid, active_tid, r_val, r_cur));
    check(switching == r_pen, "switching");
    if (take) check(sw_reason == (qsw ? SW_QTE : (miss_icache ? SW_IMISS : SW_DMISS)), "reason");
    if (take && qsw) n_qte++;
    if (take && !qsw && miss_icache) n_imiss++;
    if (take && !qsw && !miss_icache) n_dmiss++;
    if (!r_val) n_idle++;
    if (run && r_q >= QTE && !others) n_renew++;
    @(posedge clk);
    // reference update
    nx = pick(r_cur, run && miss, wake);
    for (int k = 0; k < NT; k++) if (wake[k]) r_rdy[k] = 1;
    if (run && miss) r_rdy[r_cur] = 0;
    if (run && !(r_q >= QTE && !others)) r_q++; else r_q = 0;
    if (r_pen) begin r_pen = 0; r_q = 0; end
    if (take) begin
      if (nx >= 0) begin r_cur = nx; r_pen = 1; r_q = 0; end else r_val = 0;
    end else if (!r_val && nx >= 0) begin
      r_cur = nx; r_val = 1; r_pen = 1; r_q = 0;
    end
    @(negedge clk);
  endtask

  initial begin
    qte_limit = W'(QTE); hold = 0; miss = 0; miss_icache = 0; wake = '0;
    r_cur = NT - 1; r_val = 0; r_pen = 0; r_q = 0;
    for (int k = 0; k < NT; k++) r_rdy[k] = 1;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      hold = ($urandom % 8) == 0;
      #0;
      miss = 0; miss_icache = $urandom % 2;
      wake = '0;
      for (int k = 0; k < NT; k++) if (!r_rdy[k] && ($urandom % (i < 3000 ? 5 : 40)) == 0) wake[k] = 1;
      #1;
      if (issue_ok && ($urandom % (i < 3000 ? 6 : 30)) == 0) miss = 1;
      cycle();
    end
    check(n_qte > 0 && n_imiss > 0 && n_dmiss > 0 && n_idle > 0 && n_renew > 0,
          $sformatf("coverage qte=%0d imiss=%0d dmiss=%0d idle=%0d renew=%0d", n_qte, n_imiss, n_dmiss, n_idle, n_renew));
    $display("qte=%0d imiss=%0d dmiss=%0d idle=%0d renew=%0d", n_qte, n_imiss, n_dmiss, n_idle, n_renew);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
