// tb_mt_cfg_2t1b: end-to-end test of the multithreaded processor extension,
// in the evaluated configuration of 2 hardware threads and 1 bus
// interface(s), with small caches and a 40-cycle quantum.
//
// A behavioural core runs NT hardware threads through the top level.
// Each thread's program is a deterministic pseudo-random instruction stream,
// indexed by the instruction count the thread keeps in its replicated
// pipeline state: instruction fetches from a code region (threads 0 and 1
// share their code, so their instruction misses can merge), loads and
// stores to a shared data region large enough to force replacement and
// copy-backs, LL/SC pairs on a shared counter, register-file and MMIO
// traffic, long-latency register results that complete after a switch, and
// stretches of a tight loop without misses (a busy wait) that only the
// quantum expiration can interrupt. A main-memory model with a fixed
// latency sits behind each bus interface.
//
// Checked: every committed load, LL and instruction word against an
// architectural reference memory (so any lost store, stale refill or
// early read of a line being copied back shows up), SC success against a
// reference reservation model, per-thread register, MMIO and pipeline
// state, and that every switching mechanism occurred at least once: quantum
// expiration, instruction and data misses, merged misses in the pending
// buffer, copy-back blocking, copy-backs, refill stalls, idle cycles and SC
// failures caused by a switch.
module tb_mt_cfg_2t1b;
  import mt_pkg::*;
  localparam int NT = 2, NB = 1, LAT = 20;
  localparam int NINS = 3000;             // instructions per thread
  localparam int CODE_SPAN = 4096;   // bytes of code per program
  localparam int DATA_LINES = 64; // lines of shared data
  logic clk = 0, rst_n = 0;

  tid_t active_tid; logic active_valid, switching, stall_fill, sw_take, commit, sc_ok;
  logic [NT-1:0] thread_ready; switch_reason_e sw_reason;
  logic [63:0] pipe_q, pipe_d;
  addr_t fetch_addr, d_addr, snoop_addr; word_t fetch_word, d_wdata, d_rdata;
  dop_e d_op; logic [3:0] d_be; logic snoop_valid;
  logic [6:0] rf_rd_addr [15]; word_t rf_rd_data [15];
  logic rf_wr_en [5]; tid_t rf_wr_tid [5]; logic [6:0] rf_wr_addr [5]; word_t rf_wr_data [5];
  logic mmio_req, mmio_we; logic [3:0] mmio_addr; word_t mmio_wdata, mmio_rdata;
  logic m_req_valid [NB], m_req_write [NB], m_req_ready [NB], m_rsp_valid [NB];
  line_addr_t m_req_addr [NB]; line_t m_req_wdata [NB], m_rsp_rdata [NB];
  logic ev_merge, ev_cb_block, ev_fetch, ev_copyback, ev_qte_renew;

  mt_trimedia_top #(.NUM_THREADS(2), .NUM_BUS(1), .ICACHE_BYTES(2048), .DCACHE_BYTES(1024), .CACHE_WAYS(4), .QTE_CYCLES(40)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0t", msg, $time);
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memories ----------------
  function automatic word_t init_word(addr_t a);
    return {a[31:2], 2'b00} ^ 32'h5A00_00A5;
  endfunction
  word_t arch [addr_t];     // architectural data values (written words only)
  line_t mem  [line_addr_t];

  function automatic word_t arch_rd(addr_t a);
    addr_t w = {a[31:2], 2'b00};
    return arch.exists(w) ? arch[w] : init_word(w);
  endfunction

  function automatic line_t mem_rd(line_addr_t la);
    line_t l;
    if (mem.exists(la)) return mem[la];
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = init_word({la, 6'(w*4)});
    return l;
  endfunction

  for (genvar b = 0; b < NB; b++) begin : g_mem
    initial begin
      m_req_ready[b] = 0; m_rsp_valid[b] = 0; m_rsp_rdata[b] = '0;
      forever begin
        @(negedge clk);
        if (m_req_valid[b]) begin
          logic w; line_addr_t a; line_t d;
          w = m_req_write[b]; a = m_req_addr[b]; d = m_req_wdata[b];
          m_req_ready[b] = 1;
          @(negedge clk); m_req_ready[b] = 0;
          repeat (LAT - 1) @(negedge clk);
          if (w) mem[a] = d;
          m_rsp_rdata[b] = mem_rd(a); m_rsp_valid[b] = 1;
          @(negedge clk); m_rsp_valid[b] = 0;
        end
      end
    end
  end

  // ---------------- core model ----------------
  function automatic int unsigned hash(int t, int n);
    int unsigned h = 32'h9E37_79B9 * (n + 1) ^ (t * 32'h85EB_CA6B);
    h ^= h >> 15; h *= 32'h2C1B_3C6D; h ^= h >> 12;
    return h;
  endfunction

  function automatic bit busy_wait(int t, int n);
    return (n % 1000) >= 400 && (n % 1000) < 600 && t == NT - 1;
  endfunction

  function automatic addr_t code_addr(int t, int n);
    addr_t base = (t == 2) ? 32'h0001_0000 + CODE_SPAN : 32'h0001_0000;
    if (busy_wait(t, n)) return base + 32'(n % 4) * 4;
    return base + 32'((n * 16) % CODE_SPAN);
  endfunction

  localparam addr_t DATA_BASE = 32'h0004_0000, LOCK = 32'h0003_0000;

  always_comb begin
    int t, n; int unsigned h;
    t = int'(active_tid); n = int'(pipe_q[63:32]);
    h = hash(t, n);
    fetch_addr = code_addr(t, n);
    d_op = DOP_NONE; d_addr = '0; d_wdata = h; d_be = 4'hf;
    if (!busy_wait(t, n)) begin
      if (n % 16 == 3)       begin d_op = DOP_LL; d_addr = LOCK; end
      else if (n % 16 == 4)  begin d_op = DOP_SC; d_addr = LOCK; d_wdata = sc_value[t]; end
      else case (h % 8)
        0, 1, 2: d_op = DOP_LOAD;
        3, 4:    d_op = DOP_STORE;
        default: d_op = DOP_NONE;
      endcase
      if (d_op == DOP_LOAD || d_op == DOP_STORE) begin
        d_addr = DATA_BASE + 32'(((h >> 8) % DATA_LINES) * 64 + ((h >> 20) % 16) * 4);
        d_be = (h[30]) ? 4'hf : 4'(h >> 24);
      end
    end
    pipe_d = {32'(n + 1), fetch_addr};
    // registers: read the previous value of this thread, write the current
    for (int p = 0; p < 15; p++) rf_rd_addr[p] = 7'(2 + p);
    rf_rd_addr[0] = 7'(2 + (n + 124) % 125);
    rf_rd_addr[1] = 7'd127;
    rf_wr_en[0] = commit; rf_wr_tid[0] = active_tid; rf_wr_addr[0] = 7'(2 + n % 125);
    rf_wr_data[0] = {8'(t), 24'(n)};
    for (int p = 2; p < 5; p++) begin rf_wr_en[p] = 0; rf_wr_tid[p] = 0; rf_wr_addr[p] = 0; rf_wr_data[p] = 0; end
    mmio_req = 1; mmio_we = (n % 2) == 0; mmio_addr = (n % 4 == 1) ? 4'd0 : 4'd5; mmio_wdata = 32'(n);
  end

  // long-latency results: issued at commit, written three cycles later
  logic [2:0] dl_v = '0; tid_t dl_t [3] = '{default: '0}; word_t dl_d [3] = '{default: '0};
  word_t reg127 [NT] = '{default: '0};
  always_comb begin
    rf_wr_en[1] = dl_v[2]; rf_wr_tid[1] = dl_t[2]; rf_wr_addr[1] = 7'd127; rf_wr_data[1] = dl_d[2];
  end

  always_ff @(posedge clk) begin
    if (dl_v[2]) reg127[int'(dl_t[2])] <= dl_d[2];
    dl_v  <= {dl_v[1:0], commit && (pipe_q[63:32] % 5 == 0)};
    dl_t[2] <= dl_t[1]; dl_t[1] <= dl_t[0]; dl_t[0] <= active_tid;
    dl_d[2] <= dl_d[1]; dl_d[1] <= dl_d[0]; dl_d[0] <= {8'hEE, 8'(active_tid), pipe_q[47:32]};
  end

  // ---------------- checking ----------------
  int ninst [NT]; word_t mmio5 [NT]; word_t sc_value [NT];
  bit r_link [NT];
  int n_qte, n_imiss, n_dmiss, n_merge, n_cbblk, n_fetch, n_cb, n_stall, n_idle, n_scfail, n_scok, n_late, n_commit, n_cycles;

  initial begin
    for (int t = 0; t < NT; t++) begin ninst[t] = 0; mmio5[t] = 0; sc_value[t] = 1; r_link[t] = 0; end
    snoop_valid = 0; snoop_addr = 0;
    {n_qte, n_imiss, n_dmiss, n_merge, n_cbblk, n_fetch, n_cb, n_stall, n_idle, n_scfail, n_scok, n_late, n_commit, n_cycles} = '0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    int t, n, c_from;
    bit done, c_commit, c_mwe, c_sw;
    dop_e c_op; addr_t c_addr; word_t c_wdata, c_mwd; logic [3:0] c_be;
    t = int'(active_tid); n = int'(pipe_q[63:32]);
    n_cycles++;
    if (sw_take && sw_reason == SW_QTE) n_qte++;
    if (sw_take && sw_reason == SW_IMISS) n_imiss++;
    if (sw_take && sw_reason == SW_DMISS) n_dmiss++;
    if (ev_merge) n_merge++;
    if (ev_cb_block) n_cbblk++;
    if (ev_fetch) n_fetch++;
    if (ev_copyback) n_cb++;
    if (stall_fill) n_stall++;
    if (!active_valid) n_idle++;
    if (dl_v[2] && (!active_valid || dl_t[2] != active_tid)) n_late++;
    if (commit) begin
      n_commit++;
      check(n == ninst[t], $sformatf("thread %0d pipeline state %0d, expected %0d", t, n, ninst[t]));
      check(fetch_word == init_word(fetch_addr), "instruction word");
      if (n > 0) check(rf_rd_data[0] == {8'(t), 24'(n - 1)}, $sformatf("register of thread %0d", t));
      check(rf_rd_data[1] == reg127[t], "long-latency result in issuing thread's bank");
      check(mmio_rdata == (mmio_addr == 0 ? word_t'(t) : mmio5[t]), "mmio");
      case (d_op)
        DOP_LOAD: check(d_rdata == arch_rd(d_addr), $sformatf("load %h: %h exp %h", d_addr, d_rdata, arch_rd(d_addr)));
        DOP_LL: begin
          check(d_rdata == arch_rd(d_addr), "LL value");
          sc_value[t] = d_rdata + 1;
        end
        DOP_SC: begin
          check(sc_ok == r_link[t], $sformatf("SC result %0d exp %0d", sc_ok, r_link[t]));
          if (r_link[t]) n_scok++; else n_scfail++;
        end
        default: ;
      endcase
    end
    // capture this cycle's values, then update the references at the edge
    c_commit = commit; c_op = d_op; c_addr = d_addr; c_wdata = d_wdata; c_be = d_be;
    c_mwe = mmio_we && mmio_addr == 5; c_mwd = mmio_wdata; c_sw = sw_take; c_from = int'(dut.sw_from);
    @(posedge clk);
    if (c_sw) r_link[c_from] = 0;
    if (c_commit) begin
      if (c_op == DOP_LL) r_link[t] = 1;
      if (c_op == DOP_SC) begin
        if (r_link[t]) arch[{c_addr[31:2], 2'b00}] = c_wdata;
        r_link[t] = 0;
      end
      if (c_op == DOP_STORE) begin
        word_t w;
        w = arch_rd(c_addr);
        for (int b = 0; b < 4; b++) if (c_be[b]) w[b*8 +: 8] = c_wdata[b*8 +: 8];
        arch[{c_addr[31:2], 2'b00}] = w;
      end
      if (c_mwe) mmio5[t] = c_mwd;
      ninst[t]++;
    end
    done = 1;
    for (int k = 0; k < NT; k++) if (ninst[k] < NINS) done = 0;
    if (done) begin
      $display("cycles=%0d commits=%0d qte=%0d imiss=%0d dmiss=%0d merge=%0d cbblock=%0d fetch=%0d copyback=%0d fillstall=%0d idle=%0d sc_ok=%0d sc_fail=%0d late_writes=%0d",
               n_cycles, n_commit, n_qte, n_imiss, n_dmiss, n_merge, n_cbblk, n_fetch, n_cb, n_stall, n_idle, n_scok, n_scfail, n_late);
      check(n_qte > 0, "quantum expiration happened");
      check(n_imiss > 0, "instruction-miss switch happened");
      check(n_dmiss > 0, "data-miss switch happened");
      check(n_merge > 0, "pending-buffer merge happened");
      check(n_cbblk > 0, "copy-back block happened");
      check(n_cb > 0, "copy-back happened");
      check(n_stall > 0, "refill stall happened");
      check(n_idle > 0, "all threads waiting happened");
      check(n_scok > 0 && n_scfail > 0, "SC success and SC failure after a switch happened");
      check(n_late > 0, "long-latency result after a switch happened");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
