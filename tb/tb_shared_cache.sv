// tb_shared_cache: a 1 KB, 4-way instance (4 sets) driven with random loads
// and stores over 32 lines, so every set sees 8 lines and replacement is
// constant. The testbench plays memory and miss handler. It keeps the
// architectural memory contents and, per set, the resident lines with the
// global-clock time of their last use. Checks: hit/miss against the model,
// load data, the LRU victim (oldest last use) on every refill, that only
// dirty victims are reported for copy-back with their latest data, and
// that probes without commit leave the state alone.
module tb_shared_cache;
  import mt_pkg::*;
  localparam int SIZE = 1024, WAYS = 4, SETS = 4, LINES = 32;
  logic clk = 0, rst_n = 0;
  logic [31:0] now;
  addr_t lk_addr; logic lk_commit, lk_we, lk_hit; word_t lk_wdata, lk_rdata; logic [3:0] lk_be;
  logic fill_valid, evict_valid; line_addr_t fill_addr, evict_addr; line_t fill_data, evict_data;
  word_t arch [LINES][16];   // architectural contents
  word_t bmem [LINES][16];   // contents of main memory
  int    res_line [SETS][$]; // resident lines per set
  int    res_use  [SETS][$];
  bit    res_dirty[SETS][$];
  int checks = 0, failures = 0, n_evict = 0, n_hit = 0, n_miss = 0;

  shared_cache #(.SIZE_BYTES(SIZE), .WAYS(WAYS)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", msg, $time); end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int find(int set, int line);
    for (int k = 0; k < res_line[set].size(); k++) if (res_line[set][k] == line) return k;
    return -1;
  endfunction

  function automatic line_t pack(int line);
    line_t l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = bmem[line][w];
    return l;
  endfunction

  initial begin
    now = 0; lk_addr = 0; lk_commit = 0; lk_we = 0; lk_wdata = 0; lk_be = 0;
    fill_valid = 0; fill_addr = 0; fill_data = 0;
    for (int l = 0; l < LINES; l++) for (int w = 0; w < 16; w++) begin bmem[l][w] = $urandom; arch[l][w] = bmem[l][w]; end
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int line, word, set, k;
      line = $urandom % LINES; word = $urandom % 16; set = line % SETS;
      lk_addr = addr_t'(line * 64 + word * 4);
      lk_commit = 0; lk_we = $urandom % 2; lk_wdata = $urandom; lk_be = 4'($urandom);
      #1;
      k = find(set, line);
      check(lk_hit == (k >= 0), $sformatf("hit line %0d", line));
      if (k >= 0) begin
        n_hit++;
        check(lk_rdata == arch[line][word], "load data");
        // commit the access
        lk_commit = 1;
        @(posedge clk);
        res_use[set][k] = int'(now) - 1;
        if (lk_we) begin
          res_dirty[set][k] = 1;
          for (int b = 0; b < 4; b++) if (lk_be[b]) arch[line][word][b*8 +: 8] = lk_wdata[b*8 +: 8];
        end
        @(negedge clk); lk_commit = 0;
      end else begin
        int v, oldest;
        n_miss++;
        // one idle cycle, then the refill
        @(negedge clk);
        fill_valid = 1; fill_addr = line_addr_t'(line); fill_data = pack(line);
        #1;
        v = -1;
        if (res_line[set].size() == WAYS) begin
          oldest = 1 << 30;
          for (int j = 0; j < WAYS; j++) if (res_use[set][j] < oldest) begin oldest = res_use[set][j]; v = j; end
          check(evict_valid == res_dirty[set][v], "dirty victim reported");
          if (res_dirty[set][v]) begin
            n_evict++;
            check(evict_addr == line_addr_t'(res_line[set][v]), $sformatf("LRU victim %0d got %0d", res_line[set][v], evict_addr));
            for (int w = 0; w < 16; w++) begin
              check(evict_data[w*32 +: 32] == arch[res_line[set][v]][w], "copy-back data");
              bmem[res_line[set][v]][w] = evict_data[w*32 +: 32];
            end
          end
        end else check(!evict_valid, "no victim while a way is free");
        @(posedge clk);
        if (v >= 0) begin res_line[set].delete(v); res_use[set].delete(v); res_dirty[set].delete(v); end
        res_line[set].push_back(line); res_use[set].push_back(int'(now) - 1); res_dirty[set].push_back(0);
        @(negedge clk); fill_valid = 0;
        // probe every resident line of the set without committing
        foreach (res_line[set][j]) begin
          lk_addr = addr_t'(res_line[set][j] * 64); #1;
          check(lk_hit, "resident line still present");
          @(negedge clk);
        end
      end
    end
    check(n_evict > 100 && n_hit > 1000, $sformatf("coverage evict=%0d hit=%0d miss=%0d", n_evict, n_hit, n_miss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
