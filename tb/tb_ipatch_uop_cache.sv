// tb_ipatch_uop_cache: a 4-set, 4-way cache is driven with random lookups
// and fills (a small address pool so sets fill and conflict), random
// patch flags, thresholds and occasional flushes, and compared every cycle
// with a behavioural model: hit and data, patch flag, the victim choice
// (free way, else LRU among non-patch entries while the set's patch count
// is under the threshold, else plain LRU) and the evicted-patch flag.
// A directed part then shows patches protected while a set holds fewer
// than the threshold and aging out at threshold 0.
module tb_ipatch_uop_cache;
  import ipatch_pkg::*;
  localparam int S = 4, W = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] thr;
  logic flush, lk, lhit, lpatch, fill, fpatch, fevp;
  waddr_t la, fa;
  logic [127:0] luops, fuops;
  logic [2:0] fsp;

  ipatch_uop_cache #(.SETS(S), .WAYS(W)) dut (.clk(clk), .rst_n(rst_n), .patch_threshold_i(thr),
    .flush_i(flush), .lk_i(lk), .lk_addr_i(la), .lk_hit_o(lhit), .lk_uops_o(luops), .lk_patch_o(lpatch),
    .fill_i(fill), .fill_addr_i(fa), .fill_uops_i(fuops), .fill_patch_i(fpatch),
    .fill_evict_patch_o(fevp), .fill_set_patches_o(fsp));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // model
  bit          mv [S][W];
  bit          mp [S][W];
  waddr_t      mt [S][W];
  int          ma [S][W];
  logic [127:0] mu [S][W];

  function automatic void mtouch(int s, int w);
    for (int i = 0; i < W; i++) if (ma[s][i] < ma[s][w]) ma[s][i]++;
    ma[s][w] = 0;
  endfunction

  function automatic int mvictim(int s, waddr_t a, int t, output bit evp);
    int v = -1, np = 0;
    for (int w = 0; w < W; w++) if (mv[s][w] && mt[s][w] == a) v = w;
    if (v >= 0) begin evp = 0; return v; end
    for (int w = 0; w < W; w++) if (mv[s][w] && mp[s][w]) np++;
    for (int w = W - 1; w >= 0; w--) if (!mv[s][w]) v = w;
    if (v < 0 && np < t)
      for (int w = 0; w < W; w++) if (!mp[s][w] && (v < 0 || ma[s][w] > ma[s][v])) v = w;
    if (v < 0)
      for (int w = 0; w < W; w++) if (v < 0 || ma[s][w] > ma[s][v]) v = w;
    evp = mv[s][v] && mp[s][v];
    return v;
  endfunction

  function automatic int set_patches(int s);
    int n = 0;
    for (int w = 0; w < W; w++) if (mv[s][w] && mp[s][w]) n++;
    return n;
  endfunction

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_fill(input waddr_t a, input bit p);
    @(negedge clk);
    lk = 0; flush = 0; fill = 1; fa = a; fpatch = p; fuops = {$urandom(), $urandom(), $urandom(), $urandom()};
    #1 begin
      bit evp; int s, v;
      s = int'(a) % S;
      v = mvictim(s, a, int'(thr), evp);
      chk(fevp == evp, "directed evict-patch flag");
      mv[s][v] = 1; mp[s][v] = p; mt[s][v] = a; mu[s][v] = fuops; mtouch(s, v);
    end
    @(negedge clk); fill = 0;
  endtask

  initial begin
    for (int s = 0; s < S; s++) for (int w = 0; w < W; w++) begin mv[s][w] = 0; mp[s][w] = 0; mt[s][w] = '0; ma[s][w] = w; mu[s][w] = '0; end
    thr = 0; flush = 0; lk = 0; fill = 0; fpatch = 0; la = '0; fa = '0; fuops = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      thr = 3'($urandom_range(0, W));
      flush = ($urandom_range(0, 999) == 0);
      lk = $urandom_range(0, 1);
      fill = $urandom_range(0, 1);
      la = waddr_t'($urandom_range(0, 23));
      fa = waddr_t'($urandom_range(0, 23));
      fpatch = ($urandom_range(0, 2) == 0);
      fuops = {$urandom(), $urandom(), $urandom(), $urandom()};
      #1;
      begin
        int ls, fs, hw, v; bit evp;
        ls = int'(la) % S; fs = int'(fa) % S;
        hw = -1;
        if (lk) for (int w = 0; w < W; w++) if (mv[ls][w] && mt[ls][w] == la) hw = w;
        chk(lhit == (hw >= 0), "hit");
        if (hw >= 0) chk(luops == mu[ls][hw] && lpatch == mp[ls][hw], "hit data/patch");
        chk(int'(fsp) == set_patches(fs), "set patch count");
        v = mvictim(fs, fa, int'(thr), evp);
        chk(fevp == (fill && evp), "evict-patch flag");
        if (flush) begin
          for (int s = 0; s < S; s++) for (int w = 0; w < W; w++) mv[s][w] = 0;
        end else if (fill) begin
          mv[fs][v] = 1; mp[fs][v] = fpatch; mt[fs][v] = fa; mu[fs][v] = fuops; mtouch(fs, v);
        end else if (hw >= 0) mtouch(ls, hw);
      end
    end
    // directed: while a set holds fewer patches than the threshold, patches
    // survive any number of non-patch fills; at threshold 0 they age out.
    @(negedge clk); lk = 0; fill = 0; flush = 1;
    @(negedge clk); flush = 0;
    for (int s = 0; s < S; s++) for (int w = 0; w < W; w++) mv[s][w] = 0;
    thr = 3'd3;
    do_fill(waddr_t'(1), 1); do_fill(waddr_t'(5), 1);
    for (int i = 0; i < 8; i++) do_fill(waddr_t'(9 + 4 * i), 0);
    @(negedge clk); fa = waddr_t'(1); #1 chk(fsp == 3'd2, "patches protected below threshold");
    thr = 3'd2;
    for (int i = 0; i < 4; i++) do_fill(waddr_t'(41 + 4 * i), 0);
    @(negedge clk); fa = waddr_t'(1); #1 chk(fsp == 3'd1, "at threshold a patch is replaced by LRU");
    for (int i = 0; i < 8; i++) do_fill(waddr_t'(57 + 4 * i), 0);
    @(negedge clk); fa = waddr_t'(1); #1 chk(fsp == 3'd1, "below threshold again, protected");
    thr = 3'd0;
    for (int i = 0; i < 4; i++) do_fill(waddr_t'(89 + 4 * i), 0);
    @(negedge clk); fa = waddr_t'(1); #1 chk(fsp == 3'd0, "threshold 0 plain LRU");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
