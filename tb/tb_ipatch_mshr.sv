// tb_ipatch_mshr: directed sequence on 4 MSHRs: allocation, merge,
// subblock-by-subblock fills with lookups of partial lines, completion kept
// as a patch or freed, patch hits setting reference bits, replacement of a
// not-recently-used patch, reference-bit reset when all patches were used,
// refusal when every MSHR tracks a miss, and store invalidation.
module tb_ipatch_mshr;
  import ipatch_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc, ok, anew, aev, fill, dvalid, dready, keep, lk, lhit, lpatch, st;
  laddr_t alad, dlad;
  logic [1:0] aidx, fidx;
  logic [2:0] fsub;
  word_t fdata, ldata;
  line_t ddata;
  waddr_t laddr, saddr;
  logic [3:0] patch, busy;

  ipatch_mshr #(.N(4)) dut (
    .clk(clk), .rst_n(rst_n),
    .alloc_i(alloc), .alloc_laddr_i(alad), .alloc_ok_o(ok), .alloc_new_o(anew), .alloc_idx_o(aidx), .alloc_evict_o(aev),
    .fill_i(fill), .fill_idx_i(fidx), .fill_sub_i(fsub), .fill_data_i(fdata),
    .done_valid_o(dvalid), .done_laddr_o(dlad), .done_data_o(ddata), .done_ready_i(dready), .done_keep_i(keep),
    .lk_i(lk), .lk_addr_i(laddr), .lk_hit_o(lhit), .lk_data_o(ldata), .lk_patch_o(lpatch),
    .st_i(st), .st_addr_i(saddr), .patch_o(patch), .busy_o(busy));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic word_t pat(input laddr_t l, input int s);
    return {32'(l), 32'(s) ^ 32'hA5A5_0000};
  endfunction

  // allocate a line, return its index
  task automatic do_alloc(input laddr_t l, output int idx, output bit okv, output bit newv, output bit ev);
    @(negedge clk);
    alloc = 1; alad = l;
    #1;
    idx = int'(aidx); okv = ok; newv = anew; ev = aev;
    @(negedge clk);
    alloc = 0;
  endtask

  // return all subblocks of a line in a scrambled order, checking lookups
  task automatic do_fill(input laddr_t l, input int idx, input bit k);
    int order [8];
    for (int i = 0; i < 8; i++) order[i] = (i * 5 + 3) % 8;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      fill = 1; fidx = 2'(idx); fsub = 3'(order[i]); fdata = pat(l, order[i]);
      @(negedge clk);
      fill = 0;
      lk = 1; laddr = {l, 3'(order[i])};
      #1;
      chk(lhit && ldata == pat(l, order[i]) && !lpatch, "partial line served");
      if (i < 7) begin
        laddr = {l, 3'(order[i + 1])};
        #1;
        chk(!lhit, "missing subblock not served");
      end
      lk = 0;
    end
    #1;
    chk(dvalid && dlad == l, "line complete");
    chk(ddata[64*5 +: 64] == pat(l, 5), "line data");
    keep = k; dready = 1;
    @(negedge clk);
    dready = 0; keep = 0;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib, ic, id, ie, ig, i2;
    bit o, n, e;
    alloc = 0; fill = 0; dready = 0; keep = 0; lk = 0; st = 0;
    alad = '0; fidx = 0; fsub = 0; fdata = '0; laddr = '0; saddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    do_alloc(laddr_t'(100), ia, o, n, e); chk(o && n && !e, "alloc A");
    do_alloc(laddr_t'(100), i2, o, n, e); chk(o && !n && i2 == ia, "merge A");
    do_fill(laddr_t'(100), ia, 1);
    chk(patch[ia] && !busy[ia], "A kept as patch");
    do_alloc(laddr_t'(200), ib, o, n, e); chk(o && n && ib != ia, "alloc B");
    do_fill(laddr_t'(200), ib, 1);
    do_alloc(laddr_t'(300), ic, o, n, e); chk(o && n, "alloc C");
    do_fill(laddr_t'(300), ic, 0);
    chk(!patch[ic] && !busy[ic], "C freed (no disabled subblocks)");
    do_alloc(laddr_t'(300), ic, o, n, e);
    do_alloc(laddr_t'(400), id, o, n, e); chk(o && n && !e, "alloc D");
    // A referenced
    @(negedge clk); lk = 1; laddr = {laddr_t'(100), 3'd2}; #1;
    chk(lhit && lpatch && ldata == pat(laddr_t'(100), 2), "patch hit A");
    @(negedge clk); lk = 0;
    // E replaces the unreferenced patch B
    do_alloc(laddr_t'(500), ie, o, n, e); chk(o && n && e && ie == ib, "E overwrites NRU patch B");
    // G: only patch left is A (referenced) -> reset and take A
    do_alloc(laddr_t'(600), ig, o, n, e); chk(o && n && e && ig == ia, "G overwrites A after reset");
    // all busy
    do_alloc(laddr_t'(700), i2, o, n, e); chk(!o && !n, "refused when all busy");
    // store invalidation of a patch
    do_fill(laddr_t'(600), ig, 1);
    @(negedge clk); st = 1; saddr = {laddr_t'(600), 3'd1};
    @(negedge clk); st = 0; lk = 1; laddr = {laddr_t'(600), 3'd1}; #1;
    chk(!lhit && !patch[ig], "store invalidated patch");
    lk = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
