// tb_ipatch_store_queue: directed checks on a 6-entry queue: forwarding
// from the youngest older store and never from a younger one, completed
// stores kept and still forwarding, patch insertion (blocked while a store
// uses the write port, and marking an existing completed copy), patch
// inheritance on completion, the four-class eviction order with the
// reference-bit reset, "full" when only pending stores remain, and
// coherence invalidation.
module tb_ipatch_store_queue;
  import ipatch_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sta, stfull, stc, piv, pir, ld, lhit, lpatch, inv, evict;
  waddr_t sta_addr, pia, lda;
  word_t sta_data, pid, ldd;
  logic [7:0] sta_col, stc_col, ld_col;
  laddr_t inv_l;
  logic [5:0] patch, comp;

  ipatch_store_queue #(.N(6)) dut (
    .clk(clk), .rst_n(rst_n),
    .st_alloc_i(sta), .st_addr_i(sta_addr), .st_data_i(sta_data), .st_color_i(sta_col), .st_full_o(stfull),
    .st_complete_i(stc), .st_complete_color_i(stc_col),
    .pi_valid_i(piv), .pi_addr_i(pia), .pi_data_i(pid), .pi_ready_o(pir),
    .ld_i(ld), .ld_addr_i(lda), .ld_color_i(ld_col), .ld_hit_o(lhit), .ld_data_o(ldd), .ld_patch_o(lpatch),
    .inv_i(inv), .inv_laddr_i(inv_l), .patch_o(patch), .completed_o(comp), .evict_o(evict));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic store(input int a, input int col, output bit full);
    @(negedge clk);
    sta = 1; sta_addr = waddr_t'(a); sta_data = word_t'(a * 1000 + col); sta_col = 8'(col);
    #1 full = stfull;
    @(negedge clk); sta = 0;
  endtask
  task automatic complete(input int col);
    @(negedge clk); stc = 1; stc_col = 8'(col);
    @(negedge clk); stc = 0;
  endtask
  task automatic patch_in(input int a, input word_t d);
    @(negedge clk); piv = 1; pia = waddr_t'(a); pid = d;
    @(negedge clk); piv = 0;
  endtask
  task automatic load(input int a, input int col, output bit h, output word_t d, output bit p);
    @(negedge clk); ld = 1; lda = waddr_t'(a); ld_col = 8'(col);
    #1 h = lhit; d = ldd; p = lpatch;
    @(negedge clk); ld = 0;
  endtask

  function automatic int count(input logic [5:0] v);
    return $countones(v);
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit f, h, p;
    word_t d;
    sta = 0; stc = 0; piv = 0; ld = 0; inv = 0;
    sta_addr = '0; sta_data = '0; sta_col = 0; stc_col = 0; pia = '0; pid = '0; lda = '0; ld_col = 0; inv_l = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // two stores to word 16 with colours 1 and 3
    store(16, 1, f); store(16, 3, f);
    load(16, 2, h, d, p); chk(h && d == word_t'(16 * 1000 + 1), "forward older store only");
    load(16, 5, h, d, p); chk(h && d == word_t'(16 * 1000 + 3), "forward youngest older store");
    load(16, 0, h, d, p); chk(!h, "no forward from younger store");
    // completion keeps entries; second completion removes the first copy
    complete(1);
    chk(count(comp) == 1, "completed kept");
    complete(3);
    chk(count(comp) == 1, "older completed copy removed");
    load(16, 0, h, d, p); chk(h && d == word_t'(16 * 1000 + 3) && !p, "completed forwards");
    // patch insertion is blocked while a store allocates
    @(negedge clk); piv = 1; sta = 1; pia = waddr_t'(40); pid = 64'hAB; sta_addr = waddr_t'(24); sta_col = 8'd4; sta_data = 64'd24004;
    #1 chk(!pir, "patch insert waits for write port");
    @(negedge clk); sta = 0;
    #1 chk(pir, "port free");
    @(negedge clk); piv = 0;
    load(40, 0, h, d, p); chk(h && p && d == 64'hAB, "patch entry forwards");
    // patch on an existing completed word marks it
    patch_in(16, 64'd16003);
    chk(count(patch) == 2, "existing completed entry became patch");
    // a new store to 16 inherits patch status on completion
    store(16, 6, f); complete(6);
    chk(count(patch) == 2 && count(comp) == 2, "inherit patch, old copy removed");
    load(16, 7, h, d, p); chk(h && p && d == word_t'(16 * 1000 + 6), "inherited patch forwards new data");
    // entries now: 40 patch (ref), 16 patch (ref), 24 pending. Fill up.
    complete(4);     // 24 completed non-patch, untouched
    store(50, 8, f); store(51, 9, f); store(52, 10, f);
    chk(!f && count(comp) == 3, "queue full of 3 pending + 3 completed");
    // next store evicts untouched non-patch (24)
    store(53, 11, f); chk(!f && evict, "evict");
    load(24, 12, h, d, p); chk(!h, "untouched non-patch evicted first");
    // both patches referenced: reset refs, evict a patch
    store(54, 12, f); chk(!f, "evict patch");
    chk(count(patch) == 1, "one patch evicted");
    // reference the remaining patch (refs were reset), then another store evicts it
    store(55, 13, f); chk(!f && count(patch) == 0, "last patch evicted");
    store(56, 14, f); chk(f, "full when only pending stores");
    // invalidate: complete 50 and invalidate its line
    complete(8);
    @(negedge clk); inv = 1; inv_l = line_of(waddr_t'(50));
    @(negedge clk); inv = 0;
    load(50, 20, h, d, p); chk(!h, "invalidated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
