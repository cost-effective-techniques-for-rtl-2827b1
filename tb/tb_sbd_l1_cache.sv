// tb_sbd_l1_cache: random reads, write-through stores and fills on a
// 4-set, 4-way cache with a random fault map, compared every cycle with a
// behavioural model of the same cache (LRU, false hits, relocation of a
// line to another way on refill, stores skipping disabled subblocks,
// flush and set remapping).
module tb_sbd_l1_cache;
  import ipatch_pkg::*;
  localparam int S = 4, W = 4;
  int checks = 0, failures = 0;
  int n_hit = 0, n_fh = 0, n_reloc = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, fm_we, rd, wr, fill;
  logic [1:0] remap, fm_set, fm_way, fill_way;
  fault_t fm_bits, rfault, ffault;
  waddr_t raddr, waddr;
  word_t rdata, wdata;
  laddr_t flad;
  line_t fdata;
  logic hit, fh;

  sbd_l1_cache #(.SETS(S), .WAYS(W)) dut (
    .clk(clk), .rst_n(rst_n), .flush_i(flush), .remap_i(remap),
    .fm_we_i(fm_we), .fm_set_i(fm_set), .fm_way_i(fm_way), .fm_bits_i(fm_bits),
    .rd_i(rd), .rd_addr_i(raddr), .hit_o(hit), .false_hit_o(fh), .rd_data_o(rdata), .rd_fault_o(rfault),
    .wr_i(wr), .wr_addr_i(waddr), .wr_data_i(wdata),
    .fill_i(fill), .fill_laddr_i(flad), .fill_data_i(fdata), .fill_way_o(fill_way), .fill_fault_o(ffault));

  // model
  bit     mv [S][W];
  laddr_t mt [S][W];
  int     ma [S][W];
  fault_t mf [S][W];
  line_t  md [S][W];

  function automatic int mset(input laddr_t l);
    return int'(l[1:0] ^ remap);
  endfunction
  function automatic int mfind(input laddr_t l);
    for (int w = 0; w < W; w++) if (mv[mset(l)][w] && mt[mset(l)][w] == l) return w;
    return -1;
  endfunction
  function automatic void mtouch(input int s, input int w);
    for (int i = 0; i < W; i++) if (ma[s][i] < ma[s][w]) ma[s][i]++;
    ma[s][w] = 0;
  endfunction
  function automatic int mvictim(input laddr_t l);
    int s, old;
    s = mset(l);
    old = mfind(l);
    for (int w = 0; w < W; w++) if (!mv[s][w] && w != old) return w;
    for (int w = 0; w < W; w++) if (ma[s][w] == W - 1 && w != old) return w;
    for (int w = 0; w < W; w++) if (ma[s][w] == W - 2) return w;
    return 0;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; fm_we = 0; rd = 0; wr = 0; fill = 0; remap = 0;
    raddr = '0; waddr = '0; wdata = '0; flad = '0; fdata = '0; fm_set = 0; fm_way = 0; fm_bits = 0;
    for (int s = 0; s < S; s++) for (int w = 0; w < W; w++) begin mv[s][w] = 0; ma[s][w] = w; mf[s][w] = 0; mt[s][w] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fault map: about a third of the subblocks disabled
    for (int s = 0; s < S; s++) for (int w = 0; w < W; w++) begin
      @(negedge clk);
      fm_we = 1; fm_set = 2'(s); fm_way = 2'(w);
      fm_bits = 8'($urandom) & 8'($urandom);
      mf[s][w] = fm_bits;
    end
    @(negedge clk); fm_we = 0;
    for (int t = 0; t < 6000; t++) begin
      int kind, s, w, ev;
      laddr_t l;
      @(negedge clk);
      rd = 0; wr = 0; fill = 0; flush = 0;
      l = laddr_t'($urandom_range(0, 11));
      kind = $urandom_range(0, 9);
      if (t % 1500 == 1499) begin
        flush = 1;
      end else if (kind < 5) begin
        rd = 1; raddr = {l, 3'($urandom)};
        #1;
        w = mfind(l); s = mset(l);
        chk(hit == (w >= 0 && !mf[s][w < 0 ? 0 : w][raddr[2:0]]), "hit");
        chk(fh  == (w >= 0 &&  mf[s][w < 0 ? 0 : w][raddr[2:0]]), "false hit");
        if (w >= 0) begin
          chk(rfault == mf[s][w], "fault pattern");
          if (hit) chk(rdata == md[s][w][64*raddr[2:0] +: 64], "read data");
          mtouch(s, w);
          if (hit) n_hit++; else n_fh++;
        end
      end else if (kind < 7) begin
        wr = 1; waddr = {l, 3'($urandom)}; wdata = {$urandom, $urandom};
        w = mfind(l); s = mset(l);
        if (w >= 0 && !mf[s][w][waddr[2:0]]) md[s][w][64*waddr[2:0] +: 64] = wdata;
      end else begin
        fill = 1; flad = l;
        for (int i = 0; i < 16; i++) fdata[32*i +: 32] = $urandom;
        #1;
        s = mset(l); ev = mvictim(l); w = mfind(l);
        chk(int'(fill_way) == ev, "fill way");
        chk(ffault == mf[s][ev], "fill fault");
        if (w >= 0) begin mv[s][w] = 0; n_reloc++; end
        mv[s][ev] = 1; mt[s][ev] = l; md[s][ev] = fdata; mtouch(s, ev);
      end
      @(posedge clk);
      if (flush) begin
        for (int a = 0; a < S; a++) for (int b = 0; b < W; b++) mv[a][b] = 0;
        #1;
        @(negedge clk); flush = 0; remap = remap + 1;
      end
    end
    chk(n_hit > 100 && n_fh > 50 && n_reloc > 50, $sformatf("coverage hit=%0d fh=%0d reloc=%0d", n_hit, n_fh, n_reloc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
