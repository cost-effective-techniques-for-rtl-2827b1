// tb_reliability_top: end-to-end test of reliability_top at its default
// (full) size, with no parameter overrides.
//
// The bench plays the core, the L2, the decoder and DRAM around the top:
//  - L2: answers every D/I miss request after a short random delay with
//    the eight words of the line, one per cycle, from a memory model that
//    also takes completed stores.
//  - fault maps: every way of the L1D has subblock 2 disabled and every
//    way of the L1I subblock 3, so every filled line needs patching.
//  - data side: a directed sequence produces a miss and fill, a load
//    served by a store-queue patch, a load served by an MSHR patch after
//    the queue's copy is invalidated, store forwarding (pending and
//    completed), a store that kills an MSHR patch, an unpatched false hit,
//    MSHR-patch replacement and store-queue eviction. Every returned load
//    value is checked against the memory model.
//  - front end: a fetch patched by the I-MSHR, a micro-op cache patch hit,
//    I-MSHR patch replacement and an unpatched fetch false hit.
//  - COP: blocks of every kind are written back and read through the
//    decoder with 0, 1 and 2 flipped bits; an alias block is refused; the
//    LLC victim choice skips aliases and reports overflow.
//  - COP-ER: incompressible blocks get ECC entries in a DRAM model; reads
//    recover the pointer, fetch the entry and rebuild (and correct) the
//    block; allocation continues until a tree walk happens.
//  - remap: enabled throughout; the run lasts past the 500,000-cycle
//    period and the flush is observed.
// Each mechanism is counted and must occur at least once.
module tb_reliability_top;
  import ipatch_pkg::*;
  import cop_pkg::*;
  import coper_pkg::*;
  import tb_ref_pkg::*;

  localparam int F  = 501;
  localparam int G3 = 1 + F;
  localparam int G2 = 1 + F * G3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- DUT signals ----------------
  logic remap_en, remap_flush;
  logic dfm_we, ifm_we;
  logic [5:0] fm_set; logic [2:0] fm_way; fault_t fm_bits;
  logic ld, ld_done, ld_fh, ld_patched, ld_retry;
  waddr_t ld_addr; logic [7:0] ld_color; word_t ld_data; logic [1:0] ld_src;
  logic st_alloc, st_full, st_complete, st_complete_ready;
  waddr_t st_addr, st_complete_addr; word_t st_data, st_complete_data;
  logic [7:0] st_color, st_complete_color;
  logic inv; laddr_t inv_laddr;
  logic dl2_req; laddr_t dl2_laddr; logic [3:0] dl2_idx;
  logic dl2_fill; logic [3:0] dl2_fill_idx; logic [2:0] dl2_fill_sub; word_t dl2_fill_data;
  logic [9:0] dmshr_patch; logic [35:0] sq_patch; logic sq_evict, dmshr_evict;
  logic [3:0] thr;
  logic fetch, uops_valid, inst_valid, inst_fault, fetch_patched, fetch_fh, fetch_retry;
  waddr_t fetch_addr; logic [127:0] uops; word_t inst; logic [1:0] fetch_src;
  logic dec_fill, dec_fill_patch, uc_evict_patch; waddr_t dec_fill_addr; logic [127:0] dec_fill_uops;
  logic il2_req; laddr_t il2_laddr; logic [1:0] il2_idx;
  logic il2_fill; logic [1:0] il2_fill_idx; logic [2:0] il2_fill_sub; word_t il2_fill_data;
  logic [3:0] imshr_patch;
  block_t wb_blk, wb_out; logic wb_comp, wb_alias; scheme_e wb_scheme;
  logic rd_valid, rd_valid_o, rd_comp, rd_corr, rd_unc; block_t rd_blk, rd_out;
  logic [15:0] llc_valid, llc_alias; logic [15:0][3:0] llc_age; logic [3:0] llc_victim; logic llc_ok, llc_over;
  logic er_req, er_ack, er_full, er_err, er_walked; logic [1:0] er_op; ptr_t er_ptr_in;
  block_t er_stored, er_rd_blk; ptr_t er_rd_ptr; logic er_rd_ptr_err, er_rd_corr, er_rd_unc; entry_t er_entry;
  logic er_mreq, er_mwe, er_mready, er_mrvalid; logic [31:0] er_maddr; logic [511:0] er_mwdata, er_mrdata;

  reliability_top dut (
    .clk(clk), .rst_n(rst_n), .remap_en_i(remap_en), .remap_flush_o(remap_flush),
    .dfm_we_i(dfm_we), .ifm_we_i(ifm_we), .fm_set_i(fm_set), .fm_way_i(fm_way), .fm_bits_i(fm_bits),
    .ld_i(ld), .ld_addr_i(ld_addr), .ld_color_i(ld_color), .ld_done_o(ld_done), .ld_data_o(ld_data),
    .ld_src_o(ld_src), .ld_false_hit_o(ld_fh), .ld_patched_o(ld_patched), .ld_retry_o(ld_retry),
    .st_alloc_i(st_alloc), .st_addr_i(st_addr), .st_data_i(st_data), .st_color_i(st_color), .st_full_o(st_full),
    .st_complete_i(st_complete), .st_complete_color_i(st_complete_color), .st_complete_addr_i(st_complete_addr),
    .st_complete_data_i(st_complete_data), .st_complete_ready_o(st_complete_ready),
    .inv_i(inv), .inv_laddr_i(inv_laddr),
    .dl2_req_o(dl2_req), .dl2_laddr_o(dl2_laddr), .dl2_idx_o(dl2_idx),
    .dl2_fill_i(dl2_fill), .dl2_fill_idx_i(dl2_fill_idx), .dl2_fill_sub_i(dl2_fill_sub), .dl2_fill_data_i(dl2_fill_data),
    .dmshr_patch_o(dmshr_patch), .sq_patch_o(sq_patch), .sq_evict_o(sq_evict), .dmshr_evict_o(dmshr_evict),
    .patch_threshold_i(thr), .fetch_i(fetch), .fetch_addr_i(fetch_addr), .uops_valid_o(uops_valid), .uops_o(uops),
    .inst_valid_o(inst_valid), .inst_o(inst), .inst_fault_o(inst_fault), .fetch_src_o(fetch_src),
    .fetch_patched_o(fetch_patched), .fetch_false_hit_o(fetch_fh), .fetch_retry_o(fetch_retry),
    .dec_fill_i(dec_fill), .dec_fill_addr_i(dec_fill_addr), .dec_fill_uops_i(dec_fill_uops), .dec_fill_patch_i(dec_fill_patch),
    .uc_evict_patch_o(uc_evict_patch),
    .il2_req_o(il2_req), .il2_laddr_o(il2_laddr), .il2_idx_o(il2_idx),
    .il2_fill_i(il2_fill), .il2_fill_idx_i(il2_fill_idx), .il2_fill_sub_i(il2_fill_sub), .il2_fill_data_i(il2_fill_data),
    .imshr_patch_o(imshr_patch),
    .cop_wb_blk_i(wb_blk), .cop_wb_blk_o(wb_out), .cop_wb_compressed_o(wb_comp), .cop_wb_scheme_o(wb_scheme),
    .cop_wb_alias_o(wb_alias),
    .cop_rd_valid_i(rd_valid), .cop_rd_blk_i(rd_blk), .cop_rd_valid_o(rd_valid_o), .cop_rd_blk_o(rd_out),
    .cop_rd_compressed_o(rd_comp), .cop_rd_corrected_o(rd_corr), .cop_rd_uncorrectable_o(rd_unc),
    .llc_valid_i(llc_valid), .llc_alias_i(llc_alias), .llc_age_i(llc_age), .llc_victim_o(llc_victim),
    .llc_victim_ok_o(llc_ok), .llc_overflow_o(llc_over),
    .er_req_i(er_req), .er_op_i(er_op), .er_ptr_i(er_ptr_in), .er_ack_o(er_ack), .er_full_o(er_full),
    .er_err_o(er_err), .er_walked_o(er_walked), .er_wb_stored_o(er_stored), .er_rd_ptr_o(er_rd_ptr),
    .er_rd_ptr_err_o(er_rd_ptr_err), .er_rd_entry_i(er_entry), .er_rd_blk_o(er_rd_blk),
    .er_rd_corrected_o(er_rd_corr), .er_rd_uncorrectable_o(er_rd_unc),
    .er_mem_req_o(er_mreq), .er_mem_we_o(er_mwe), .er_mem_addr_o(er_maddr), .er_mem_wdata_o(er_mwdata),
    .er_mem_ready_i(er_mready), .er_mem_rvalid_i(er_mrvalid), .er_mem_rdata_i(er_mrdata));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @cycle %0d", what, cycle); end
  endtask

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_DMISS, M_L1HIT, M_SQ_PATCH, M_MSHR_PATCH, M_FALSE_HIT, M_SQ_FWD, M_MSHR_EVICT, M_SQ_EVICT,
    M_SQ_PATCH_INS, M_MSHR_KEEP, M_IMISS, M_FETCH_MSHR_PATCH, M_UOP_PATCH, M_FETCH_FALSE_HIT,
    M_UOP_EVICT_PATCH, M_COP_TXT, M_COP_MSB, M_COP_RLE, M_COP_RAW, M_COP_ALIAS, M_COP_CORR,
    M_COP_UNC, M_LLC_SKIP_ALIAS, M_LLC_OVERFLOW, M_ER_ALLOC, M_ER_REBUILD, M_ER_CORR, M_ER_FREE,
    M_ER_WALK, M_REMAP, M_NUM
  } mech_e;
  int mcount[M_NUM];

  always @(posedge clk) if (rst_n) begin
    if (dl2_req) mcount[M_DMISS]++;
    if (il2_req) mcount[M_IMISS]++;
    if (dmshr_evict) mcount[M_MSHR_EVICT]++;
    if (sq_evict) mcount[M_SQ_EVICT]++;
    if (dut.pi_valid && dut.pi_ready) mcount[M_SQ_PATCH_INS]++;
    if (remap_flush) mcount[M_REMAP]++;
    if (dec_fill && uc_evict_patch) mcount[M_UOP_EVICT_PATCH]++;
  end

  // ---------------- memory model (word granularity) ----------------
  word_t mem [waddr_t];
  function automatic word_t mem_rd(input waddr_t a);
    if (mem.exists(a)) return mem[a];
    return {~a[31:0], a[31:0] ^ 32'h5A5A_0F0F};
  endfunction

  // ---------------- L2 models ----------------
  typedef struct { laddr_t l; int idx; } req_t;
  req_t dq[$], iq[$];
  always @(posedge clk) if (rst_n) begin
    if (dl2_req) dq.push_back('{dl2_laddr, int'(dl2_idx)});
    if (il2_req) iq.push_back('{il2_laddr, int'(il2_idx)});
  end
  initial begin
    dl2_fill = 0; dl2_fill_idx = '0; dl2_fill_sub = '0; dl2_fill_data = '0;
    forever begin
      req_t r;
      @(negedge clk);
      if (dq.size() != 0) begin
        r = dq.pop_front();
        repeat ($urandom_range(2, 6)) @(negedge clk);
        for (int s = 0; s < NSUB; s++) begin
          dl2_fill = 1; dl2_fill_idx = 4'(r.idx); dl2_fill_sub = SUB_W'(s);
          dl2_fill_data = mem_rd({r.l, SUB_W'(s)});
          @(negedge clk);
        end
        dl2_fill = 0;
      end
    end
  end
  function automatic word_t imem(input waddr_t a);
    return {a[31:0], ~a[31:0]};
  endfunction
  initial begin
    il2_fill = 0; il2_fill_idx = '0; il2_fill_sub = '0; il2_fill_data = '0;
    forever begin
      req_t r;
      @(negedge clk);
      if (iq.size() != 0) begin
        r = iq.pop_front();
        repeat ($urandom_range(2, 6)) @(negedge clk);
        for (int s = 0; s < NSUB; s++) begin
          il2_fill = 1; il2_fill_idx = 2'(r.idx); il2_fill_sub = SUB_W'(s);
          il2_fill_data = imem({r.l, SUB_W'(s)});
          @(negedge clk);
        end
        il2_fill = 0;
      end
    end
  end

  // ---------------- COP-ER DRAM model ----------------
  logic [511:0] emem [int];
  int rd_pend;
  logic rd_go;
  initial begin rd_go = 0; rd_pend = 0; end
  always @(posedge clk) begin
    er_mrvalid <= 1'b0;
    if (rd_go) begin
      er_mrvalid <= 1'b1;
      er_mrdata  <= emem.exists(rd_pend) ? emem[rd_pend] : '0;
      rd_go      <= 1'b0;
    end
    if (er_mreq && er_mready) begin
      if (er_mwe) emem[int'(er_maddr)] = er_mwdata;
      else begin rd_pend <= int'(er_maddr); rd_go <= 1'b1; end
    end
  end
  assign er_mready = 1'b1;

  function automatic entry_t entry_of(input ptr_t p);
    int b, j, k, m, a;
    b = int'(p.blknum);
    j = b / (F * F); k = (b / F) % F; m = b % F;
    a = 3 + j * G2 + k * G3 + m;
    if (!emem.exists(a)) return '0;
    return entry_t'(emem[a][ENTRY_W*int'(p.slot) +: ENTRY_W]);
  endfunction

  // ---------------- data-side helpers ----------------
  int color = 1;
  // load a word, retrying until it completes; returns the first attempt's flags
  task automatic load(input waddr_t a, output logic [1:0] src, output bit patched, output bit fhit);
    bit first = 1;
    src = 2'd3; patched = 0; fhit = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      ld = 1; ld_addr = a; ld_color = 8'(color);
      #1;
      if (first) begin patched = ld_patched; fhit = ld_fh; first = 0; end
      if (ld_done) begin
        src = ld_src;
        chk(ld_data == mem_rd(a), $sformatf("load data %0h src %0d", a, ld_src));
        if (ld_src == 2'd2) mcount[M_L1HIT]++;
        @(negedge clk); ld = 0;
        return;
      end
      @(negedge clk); ld = 0;
      repeat (2) @(negedge clk);
    end
    chk(0, "load never completed");
  endtask

  task automatic store(input waddr_t a, input word_t d);
    int c;
    @(negedge clk);
    while (st_full) @(negedge clk);
    c = color++;
    st_alloc = 1; st_addr = a; st_data = d; st_color = 8'(c);
    @(negedge clk); st_alloc = 0;
    // a load younger than the pending store must see it
    ld = 1; ld_addr = a; ld_color = 8'(color);
    #1;
    chk(ld_done && ld_src == 2'd0 && ld_data == d, "pending store forwarded");
    if (ld_done && ld_src == 2'd0) mcount[M_SQ_FWD]++;
    @(negedge clk); ld = 0;
    st_complete = 1; st_complete_color = 8'(c); st_complete_addr = a; st_complete_data = d;
    mem[a] = d;
    @(negedge clk); st_complete = 0;
  endtask

  task automatic wait_idle_d();
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (dq.size() == 0 && !dl2_fill && dut.dm_busy == '0 && !dut.pi_valid) return;
    end
    chk(0, "data side idle");
  endtask

  // ---------------- front-end helpers ----------------
  task automatic do_fetch(input waddr_t a, output logic [1:0] src, output bit patched, output bit fhit,
                          output bit flt);
    bit first = 1;
    src = 2'd3; patched = 0; fhit = 0; flt = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      fetch = 1; fetch_addr = a;
      #1;
      if (first) begin patched = fetch_patched; fhit = fetch_fh; first = 0; end
      if (uops_valid || inst_valid) begin
        src = fetch_src; flt = inst_fault;
        if (inst_valid) chk(inst == imem(a), "fetched word");
        else chk(uops == {2{imem(a)}}, "micro-ops");
        @(negedge clk); fetch = 0;
        return;
      end
      @(negedge clk); fetch = 0;
      repeat (2) @(negedge clk);
    end
    chk(0, "fetch never completed");
  endtask

  task automatic wait_idle_i();
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (iq.size() == 0 && !il2_fill && dut.im_busy == '0) return;
    end
    chk(0, "front end idle");
  endtask

  // ---------------- COP helpers ----------------
  task automatic cop_read(input block_t b, output block_t o, output bit comp, output bit corr, output bit unc);
    @(negedge clk);
    rd_valid = 1; rd_blk = b;
    @(negedge clk);
    rd_valid = 0;
    for (int t = 0; t < 10; t++) begin
      if (rd_valid_o) break;
      @(negedge clk);
    end
    #1;
    chk(rd_valid_o, "decoder output valid");
    o = rd_out; comp = rd_comp; corr = rd_corr; unc = rd_unc;
  endtask

  task automatic er_cmd(input logic [1:0] op, input ptr_t p, output ptr_t got, output bit walked);
    @(negedge clk);
    er_req = 1; er_op = op; er_ptr_in = p;
    for (int t = 0; t < 200; t++) begin
      #1;
      if (er_ack) begin
        got = dut.er_ptr; walked = er_walked;
        @(negedge clk); er_req = 0;
        return;
      end
      @(negedge clk);
    end
    chk(0, "allocator ack");
    er_req = 0;
  endtask

  initial begin
    #200ms;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] src; bit patched, fhit, flt;
    laddr_t L0;
    remap_en = 0; dfm_we = 0; ifm_we = 0; fm_set = '0; fm_way = '0; fm_bits = '0;
    ld = 0; ld_addr = '0; ld_color = '0; st_alloc = 0; st_addr = '0; st_data = '0; st_color = '0;
    st_complete = 0; st_complete_color = '0; st_complete_addr = '0; st_complete_data = '0;
    inv = 0; inv_laddr = '0; thr = 4'd2; fetch = 0; fetch_addr = '0;
    dec_fill = 0; dec_fill_addr = '0; dec_fill_uops = '0; dec_fill_patch = 0;
    wb_blk = '0; rd_valid = 0; rd_blk = '0; llc_valid = '0; llc_alias = '0; llc_age = '0;
    er_req = 0; er_op = '0; er_ptr_in = '0; er_entry = '0; er_mrdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    remap_en = 1;

    // fault maps
    for (int s = 0; s < 64; s++)
      for (int w = 0; w < 8; w++) begin
        // L1D: subblock 2 of every way; L1I: subblock 3
        @(negedge clk);
        dfm_we = 1; ifm_we = 0; fm_set = 6'(s); fm_way = 3'(w); fm_bits = 8'b0000_0100;
        @(negedge clk);
        dfm_we = 0; ifm_we = 1; fm_bits = 8'b0000_1000;
      end
    @(negedge clk); dfm_we = 0; ifm_we = 0;

    // ================= data side =================
    L0 = laddr_t'(34'h1_2345);
    load({L0, 3'd2}, src, patched, fhit);             // miss, fill, then served
    wait_idle_d();
    chk(dmshr_patch != '0, "MSHR kept the line as a patch");
    if (dmshr_patch != '0) mcount[M_MSHR_KEEP]++;
    chk(sq_patch != '0, "disabled segment copied into the store queue");
    load({L0, 3'd2}, src, patched, fhit);
    chk(src == 2'd0 && patched, "false hit patched by the store queue");
    if (src == 2'd0 && patched) mcount[M_SQ_PATCH]++;
    load({L0, 3'd5}, src, patched, fhit);
    chk(src == 2'd1, "MSHR before L1");
    // drop the queue's copy: the MSHR patch serves the faulty word
    @(negedge clk); inv = 1; inv_laddr = L0;
    @(negedge clk); inv = 0;
    load({L0, 3'd2}, src, patched, fhit);
    chk(src == 2'd1 && patched, "false hit patched by the MSHR");
    if (src == 2'd1 && patched) mcount[M_MSHR_PATCH]++;
    // a store to the line kills the MSHR patch; after invalidating the
    // queue again the faulty word is an unpatched false hit
    store({L0, 3'd0}, 64'hDEAD_BEEF_0000_0001);
    load({L0, 3'd0}, src, patched, fhit);
    chk(src == 2'd0, "completed store forwards");
    chk(dmshr_patch == '0, "store removed the MSHR patch");
    @(negedge clk); inv = 1; inv_laddr = L0;
    @(negedge clk); inv = 0;
    load({L0, 3'd1}, src, patched, fhit);
    chk(src == 2'd2, "L1 hit on a good subblock");
    load({L0, 3'd2}, src, patched, fhit);
    chk(fhit && !patched, "unpatched false hit");
    if (fhit) mcount[M_FALSE_HIT]++;
    wait_idle_d();
    // many lines: MSHR patches replaced, store queue evicts
    for (int i = 0; i < 48; i++) begin
      load({L0 + laddr_t'(64 * (i + 1)), 3'd2}, src, patched, fhit);
      if (i % 3 == 0) store({L0 + laddr_t'(64 * (i + 1)), 3'd4}, word_t'(i));
    end
    wait_idle_d();
    for (int i = 0; i < 48; i++) load({L0 + laddr_t'(64 * (i + 1)), 3'(i)}, src, patched, fhit);
    wait_idle_d();

    // ================= front end =================
    begin
      laddr_t I0;
      I0 = laddr_t'(34'h2_0000);
      do_fetch({I0, 3'd3}, src, patched, fhit, flt);   // miss and fill
      wait_idle_i();
      chk(imshr_patch != '0, "I-MSHR kept the line");
      do_fetch({I0, 3'd3}, src, patched, fhit, flt);
      chk(src == 2'd1 && patched, "fetch false hit patched by the I-MSHR");
      if (src == 2'd1 && patched) mcount[M_FETCH_MSHR_PATCH]++;
      // decoder fills the micro-op cache, marking the faulty word as a patch
      @(negedge clk);
      dec_fill = 1; dec_fill_addr = {I0, 3'd3}; dec_fill_uops = {2{imem({I0, 3'd3})}}; dec_fill_patch = flt;
      @(negedge clk); dec_fill = 0;
      chk(flt, "fetched word flagged as on a disabled subblock");
      do_fetch({I0, 3'd3}, src, patched, fhit, flt);
      chk(src == 2'd0 && dut.uc_patch_hit, "micro-op cache patch hit");
      if (src == 2'd0 && dut.uc_patch_hit) mcount[M_UOP_PATCH]++;
      // more lines than I-MSHRs: some patches replaced, false hits remain
      for (int i = 1; i <= 8; i++) begin
        do_fetch({I0 + laddr_t'(64 * i), 3'd0}, src, patched, fhit, flt);
        wait_idle_i();
      end
      for (int i = 1; i <= 8; i++) begin
        do_fetch({I0 + laddr_t'(64 * i), 3'd3}, src, patched, fhit, flt);
        if (fhit) mcount[M_FETCH_FALSE_HIT]++;
        wait_idle_i();
      end
      // patch entries in one micro-op cache set beyond the threshold
      for (int i = 0; i < 12; i++) begin
        @(negedge clk);
        dec_fill = 1; dec_fill_addr = waddr_t'(32 * i + 7); dec_fill_uops = '0; dec_fill_patch = 1;
      end
      @(negedge clk); dec_fill = 0;
    end

    // ================= COP =================
    for (int n = 0; n < 200; n++) begin
      block_t b, o; bit comp, corr, unc; int e1, e2;
      b = gen_block(n % 5);
      @(negedge clk); wb_blk = b;
      #1;
      if (wb_alias) begin mcount[M_COP_ALIAS]++; continue; end
      case (wb_scheme)
        SCHEME_TXT: mcount[M_COP_TXT]++;
        SCHEME_MSB: mcount[M_COP_MSB]++;
        SCHEME_RLE: mcount[M_COP_RLE]++;
        default: mcount[M_COP_RAW]++;
      endcase
      chk(wb_comp == (wb_scheme != SCHEME_NONE), "compressed flag");
      if (!wb_comp) continue;
      b = wb_out;
      e1 = $urandom_range(0, 511);
      e2 = (e1 + 1 + $urandom_range(0, 126)) % 512;
      case (n % 3)
        0: begin
          cop_read(b, o, comp, corr, unc);
          chk(comp && !corr && !unc && o == wb_blk, "clean compressed read");
        end
        1: begin
          b[e1] = ~b[e1];
          cop_read(b, o, comp, corr, unc);
          chk(comp && corr && !unc && o == wb_blk, "single error corrected");
          if (corr) mcount[M_COP_CORR]++;
        end
        default: begin
          // two errors in one code word
          e2 = (e1 / 128) * 128 + ((e1 % 128) + 1 + $urandom_range(0, 125)) % 128;
          b[e1] = ~b[e1]; b[e2] = ~b[e2];
          cop_read(b, o, comp, corr, unc);
          chk(comp && unc, "double error detected");
          if (unc) mcount[M_COP_UNC]++;
        end
      endcase
    end
    begin
      block_t a;
      a = alias_block(3);
      @(negedge clk); wb_blk = a;
      #1 chk(wb_alias && !wb_comp, "alias refused");
      if (wb_alias) mcount[M_COP_ALIAS]++;
    end
    // LLC victim choice
    @(negedge clk);
    llc_valid = '1; llc_alias = 16'h0001;
    for (int w = 0; w < 16; w++) llc_age[w] = 4'(w == 0 ? 15 : w - 1);
    #1 chk(llc_ok && llc_victim != 4'd0 && llc_victim == 4'd15, "LLC skips the alias line");
    if (llc_ok && llc_victim != 4'd0) mcount[M_LLC_SKIP_ALIAS]++;
    llc_alias = '1;
    #1 chk(!llc_ok && llc_over, "all aliases: overflow");
    if (llc_over) mcount[M_LLC_OVERFLOW]++;
    llc_alias = '0;

    // ================= COP-ER =================
    begin
      block_t b, o; ptr_t p, p0; bit walked, comp, corr, unc;
      for (int n = 0; n < 20; n++) begin
        do b = rand_block(); while (b[7] == 1'b0);
        @(negedge clk); wb_blk = b;
        #1 chk(!wb_comp, "random block stays raw");
        er_cmd(2'd0, '0, p, walked);
        mcount[M_ER_ALLOC]++;
        if (n == 0) p0 = p;
        #1;
        begin
          block_t s;
          s = er_stored;
          if (n % 2 == 1) begin int e; e = $urandom_range(34, 511); s[e] = ~s[e]; end
          cop_read(s, o, comp, corr, unc);
          chk(!comp, "raw block passes the decoder");
          chk(er_rd_ptr == p && !er_rd_ptr_err, "pointer recovered");
          er_entry = entry_of(er_rd_ptr);
          #1;
          chk(er_rd_blk == b && !er_rd_unc, "block rebuilt from the ECC entry");
          if (er_rd_blk == b) mcount[M_ER_REBUILD]++;
          if (n % 2 == 1 && er_rd_corr) mcount[M_ER_CORR]++;
        end
      end
      er_cmd(2'd1, p0, p, walked);
      chk(!entry_of(p0).valid, "freed entry invalid");
      if (!entry_of(p0).valid) mcount[M_ER_FREE]++;
      // fill the current L3 block (and more) until a walk is needed
      for (int n = 0; n < F * EPB + 2 && mcount[M_ER_WALK] == 0; n++) begin
        er_cmd(2'd0, '0, p, walked);
        if (walked) mcount[M_ER_WALK]++;
      end
      chk(!er_err, "no valid-bit code errors");
    end

    // ================= remap =================
    while (mcount[M_REMAP] == 0 && cycle < 600000) @(negedge clk);
    chk(mcount[M_REMAP] != 0, "remap flush happened");
    // caches work after the flush
    load({L0, 3'd1}, src, patched, fhit);

    for (int m = 0; m < M_NUM; m++) begin
      chk(mcount[m] > 0, $sformatf("mechanism %s seen", mech_e'(m)));
      $display("mechanism %-20s %0d", mech_e'(m), mcount[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
