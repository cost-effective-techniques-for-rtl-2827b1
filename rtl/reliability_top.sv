// reliability_top: the two reliability mechanisms side by side.
//
// iPatch (core side). Both L1 caches use subblock disabling: each 8-byte
// subblock with a failing cell at the current low voltage is disabled, and
// a read that hits a disabled subblock is a "false hit" that would go to
// L2. iPatch hides many false hits by serving reads from structures the
// core already has:
//   data side  - load source order store queue > MSHR fill buffer > L1D.
//                Filled MSHRs stay as patch entries when their line lands on
//                a way with disabled subblocks, and the disabled segments of
//                each filled line are also copied into the store queue as
//                completed patch entries. Completed stores stay in the
//                queue until their slot is needed.
//   front end  - fetch source order micro-op cache > I-MSHR > L1I. Micro-ops
//                decoded from disabled subblocks are marked as patches in
//                the micro-op cache, whose replacement keeps them up to a
//                per-set threshold.
// A shared remap counter flushes both L1s every 500,000 cycles and changes
// their set hash.
//
// COP (memory-controller side). cop_encoder compresses each 64-byte block
// written back to DRAM just enough to add four SECDED check bytes, or
// writes it raw; incompressible aliases are refused (cop_wb_alias_o) and
// must be kept in the LLC, whose victim choice (llc_alias_victim) never
// evicts them. cop_decoder recognises compressed blocks by their valid
// code words, corrects and decompresses them. COP-ER adds an ECC region
// for incompressible blocks: coper_allocator finds and fills an ECC entry
// (through its own memory port) and coper_codec embeds its pointer in the
// stored block; on a read, the pointer of a raw block is brought out so the
// entry can be fetched, and the block is rebuilt and checked.
//
// The L2, the LLC arrays, DRAM and the core pipeline are outside this
// module; their connections are ports. All interfaces run on one clock.
module reliability_top
  import ipatch_pkg::*;
  import cop_pkg::*;
  import coper_pkg::*;
#(
  parameter int unsigned L1_SETS      = 64,
  parameter int unsigned L1_WAYS      = 8,
  parameter int unsigned DMSHR        = 10,
  parameter int unsigned IMSHR        = 4,
  parameter int unsigned SQ_N         = 36,
  parameter int unsigned COLOR_W      = 8,
  parameter int unsigned UC_SETS      = 32,
  parameter int unsigned UC_WAYS      = 8,
  parameter int unsigned UOP_W        = 128,
  parameter int unsigned REMAP_PERIOD = 500_000,
  parameter int unsigned COP_LATENCY  = 4,
  parameter int unsigned LLC_WAYS     = 16,
  parameter int unsigned ER_FANOUT    = 501,
  parameter int unsigned ER_VPAR      = 11
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          remap_en_i,
  output logic                          remap_flush_o,
  // fault maps (post-test, per voltage)
  input  logic                          dfm_we_i,
  input  logic                          ifm_we_i,
  input  logic [$clog2(L1_SETS)-1:0]    fm_set_i,
  input  logic [$clog2(L1_WAYS)-1:0]    fm_way_i,
  input  fault_t                        fm_bits_i,
  // ---------------- data side ----------------
  input  logic                          ld_i,
  input  waddr_t                        ld_addr_i,
  input  logic [COLOR_W-1:0]            ld_color_i,
  output logic                          ld_done_o,
  output word_t                         ld_data_o,
  output logic [1:0]                    ld_src_o,
  output logic                          ld_false_hit_o,
  output logic                          ld_patched_o,
  output logic                          ld_retry_o,      // needs L2 but no MSHR free
  input  logic                          st_alloc_i,
  input  waddr_t                        st_addr_i,
  input  word_t                         st_data_i,
  input  logic [COLOR_W-1:0]            st_color_i,
  output logic                          st_full_o,
  input  logic                          st_complete_i,
  input  logic [COLOR_W-1:0]            st_complete_color_i,
  input  waddr_t                        st_complete_addr_i,
  input  word_t                         st_complete_data_i,
  output logic                          st_complete_ready_o,
  input  logic                          inv_i,
  input  laddr_t                        inv_laddr_i,
  output logic                          dl2_req_o,
  output laddr_t                        dl2_laddr_o,
  output logic [$clog2(DMSHR)-1:0]      dl2_idx_o,
  input  logic                          dl2_fill_i,
  input  logic [$clog2(DMSHR)-1:0]      dl2_fill_idx_i,
  input  logic [SUB_W-1:0]              dl2_fill_sub_i,
  input  word_t                         dl2_fill_data_i,
  output logic [DMSHR-1:0]              dmshr_patch_o,
  output logic [SQ_N-1:0]               sq_patch_o,
  output logic                          sq_evict_o,
  output logic                          dmshr_evict_o,
  // ---------------- front end ----------------
  input  logic [$clog2(UC_WAYS):0]      patch_threshold_i,
  input  logic                          fetch_i,
  input  waddr_t                        fetch_addr_i,
  output logic                          uops_valid_o,
  output logic [UOP_W-1:0]              uops_o,
  output logic                          inst_valid_o,
  output word_t                         inst_o,
  output logic                          inst_fault_o,
  output logic [1:0]                    fetch_src_o,
  output logic                          fetch_patched_o,
  output logic                          fetch_false_hit_o,
  output logic                          fetch_retry_o,
  input  logic                          dec_fill_i,
  input  waddr_t                        dec_fill_addr_i,
  input  logic [UOP_W-1:0]              dec_fill_uops_i,
  input  logic                          dec_fill_patch_i,
  output logic                          uc_evict_patch_o,
  output logic                          il2_req_o,
  output laddr_t                        il2_laddr_o,
  output logic [$clog2(IMSHR)-1:0]      il2_idx_o,
  input  logic                          il2_fill_i,
  input  logic [$clog2(IMSHR)-1:0]      il2_fill_idx_i,
  input  logic [SUB_W-1:0]              il2_fill_sub_i,
  input  word_t                         il2_fill_data_i,
  output logic [IMSHR-1:0]              imshr_patch_o,
  // ---------------- COP write-back path ----------------
  input  block_t                        cop_wb_blk_i,
  output block_t                        cop_wb_blk_o,
  output logic                          cop_wb_compressed_o,
  output scheme_e                       cop_wb_scheme_o,
  output logic                          cop_wb_alias_o,
  // ---------------- COP read path ----------------
  input  logic                          cop_rd_valid_i,
  input  block_t                        cop_rd_blk_i,
  output logic                          cop_rd_valid_o,
  output block_t                        cop_rd_blk_o,
  output logic                          cop_rd_compressed_o,
  output logic                          cop_rd_corrected_o,
  output logic                          cop_rd_uncorrectable_o,
  // ---------------- LLC victim choice ----------------
  input  logic [LLC_WAYS-1:0]                         llc_valid_i,
  input  logic [LLC_WAYS-1:0]                         llc_alias_i,
  input  logic [LLC_WAYS-1:0][$clog2(LLC_WAYS)-1:0]   llc_age_i,
  output logic [$clog2(LLC_WAYS)-1:0]                 llc_victim_o,
  output logic                                        llc_victim_ok_o,
  output logic                                        llc_overflow_o,
  // ---------------- COP-ER ----------------
  input  logic                          er_req_i,
  input  logic [1:0]                    er_op_i,
  input  ptr_t                          er_ptr_i,
  output logic                          er_ack_o,
  output logic                          er_full_o,
  output logic                          er_err_o,
  output logic                          er_walked_o,
  output block_t                        er_wb_stored_o,  // incompressible block with embedded pointer
  output ptr_t                          er_rd_ptr_o,     // pointer found in a raw block read
  output logic                          er_rd_ptr_err_o,
  input  entry_t                        er_rd_entry_i,   // ECC entry fetched for that block
  output block_t                        er_rd_blk_o,
  output logic                          er_rd_corrected_o,
  output logic                          er_rd_uncorrectable_o,
  output logic                          er_mem_req_o,
  output logic                          er_mem_we_o,
  output logic [31:0]                   er_mem_addr_o,
  output logic [511:0]                  er_mem_wdata_o,
  input  logic                          er_mem_ready_i,
  input  logic                          er_mem_rvalid_i,
  input  logic [511:0]                  er_mem_rdata_i
);
  // ================= remap =================
  logic [$clog2(L1_SETS)-1:0] remap;
  sbd_remap #(.PERIOD(REMAP_PERIOD), .SET_W($clog2(L1_SETS))) u_remap (
    .clk(clk), .rst_n(rst_n), .en_i(remap_en_i), .flush_o(remap_flush_o), .remap_o(remap));

  // ================= data side =================
  logic   sq_hit, sq_patch_hit, pi_valid, pi_ready;
  word_t  sq_data, pi_data;
  waddr_t pi_addr;
  logic   dm_hit, dm_patch_hit;
  word_t  dm_data;
  logic   d_hit, d_fhit;
  word_t  d_data;
  fault_t d_rfault, d_fill_fault;
  logic [$clog2(L1_WAYS)-1:0] d_fill_way;
  logic   ld_to_l2;
  logic   dm_alloc_ok, dm_alloc_new;
  logic   dm_done_valid, dm_done_ready;
  laddr_t dm_done_laddr;
  line_t  dm_done_data;
  logic   ins_ready;
  logic   d_fill;
  logic [DMSHR-1:0] dm_busy;

  ipatch_store_queue #(.N(SQ_N), .COLOR_W(COLOR_W)) u_sq (
    .clk(clk), .rst_n(rst_n),
    .st_alloc_i(st_alloc_i), .st_addr_i(st_addr_i), .st_data_i(st_data_i), .st_color_i(st_color_i),
    .st_full_o(st_full_o),
    .st_complete_i(st_complete_i && st_complete_ready_o), .st_complete_color_i(st_complete_color_i),
    .pi_valid_i(pi_valid), .pi_addr_i(pi_addr), .pi_data_i(pi_data), .pi_ready_o(pi_ready),
    .ld_i(ld_i), .ld_addr_i(ld_addr_i), .ld_color_i(ld_color_i),
    .ld_hit_o(sq_hit), .ld_data_o(sq_data), .ld_patch_o(sq_patch_hit),
    .inv_i(inv_i), .inv_laddr_i(inv_laddr_i),
    .patch_o(sq_patch_o), .completed_o(), .evict_o(sq_evict_o));

  ipatch_mshr #(.N(DMSHR)) u_dmshr (
    .clk(clk), .rst_n(rst_n),
    .alloc_i(ld_to_l2), .alloc_laddr_i(line_of(ld_addr_i)),
    .alloc_ok_o(dm_alloc_ok), .alloc_new_o(dm_alloc_new), .alloc_idx_o(dl2_idx_o), .alloc_evict_o(dmshr_evict_o),
    .fill_i(dl2_fill_i), .fill_idx_i(dl2_fill_idx_i), .fill_sub_i(dl2_fill_sub_i), .fill_data_i(dl2_fill_data_i),
    .done_valid_o(dm_done_valid), .done_laddr_o(dm_done_laddr), .done_data_o(dm_done_data),
    .done_ready_i(dm_done_ready), .done_keep_i(d_fill_fault != '0),
    .lk_i(ld_i), .lk_addr_i(ld_addr_i), .lk_hit_o(dm_hit), .lk_data_o(dm_data), .lk_patch_o(dm_patch_hit),
    .st_i(st_complete_i && st_complete_ready_o), .st_addr_i(st_complete_addr_i),
    .patch_o(dmshr_patch_o), .busy_o(dm_busy));

  // a completed line is written to the L1 when no store writes it this
  // cycle and, if it has segments to patch, the inserter is free
  assign dm_done_ready       = dm_done_valid && !st_complete_i && (ins_ready || d_fill_fault == '0);
  assign d_fill              = dm_done_valid && dm_done_ready;
  assign st_complete_ready_o = 1'b1;

  sbd_l1_cache #(.SETS(L1_SETS), .WAYS(L1_WAYS)) u_l1d (
    .clk(clk), .rst_n(rst_n), .flush_i(remap_flush_o), .remap_i(remap),
    .fm_we_i(dfm_we_i), .fm_set_i(fm_set_i), .fm_way_i(fm_way_i), .fm_bits_i(fm_bits_i),
    .rd_i(ld_i), .rd_addr_i(ld_addr_i), .hit_o(d_hit), .false_hit_o(d_fhit), .rd_data_o(d_data), .rd_fault_o(d_rfault),
    .wr_i(st_complete_i && st_complete_ready_o), .wr_addr_i(st_complete_addr_i), .wr_data_i(st_complete_data_i),
    .fill_i(d_fill), .fill_laddr_i(dm_done_laddr), .fill_data_i(dm_done_data),
    .fill_way_o(d_fill_way), .fill_fault_o(d_fill_fault));

  sq_patch_inserter u_ins (
    .clk(clk), .rst_n(rst_n),
    .in_valid_i(d_fill && d_fill_fault != '0), .in_ready_o(ins_ready),
    .in_laddr_i(dm_done_laddr), .in_data_i(dm_done_data), .in_fault_i(d_fill_fault),
    .pi_valid_o(pi_valid), .pi_addr_o(pi_addr), .pi_data_o(pi_data), .pi_ready_i(pi_ready));

  ipatch_load_select u_lsel (
    .ld_i(ld_i), .sq_hit_i(sq_hit), .sq_data_i(sq_data), .mshr_hit_i(dm_hit), .mshr_data_i(dm_data),
    .l1_hit_i(d_hit), .l1_false_hit_i(d_fhit), .l1_data_i(d_data),
    .done_o(ld_done_o), .data_o(ld_data_o), .src_o(ld_src_o), .to_l2_o(ld_to_l2),
    .false_hit_o(ld_false_hit_o), .patched_o(ld_patched_o));

  assign dl2_req_o   = dm_alloc_new;
  assign dl2_laddr_o = line_of(ld_addr_i);
  assign ld_retry_o  = ld_to_l2 && !dm_alloc_ok;

  // ================= front end =================
  logic   uc_hit, uc_patch_hit;
  logic [UOP_W-1:0] uc_uops;
  logic   im_hit, im_patch_hit;
  word_t  im_data;
  logic   i_hit, i_fhit;
  word_t  i_data;
  fault_t i_rfault, i_fill_fault;
  logic [$clog2(L1_WAYS)-1:0] i_fill_way;
  logic   f_to_l2, im_alloc_ok, im_alloc_new;
  logic   im_done_valid;
  laddr_t im_done_laddr;
  line_t  im_done_data;
  logic [IMSHR-1:0] im_busy;

  ipatch_uop_cache #(.SETS(UC_SETS), .WAYS(UC_WAYS), .UOP_W(UOP_W)) u_uc (
    .clk(clk), .rst_n(rst_n), .patch_threshold_i(patch_threshold_i), .flush_i(1'b0),
    .lk_i(fetch_i), .lk_addr_i(fetch_addr_i), .lk_hit_o(uc_hit), .lk_uops_o(uc_uops), .lk_patch_o(uc_patch_hit),
    .fill_i(dec_fill_i), .fill_addr_i(dec_fill_addr_i), .fill_uops_i(dec_fill_uops_i), .fill_patch_i(dec_fill_patch_i),
    .fill_evict_patch_o(uc_evict_patch_o), .fill_set_patches_o());

  ipatch_mshr #(.N(IMSHR)) u_imshr (
    .clk(clk), .rst_n(rst_n),
    .alloc_i(f_to_l2), .alloc_laddr_i(line_of(fetch_addr_i)),
    .alloc_ok_o(im_alloc_ok), .alloc_new_o(im_alloc_new), .alloc_idx_o(il2_idx_o), .alloc_evict_o(),
    .fill_i(il2_fill_i), .fill_idx_i(il2_fill_idx_i), .fill_sub_i(il2_fill_sub_i), .fill_data_i(il2_fill_data_i),
    .done_valid_o(im_done_valid), .done_laddr_o(im_done_laddr), .done_data_o(im_done_data),
    .done_ready_i(im_done_valid), .done_keep_i(i_fill_fault != '0),
    .lk_i(fetch_i), .lk_addr_i(fetch_addr_i), .lk_hit_o(im_hit), .lk_data_o(im_data), .lk_patch_o(im_patch_hit),
    .st_i(1'b0), .st_addr_i('0),
    .patch_o(imshr_patch_o), .busy_o(im_busy));

  sbd_l1_cache #(.SETS(L1_SETS), .WAYS(L1_WAYS)) u_l1i (
    .clk(clk), .rst_n(rst_n), .flush_i(remap_flush_o), .remap_i(remap),
    .fm_we_i(ifm_we_i), .fm_set_i(fm_set_i), .fm_way_i(fm_way_i), .fm_bits_i(fm_bits_i),
    .rd_i(fetch_i), .rd_addr_i(fetch_addr_i), .hit_o(i_hit), .false_hit_o(i_fhit), .rd_data_o(i_data), .rd_fault_o(i_rfault),
    .wr_i(1'b0), .wr_addr_i('0), .wr_data_i('0),
    .fill_i(im_done_valid), .fill_laddr_i(im_done_laddr), .fill_data_i(im_done_data),
    .fill_way_o(i_fill_way), .fill_fault_o(i_fill_fault));

  ipatch_fetch_select #(.UOP_W(UOP_W)) u_fsel (
    .fetch_i(fetch_i), .sub_i(sub_of(fetch_addr_i)),
    .uc_hit_i(uc_hit), .uc_uops_i(uc_uops), .mshr_hit_i(im_hit), .mshr_data_i(im_data),
    .l1_hit_i(i_hit), .l1_false_hit_i(i_fhit), .l1_data_i(i_data), .line_fault_i(i_rfault),
    .uops_valid_o(uops_valid_o), .uops_o(uops_o), .inst_valid_o(inst_valid_o), .inst_o(inst_o),
    .fault_o(inst_fault_o), .src_o(fetch_src_o), .to_l2_o(f_to_l2), .patched_o(fetch_patched_o));

  assign fetch_false_hit_o = f_to_l2 && i_fhit;
  assign il2_req_o         = im_alloc_new;
  assign il2_laddr_o       = line_of(fetch_addr_i);
  assign fetch_retry_o     = f_to_l2 && !im_alloc_ok;

  // ================= COP =================
  cop_encoder u_cop_enc (
    .blk_i(cop_wb_blk_i), .blk_o(cop_wb_blk_o), .compressed_o(cop_wb_compressed_o),
    .scheme_o(cop_wb_scheme_o), .alias_o(cop_wb_alias_o));

  cop_decoder #(.LATENCY(COP_LATENCY)) u_cop_dec (
    .clk(clk), .rst_n(rst_n), .valid_i(cop_rd_valid_i), .blk_i(cop_rd_blk_i),
    .valid_o(cop_rd_valid_o), .blk_o(cop_rd_blk_o), .compressed_o(cop_rd_compressed_o),
    .corrected_o(cop_rd_corrected_o), .uncorrectable_o(cop_rd_uncorrectable_o));

  llc_alias_victim #(.WAYS(LLC_WAYS)) u_llc_victim (
    .valid_i(llc_valid_i), .alias_i(llc_alias_i), .age_i(llc_age_i),
    .victim_o(llc_victim_o), .victim_ok_o(llc_victim_ok_o), .overflow_o(llc_overflow_o));

  // ================= COP-ER =================
  entry_t er_new_entry;
  ptr_t   er_ptr;

  coper_codec u_er_codec (
    .wr_blk_i(cop_wb_blk_i), .wr_ptr_i(er_ptr), .wr_stored_o(er_wb_stored_o), .wr_entry_o(er_new_entry),
    .rd_stored_i(cop_rd_blk_o), .rd_ptr_o(er_rd_ptr_o), .rd_ptr_err_o(er_rd_ptr_err_o),
    .rd_entry_i(er_rd_entry_i), .rd_blk_o(er_rd_blk_o),
    .rd_corrected_o(er_rd_corrected_o), .rd_uncorrectable_o(er_rd_uncorrectable_o));

  // FREE/UPDATE name an existing entry; ALLOC returns a new one
  coper_allocator #(.F(ER_FANOUT), .VPAR(ER_VPAR)) u_er_alloc (
    .clk(clk), .rst_n(rst_n), .req_i(er_req_i), .op_i(er_op_i), .ptr_i(er_ptr_i), .entry_i(er_new_entry),
    .ack_o(er_ack_o), .ptr_o(er_ptr), .full_o(er_full_o), .err_o(er_err_o), .walked_o(er_walked_o),
    .mem_req_o(er_mem_req_o), .mem_we_o(er_mem_we_o), .mem_addr_o(er_mem_addr_o), .mem_wdata_o(er_mem_wdata_o),
    .mem_ready_i(er_mem_ready_i), .mem_rvalid_i(er_mem_rvalid_i), .mem_rdata_i(er_mem_rdata_i));
endmodule
