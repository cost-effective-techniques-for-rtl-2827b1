// coper_codec: COP-ER block formatting for incompressible blocks.
//
// Write path (combinational): the original block and the pointer of its
// allocated ECC entry give the block stored in DRAM, whose bits [33:0] are
// replaced by {pointer[27:0], pointer check bits[5:0]}, and the 46-bit ECC
// entry {valid=1, original bits [33:0], 11 SECDED check bits over all 512
// original bits}.
// Read path, in two steps as the memory controller performs them: (1) from
// the stored block, the pointer is taken out and a single-bit error in it
// is corrected, so the ECC entry can be fetched; (2) with the entry, the
// displaced bits are put back and the whole block is checked and, for a
// single-bit error, corrected with the (523,512) code.
// The field sizes follow the document; the placement of the pointer at
// the low end of the block is taken from the document's figure of the ECC
// region and is otherwise this design's choice.
module coper_codec
  import coper_pkg::*;
(
  // write path
  input  logic [511:0]  wr_blk_i,
  input  ptr_t          wr_ptr_i,
  output logic [511:0]  wr_stored_o,
  output entry_t        wr_entry_o,
  // read path, step 1
  input  logic [511:0]  rd_stored_i,
  output ptr_t          rd_ptr_o,
  output logic          rd_ptr_err_o,    // pointer had an uncorrectable error
  // read path, step 2
  input  entry_t        rd_entry_i,
  output logic [511:0]  rd_blk_o,
  output logic          rd_corrected_o,
  output logic          rd_uncorrectable_o
);
  // ---- write ----
  logic [PTR_ECC_W-1:0] wp_chk;
  logic [BLK_ECC_W-1:0] wb_chk;
  secded_enc #(.K(PTR_W), .R(PTR_ECC_W), .EXT(1'b0)) u_pe (.data_i(wr_ptr_i), .check_o(wp_chk));
  secded_enc #(.K(512), .R(BLK_ECC_W-1), .EXT(1'b1)) u_be (.data_i(wr_blk_i), .check_o(wb_chk));

  assign wr_stored_o = {wr_blk_i[511:DISP_W], wr_ptr_i, wp_chk};
  assign wr_entry_o  = '{valid: 1'b1, data: wr_blk_i[DISP_W-1:0], ecc: wb_chk};

  // ---- read step 1 ----
  logic [PTR_W-1:0] rp;
  logic             rp_zero, rp_single, rp_double;
  secded_dec #(.K(PTR_W), .R(PTR_ECC_W), .EXT(1'b0)) u_pd (
    .data_i(rd_stored_i[DISP_W-1:PTR_ECC_W]), .check_i(rd_stored_i[PTR_ECC_W-1:0]),
    .data_o(rp), .zero_o(rp_zero), .single_o(rp_single), .double_o(rp_double));
  assign rd_ptr_o     = ptr_t'(rp);
  assign rd_ptr_err_o = rp_double;

  // ---- read step 2 ----
  logic rb_zero, rb_single, rb_double;
  secded_dec #(.K(512), .R(BLK_ECC_W-1), .EXT(1'b1)) u_bd (
    .data_i({rd_stored_i[511:DISP_W], rd_entry_i.data}), .check_i(rd_entry_i.ecc),
    .data_o(rd_blk_o), .zero_o(rb_zero), .single_o(rb_single), .double_o(rb_double));
  assign rd_corrected_o     = rb_single;
  assign rd_uncorrectable_o = rb_double || !rd_entry_i.valid;
endmodule
