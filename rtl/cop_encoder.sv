// cop_encoder: COP write path (memory controller, LLC write-back to DRAM).
//
// The block is offered to the three compressors at once. If one succeeds,
// its 2-bit scheme code and 478-bit body form a 480-bit payload, each
// 120-bit quarter gets 8 SECDED check bits, and each resulting 128-bit
// code word is XORed with its static hash; the 512-bit result goes to DRAM
// in place of the block. If no scheme succeeds the block is written as it
// is, unless it is an "incompressible alias": a raw block in which 3 or
// more words already look like valid code words. Such a block must not
// reach DRAM, because the read path would take it for compressed data;
// alias_o tells the LLC to keep it (its alias bit set) instead.
//
// Interface: blk_i in, blk_o / compressed_o / scheme_o / alias_o out,
// combinational. The order of the stages (compress, SECDED, hash) and the
// alias rule follow the document. It does not say which scheme wins when
// several apply; here MSB is tried first, then RLE, then text.
module cop_encoder
  import cop_pkg::*;
(
  input  block_t  blk_i,
  output block_t  blk_o,
  output logic    compressed_o,
  output scheme_e scheme_o,
  output logic    alias_o
);
  logic  ok_txt, ok_msb, ok_rle;
  body_t b_txt, b_msb, b_rle;
  body_t unused_body;
  block_t unused_t, unused_m, unused_r;
  assign unused_body = '0;

  cop_txt_codec u_txt (.blk_i(blk_i), .ok_o(ok_txt), .body_o(b_txt), .body_i(unused_body), .blk_o(unused_t));
  cop_msb_codec u_msb (.blk_i(blk_i), .ok_o(ok_msb), .body_o(b_msb), .body_i(unused_body), .blk_o(unused_m));
  cop_rle_codec u_rle (.blk_i(blk_i), .ok_o(ok_rle), .body_o(b_rle), .body_i(unused_body), .blk_o(unused_r));

  payload_t payload;
  always_comb begin
    if (ok_msb) begin
      scheme_o = SCHEME_MSB;
      payload  = {b_msb, SCHEME_MSB};
    end else if (ok_rle) begin
      scheme_o = SCHEME_RLE;
      payload  = {b_rle, SCHEME_RLE};
    end else if (ok_txt) begin
      scheme_o = SCHEME_TXT;
      payload  = {b_txt, SCHEME_TXT};
    end else begin
      scheme_o = SCHEME_NONE;
      payload  = '0;
    end
  end
  assign compressed_o = (scheme_o != SCHEME_NONE);

  block_t coded;
  for (genvar k = 0; k < NSEG; k++) begin : g_seg
    logic [SEG_CHECK-1:0] chk;
    secded_enc #(.K(SEG_DATA), .EXT(1'b1)) u_enc (
      .data_i (payload[SEG_DATA*k +: SEG_DATA]),
      .check_o(chk)
    );
    assign coded[SEG_BITS*k +: SEG_BITS] = {chk, payload[SEG_DATA*k +: SEG_DATA]} ^ seg_hash(k);
  end

  // alias test on the raw block
  logic [2:0]      raw_count;
  logic [NSEG-1:0] unused_z, unused_s, unused_d;
  payload_t        unused_p;
  cop_cw_counter u_alias (
    .blk_i(blk_i), .count_o(raw_count), .zero_o(unused_z),
    .single_o(unused_s), .double_o(unused_d), .payload_o(unused_p)
  );

  assign blk_o   = compressed_o ? coded : blk_i;
  assign alias_o = !compressed_o && (raw_count >= 3'(CW_THRESHOLD));
endmodule
