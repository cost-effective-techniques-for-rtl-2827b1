// cop_txt_codec: COP text compression.
//
// A block whose 64 bytes all have a zero most significant bit (ASCII text,
// also ASCII stored as UTF-16) is compressed by dropping that bit from every
// byte: 64 x 7 = 448 bits of body, 30 bits spare in the 478-bit body.
// Compress path: blk_i -> ok_o, body_o (7-bit characters packed in byte
// order, unused body bits zero). Decompress path: body_i -> blk_o. Both
// paths are combinational and independent. The scheme is the document's;
// the bit order of the packed body is this design's choice.
module cop_txt_codec
  import cop_pkg::*;
(
  input  block_t blk_i,
  output logic   ok_o,
  output body_t  body_o,
  input  body_t  body_i,
  output block_t blk_o
);
  always_comb begin
    ok_o   = 1'b1;
    body_o = '0;
    for (int b = 0; b < 64; b++) begin
      if (blk_i[8*b+7]) ok_o = 1'b0;
      body_o[7*b +: 7] = blk_i[8*b +: 7];
    end
  end

  always_comb begin
    for (int b = 0; b < 64; b++) blk_o[8*b +: 8] = {1'b0, body_i[7*b +: 7]};
  end
endmodule
