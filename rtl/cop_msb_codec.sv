// cop_msb_codec: COP "MSB" compression.
//
// The block is read as eight 64-bit words. If bits [62:58] (the five bits
// just below the sign bit, so that floating-point values with similar
// exponents but different signs still match) are equal in all eight words,
// the copies in words 1..7 are dropped: 7 x 5 = 35 bits freed. Body layout:
// word 0 whole in bits [63:0], then for k = 1..7 a 59-bit field
// {w[63], w[57:0]} at bit 64 + 59*(k-1); 477 of the 478 body bits are used.
// Compress path: blk_i -> ok_o, body_o. Decompress path: body_i -> blk_o,
// the five bits restored from word 0. Combinational. The 5-bit comparison
// shifted by one bit follows the document; the body layout is this
// design's choice.
module cop_msb_codec
  import cop_pkg::*;
(
  input  block_t blk_i,
  output logic   ok_o,
  output body_t  body_o,
  input  body_t  body_i,
  output block_t blk_o
);
  localparam int unsigned FIELD = 59;

  always_comb begin
    logic [63:0] w;
    ok_o   = 1'b1;
    body_o = '0;
    body_o[63:0] = blk_i[63:0];
    for (int k = 1; k < 8; k++) begin
      w = blk_i[64*k +: 64];
      if (w[62:58] != blk_i[62:58]) ok_o = 1'b0;
      body_o[64 + FIELD*(k-1) +: FIELD] = {w[63], w[57:0]};
    end
  end

  always_comb begin
    logic [FIELD-1:0] f;
    blk_o[63:0] = body_i[63:0];
    for (int k = 1; k < 8; k++) begin
      f = body_i[64 + FIELD*(k-1) +: FIELD];
      blk_o[64*k +: 64] = {f[58], body_i[62:58], f[57:0]};
    end
  end
endmodule
