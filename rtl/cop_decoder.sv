// cop_decoder: COP read path (DRAM to last-level cache).
//
// Every block read from DRAM is treated as four hashed (128,120) code words
// and checked (cop_cw_counter). With fewer than 3 zero syndromes the block
// was stored raw and is passed on unchanged. With 3 or 4 it is a COP block:
// a single-bit error in one word is corrected, the payload's 2-bit scheme
// code selects the decompressor and the restored 64 bytes are passed on.
// A double error inside one word is flagged as uncorrectable.
//
// Timing: one result per cycle; the result of a block presented with
// valid_i appears LATENCY cycles later with valid_o. The logic is computed
// in the first cycle and carried through LATENCY registers, leaving
// retiming to synthesis. LATENCY = 4 is the decode/decompress latency the
// document assumes. The threshold of 3 code words and the dataflow of the
// decoder follow the document's figure of the decoder.
module cop_decoder
  import cop_pkg::*;
#(
  parameter int unsigned LATENCY = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    valid_i,
  input  block_t  blk_i,
  output logic    valid_o,
  output block_t  blk_o,
  output logic    compressed_o,   // block was stored compressed
  output logic    corrected_o,    // a single-bit error was corrected
  output logic    uncorrectable_o // a double error in one code word, or a bad scheme code
);
  logic [2:0]      count;
  logic [NSEG-1:0] zero, single, dbl;
  payload_t        payload;

  cop_cw_counter u_cnt (
    .blk_i(blk_i), .count_o(count), .zero_o(zero),
    .single_o(single), .double_o(dbl), .payload_o(payload)
  );

  body_t  body;
  block_t d_txt, d_msb, d_rle;
  logic   unused_ok_t, unused_ok_m, unused_ok_r;
  body_t  unused_bt, unused_bm, unused_br;
  assign body = payload[PAYLOAD_BITS-1:2];

  cop_txt_codec u_txt (.blk_i(blk_i), .ok_o(unused_ok_t), .body_o(unused_bt), .body_i(body), .blk_o(d_txt));
  cop_msb_codec u_msb (.blk_i(blk_i), .ok_o(unused_ok_m), .body_o(unused_bm), .body_i(body), .blk_o(d_msb));
  cop_rle_codec u_rle (.blk_i(blk_i), .ok_o(unused_ok_r), .body_o(unused_br), .body_i(body), .blk_o(d_rle));

  typedef struct packed {
    logic   valid;
    block_t blk;
    logic   compressed;
    logic   corrected;
    logic   uncorrectable;
  } result_t;

  result_t res;
  always_comb begin
    res.valid         = valid_i;
    res.compressed    = (count >= 3'(CW_THRESHOLD));
    res.corrected     = 1'b0;
    res.uncorrectable = 1'b0;
    res.blk           = blk_i;
    if (res.compressed) begin
      res.corrected     = |single;
      res.uncorrectable = |dbl;
      unique case (scheme_e'(payload[1:0]))
        SCHEME_TXT: res.blk = d_txt;
        SCHEME_MSB: res.blk = d_msb;
        SCHEME_RLE: res.blk = d_rle;
        default:    res.uncorrectable = 1'b1;
      endcase
    end
  end

  result_t pipe [LATENCY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LATENCY; s++) pipe[s] <= '0;
    end else begin
      pipe[0] <= res;
      for (int s = 1; s < LATENCY; s++) pipe[s] <= pipe[s-1];
    end
  end

  assign valid_o         = pipe[LATENCY-1].valid;
  assign blk_o           = pipe[LATENCY-1].blk;
  assign compressed_o    = pipe[LATENCY-1].compressed;
  assign corrected_o     = pipe[LATENCY-1].corrected;
  assign uncorrectable_o = pipe[LATENCY-1].uncorrectable;
endmodule
