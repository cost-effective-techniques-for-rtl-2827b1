// cop_rle_codec: COP run length encoding.
//
// A run is 2 or 3 bytes that are all 0x00 or all 0xFF and start on a 16-bit
// word boundary. Each run costs 7 bits of metadata: bit 6 = run of ones,
// bit 5 = 3-byte run, bits 4:0 = 16-bit word offset of the run in the block.
// A 2-byte run frees 9 bits, a 3-byte run 17; runs are taken until 34 bits
// are free (2 three-byte runs, 4 two-byte runs, or a mix), so at most four.
// Body layout: the metadata chunks from bit 0, then the bytes not covered
// by a run, in block order. The decompressor reads chunks until the freed
// bits reach 34, which tells it where the data bytes start, and re-inserts
// the runs.
//
// Run selection is a greedy scan from word 0 that prefers a 3-byte run at a
// given word over a 2-byte one; the document does not say how runs are
// chosen, so the scan, like the body bit order, is this design's choice.
// The metadata format and the 34-bit target are the document's.
// Both paths are combinational.
module cop_rle_codec
  import cop_pkg::*;
(
  input  block_t blk_i,
  output logic   ok_o,
  output body_t  body_o,
  input  body_t  body_i,
  output block_t blk_o
);
  localparam int unsigned TARGET = 34;

  function automatic logic run_byte(input logic [7:0] b, input logic ones);
    return ones ? (b == 8'hFF) : (b == 8'h00);
  endfunction

  // ---------------- compress ----------------
  logic [6:0]  meta [4];
  logic [63:0] in_run;
  logic [2:0]  nruns;
  logic [BLOCK_BITS-1:0] stream_c;
  logic [BLOCK_BITS+27:0] shifted_c;

  always_comb begin
    int unsigned freed;
    int unsigned next_w;
    logic        done;
    logic        ones;
    logic [7:0]  b0, b1, b2;
    int unsigned j;
    freed  = 0;
    next_w = 0;
    done   = 1'b0;
    nruns  = '0;
    in_run = '0;
    for (int r = 0; r < 4; r++) meta[r] = '0;
    for (int k = 0; k < 32; k++) begin
      b0 = blk_i[16*k +: 8];
      b1 = blk_i[16*k + 8 +: 8];
      b2 = (k < 31) ? blk_i[16*k + 16 +: 8] : 8'h5A;
      ones = (b0 == 8'hFF);
      if (!done && k >= int'(next_w) && run_byte(b0, ones) && run_byte(b1, ones)) begin
        if (k < 31 && run_byte(b2, ones)) begin
          meta[nruns[1:0]] = {ones, 1'b1, 5'(k)};
          in_run[2*k +: 3] = 3'b111;
          freed  += 17;
          next_w = k + 2;
        end else begin
          meta[nruns[1:0]] = {ones, 1'b0, 5'(k)};
          in_run[2*k +: 2] = 2'b11;
          freed  += 9;
          next_w = k + 1;
        end
        nruns = nruns + 3'd1;
        if (freed >= TARGET) done = 1'b1;
      end
    end
    ok_o = done;

    stream_c = '0;
    j = 0;
    for (int b = 0; b < 64; b++) begin
      if (!in_run[b]) begin
        stream_c[8*j +: 8] = blk_i[8*b +: 8];
        j++;
      end
    end
    shifted_c = {28'b0, stream_c} << (7 * nruns);
    body_o = shifted_c[BODY_BITS-1:0];
    for (int r = 0; r < 4; r++)
      if (r < int'(nruns)) body_o[7*r +: 7] = meta[r];
  end

  // ---------------- decompress ----------------
  logic [BLOCK_BITS-1:0] stream_d;

  always_comb begin
    int unsigned freed;
    int unsigned n;
    int unsigned j;
    logic        covered;
    logic [7:0]  fill;
    logic [6:0]  m;
    int unsigned start;
    int unsigned len;
    freed = 0;
    n     = 0;
    for (int r = 0; r < 4; r++) begin
      if (freed < TARGET) begin
        m = body_i[7*r +: 7];
        freed += m[5] ? 17 : 9;
        n = r + 1;
      end
    end
    stream_d = BLOCK_BITS'({34'b0, body_i} >> (7 * n));
    j = 0;
    for (int b = 0; b < 64; b++) begin
      covered = 1'b0;
      fill    = 8'h00;
      for (int r = 0; r < 4; r++) begin
        m     = body_i[7*r +: 7];
        start = 2 * int'(m[4:0]);
        len   = m[5] ? 3 : 2;
        if (r < int'(n) && b >= int'(start) && b < int'(start + len)) begin
          covered = 1'b1;
          fill    = {8{m[6]}};
        end
      end
      if (covered) begin
        blk_o[8*b +: 8] = fill;
      end else begin
        blk_o[8*b +: 8] = stream_d[8*j +: 8];
        j++;
      end
    end
  end
endmodule
