// cop_pkg: sizes, scheme codes and hash constants shared by the COP
// ("compress and protect") memory-controller datapath.
//
// A 64-byte DRAM block is either stored raw or compressed to 60 bytes (480
// bits) plus four bytes of check bits. The 480-bit payload carries a 2-bit
// scheme selector in bits [1:0] and the compressed body in bits [479:2];
// every scheme must therefore free at least 34 bits. The payload is cut
// into four 120-bit parts, each gets 8 SECDED check bits to form a 128-bit
// code word, and each code word is XORed with its own static hash before it
// goes to DRAM. The sizes follow the document; the scheme codes, payload
// bit order and hash patterns are this design's own choices.
package cop_pkg;

  localparam int unsigned BLOCK_BITS   = 512;   // 64-byte block
  localparam int unsigned NSEG         = 4;     // code words per block
  localparam int unsigned SEG_BITS     = 128;   // (128,120) SECDED
  localparam int unsigned SEG_DATA     = 120;
  localparam int unsigned SEG_CHECK    = 8;
  localparam int unsigned PAYLOAD_BITS = NSEG * SEG_DATA;  // 480
  localparam int unsigned BODY_BITS    = PAYLOAD_BITS - 2; // 478
  localparam int unsigned CW_THRESHOLD = 3;     // valid code words => compressed

  typedef logic [BLOCK_BITS-1:0]   block_t;
  typedef logic [PAYLOAD_BITS-1:0] payload_t;
  typedef logic [BODY_BITS-1:0]    body_t;

  typedef enum logic [1:0] {
    SCHEME_NONE = 2'b00,
    SCHEME_TXT  = 2'b01,
    SCHEME_MSB  = 2'b10,
    SCHEME_RLE  = 2'b11
  } scheme_e;

  // Static hash XORed into code word k on writes and removed on reads, so
  // that a block of repeated values does not repeat a valid code word.
  // The 128-bit pattern of segment k is four 32-bit words from an odd
  // multiplicative sequence.
  function automatic logic [SEG_BITS-1:0] seg_hash(input int unsigned k);
    logic [31:0] w;
    logic [SEG_BITS-1:0] h;
    w = 32'h9E37_79B9 * (k + 1) + 32'h7F4A_7C15;
    for (int j = 0; j < 4; j++) begin
      h[32*j +: 32] = w;
      w = (w * 32'h0019_660D) + 32'h3C6E_F35F;
    end
    return h;
  endfunction

endpackage
