// ipatch_pkg: sizes shared by the iPatch blocks (L1 caches with
// subblock disabling, MSHRs, store queue, micro-op cache).
//
// A 64-byte L1 line has 8 subblocks of 8 bytes that can be disabled one by
// one. Addresses are byte addresses of ADDR_W bits; a "word" here is one
// 8-byte subblock, which is also the size of a store-queue entry and of the
// fetch block that one micro-op cache entry covers. Line size, subblock
// count and the structure sizes are the document's; ADDR_W and the 8-byte
// store-queue entry and fetch block are this design's choices.
package ipatch_pkg;
  localparam int unsigned ADDR_W     = 40;
  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned NSUB       = 8;
  localparam int unsigned SUB_BYTES  = LINE_BYTES / NSUB;   // 8
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);  // 6
  localparam int unsigned SUB_W      = $clog2(NSUB);        // 3
  localparam int unsigned LADDR_W    = ADDR_W - OFF_W;      // line address
  localparam int unsigned WADDR_W    = ADDR_W - 3;          // 8-byte word address

  typedef logic [LADDR_W-1:0]      laddr_t;
  typedef logic [WADDR_W-1:0]      waddr_t;
  typedef logic [63:0]             word_t;
  typedef logic [LINE_BYTES*8-1:0] line_t;
  typedef logic [NSUB-1:0]         fault_t;

  function automatic laddr_t line_of(input waddr_t w);
    return w[WADDR_W-1:SUB_W];
  endfunction
  function automatic logic [SUB_W-1:0] sub_of(input waddr_t w);
    return w[SUB_W-1:0];
  endfunction
endpackage
