// coper_pkg: formats of COP-ER, the extension of COP that also protects
// incompressible blocks through a small ECC region in main memory.
//
// An incompressible block has its low 34 bits displaced by a 28-bit pointer
// and the pointer's 6 Hamming check bits. The pointer names an ECC entry:
// a valid bit, the 34 displaced bits and 11 SECDED check bits over the
// whole original 512-bit block, 46 bits in all, 11 entries to a 64-byte
// ECC-region block. The sizes are the document's; the bit positions and
// the pointer format {ECC block number, slot} are this design's choices.
package coper_pkg;
  localparam int unsigned PTR_W     = 28;
  localparam int unsigned PTR_ECC_W = 6;
  localparam int unsigned DISP_W    = PTR_W + PTR_ECC_W;   // 34 displaced bits
  localparam int unsigned BLK_ECC_W = 11;                  // (523,512) SECDED
  localparam int unsigned ENTRY_W   = 1 + DISP_W + BLK_ECC_W; // 46
  localparam int unsigned EPB       = 11;                  // entries per 512-bit block
  localparam int unsigned SLOT_W    = 4;
  localparam int unsigned BLKNUM_W  = PTR_W - SLOT_W;      // 24

  typedef struct packed {
    logic                 valid;
    logic [DISP_W-1:0]    data;    // displaced bits of the block
    logic [BLK_ECC_W-1:0] ecc;     // check bits of the original block
  } entry_t;

  typedef struct packed {
    logic [BLKNUM_W-1:0] blknum;   // ECC-entry block number in the region
    logic [SLOT_W-1:0]   slot;     // entry within that block, 0..10
  } ptr_t;
endpackage
