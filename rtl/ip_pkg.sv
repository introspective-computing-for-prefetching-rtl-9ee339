// ip_pkg: types and constants shared by the introspective prefetching design.
//
// The design works on 32-bit byte addresses and 64-byte cache blocks. Everything
// that travels between the L1 data cache, the miss queue and the secondary
// prefetch engine is a block address: the byte address with its 6 offset bits
// removed (26 bits). The 64-byte block follows the cache configuration used for
// the evaluation; the 32-bit address and word width are this design's choice.
package ip_pkg;

  localparam int unsigned ADDR_W      = 32;                  // byte address width
  localparam int unsigned WORD_W      = 32;                  // CPU load/store width
  localparam int unsigned BLOCK_BYTES = 64;                  // cache block size
  localparam int unsigned OFFSET_W    = $clog2(BLOCK_BYTES); // 6
  localparam int unsigned BLK_W       = ADDR_W - OFFSET_W;   // 26: block address
  localparam int unsigned LINE_W      = BLOCK_BYTES * 8;     // 512 bits per block
  localparam int unsigned WORDS_PER_LINE = BLOCK_BYTES / (WORD_W / 8); // 16

  typedef logic [ADDR_W-1:0]     addr_t;
  typedef logic [WORD_W-1:0]     word_t;
  typedef logic [WORD_W/8-1:0]   be_t;
  typedef logic [BLK_W-1:0]      blk_addr_t;
  typedef logic [LINE_W-1:0]     line_t;

endpackage
