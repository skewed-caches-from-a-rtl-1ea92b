// elbow_pkg: sizes, types and shared helpers of the elbow cache.
//
// The elbow cache is a 2-way skewed-associative data cache: each of its two
// logical way-banks is indexed by a different XOR skewing function of the
// address, and blocks are replaced by the oldest CAT (cache allocation tick)
// timestamp. On a miss the cache may also relocate a young block to its
// alternate location in the other bank to make room for the new one.
//
// Default sizes follow the described configuration: 32 KB, 64-byte blocks,
// 256 blocks per bank, 8 KB pages, 5-bit timestamps taken from an 11-bit
// allocation counter (log2(512 blocks) + 2). The 32-bit physical address and
// the 64-bit processor word are choices of this design.
package elbow_pkg;

  // Address split: A = {a_N..a_0, b_12..b_0}; b bits are the page offset
  // (untranslated), a bits come from the translation.
  parameter int unsigned ADDR_W   = 32;
  parameter int unsigned OFFSET_W = 6;             // 64-byte block
  parameter int unsigned PAGE_W   = 13;            // 8 KB page
  parameter int unsigned XOR_W    = PAGE_W - OFFSET_W;  // b_12..b_6 XOR a_7..a_1
  parameter int unsigned INDEX_W  = XOR_W + 1;     // a_0 fills the index MSB
  parameter int unsigned TAG_W    = ADDR_W - PAGE_W;    // a_18..a_0 stored as tag
  parameter int unsigned LINE_W   = 512;           // 64 bytes of data
  parameter int unsigned WORD_W   = 64;            // processor word
  parameter int unsigned TS_W     = 5;             // CAT timestamp width
  parameter int unsigned CAT_W    = $clog2(2 * (1 << INDEX_W)) + 2;  // 11

  // Relocation restrictions
  parameter int unsigned RELOC_WINDOW   = 64;  // misses in the sliding window
  parameter int unsigned RELOC_MAX      = 16;  // relocations allowed in it
  parameter int unsigned RELOC_MAX_DIST = 3;   // max CAT distance of a moved block

  // Per-line state held in a way-bank.
  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic [TAG_W-1:0] tag;
  } line_meta_t;

  // Processor request (one word, byte strobes for stores).
  typedef struct packed {
    logic                  we;
    logic [ADDR_W-1:0]     addr;
    logic [WORD_W-1:0]     wdata;
    logic [WORD_W/8-1:0]   wstrb;
  } cpu_req_t;

  typedef struct packed {
    logic              hit;    // 1: served without a fill
    logic [WORD_W-1:0] rdata;  // load data (store: the updated word)
  } cpu_rsp_t;

  // The four replacement candidates of a miss.
  typedef enum logic [1:0] {
    CAND_A = 2'd0,   // primary in bank 0
    CAND_B = 2'd1,   // primary in bank 1
    CAND_C = 2'd2,   // secondary: alternate location of A (bank 1)
    CAND_D = 2'd3    // secondary: alternate location of B (bank 0)
  } cand_e;

  // One-cycle event pulses, for performance counting.
  typedef struct packed {
    logic hit;            // request hit in either bank
    logic miss;           // request missed, a replacement was made
    logic fill_invalid;   // the fill used an empty primary slot
    logic relocation;     // a primary block was moved to its alternate slot
    logic reloc_by_age;   // a secondary was oldest but the moved block was too old
    logic reloc_by_window;// a relocation was refused by the sliding window
    logic writeback;      // a dirty victim was written back
  } cache_events_t;

  // One-bit left rotation (sigma) of an XOR_W-bit field.
  function automatic logic [XOR_W-1:0] rotl1(input logic [XOR_W-1:0] v);
    return {v[XOR_W-2:0], v[XOR_W-1]};
  endfunction

endpackage
