// mlc_pkg: constants and types shared by the multi-lateral data cache.
//
// The multi-lateral cache pairs a conventional, multi-cycle DL1 data cache with
// a small one-cycle "critical" cache. Every cache of the design uses 32-byte
// lines (this follows the design; all configurations use that line size).
// The 64-bit data word and the 32-bit physical address are this design's own
// choices: the processor is Alpha-like, but no widths are fixed by the design.
//
// Types:
//   mem_req_t   a load or store as the core presents it to a cache
//   mem_resp_t  the data a cache returns for a load
//   l2_req_t    a line read or line write-back towards the level-2 cache
//   l2_resp_t   a line returned by the level-2 cache for a read
package mlc_pkg;

  localparam int unsigned ADDR_W     = 32;                // physical address bits
  localparam int unsigned WORD_W     = 64;                // load/store data width
  localparam int unsigned WORD_BYTES = WORD_W / 8;
  localparam int unsigned LINE_BYTES = 32;                // cache line size
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / WORD_BYTES;
  localparam int unsigned OFFSET_W   = $clog2(LINE_BYTES);
  localparam int unsigned LADDR_W    = ADDR_W - OFFSET_W; // line address bits
  localparam int unsigned ID_W       = 4;                 // request tag bits

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [LADDR_W-1:0] line_addr_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [ID_W-1:0]    id_t;

  // Memory operation from the core. addr is byte-aligned to a word;
  // be selects the bytes of wdata a store writes.
  typedef struct packed {
    logic                  store;
    id_t                   id;
    addr_t                 addr;
    word_t                 wdata;
    logic [WORD_BYTES-1:0] be;
  } mem_req_t;

  // Load result. miss tells whether the cache had to refill the line.
  typedef struct packed {
    id_t   id;
    word_t rdata;
    logic  miss;
  } mem_resp_t;

  // Level-2 line request: a read (write=0) or a dirty-line write-back.
  typedef struct packed {
    logic       write;
    line_addr_t laddr;
    line_t      wdata;
  } l2_req_t;

  typedef struct packed {
    line_t rdata;
  } l2_resp_t;

endpackage
