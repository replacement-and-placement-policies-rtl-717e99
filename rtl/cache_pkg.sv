// cache_pkg: constants and types shared by the prefetch-aware L1 data cache.
//
// Geometry follows the main configuration evaluated for these policies: 32-bit byte
// addresses, 4-byte words, 32-byte lines (eight words), a 16 KB 4-way data cache and
// a 1 KB prefetch cache. Block addresses (address bits 31:5) name a line everywhere
// between the blocks. The configuration struct selects which of the three prefetch
// line policies is active (Instant Zero, Priority Pre-Updating with victim cache,
// prefetch cache); bundling them into one run-time struct is a choice of this design.
package cache_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned LINE_BYTES  = 32;
  localparam int unsigned LINE_WORDS  = LINE_BYTES / (WORD_W / 8);   // 8
  localparam int unsigned OFFSET_W    = $clog2(LINE_BYTES);          // 5
  localparam int unsigned WORD_SEL_W  = $clog2(LINE_WORDS);          // 3
  localparam int unsigned BLK_W       = ADDR_W - OFFSET_W;           // 27
  localparam int unsigned LINE_W      = LINE_BYTES * 8;              // 256

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [BLK_W-1:0]  blk_t;
  typedef logic [LINE_W-1:0] line_t;

  // Hot-bit operations applied to one set.
  typedef enum logic [2:0] {
    HOP_NONE  = 3'd0,  // leave priorities alone
    HOP_LRU   = 3'd1,  // referenced line becomes the highest priority
    HOP_IZ    = 3'd2,  // referenced IAP line drops to priority 0 (Instant Zero)
    HOP_FILL  = 3'd3,  // new line placed in a way: it becomes the highest priority
    HOP_DEC   = 3'd4   // priority pre-update: the line's priority drops by one
  } hot_op_e;

  // Kind of a prefetch request.
  typedef enum logic [1:0] {
    PF_NONE = 2'd0,
    PF_POM  = 2'd1,    // prefetch-on-miss (default prefetching)
    PF_IAP  = 2'd2     // instruction opcode and addressing mode prefetching
  } pf_kind_e;

  // Replacement policy of the prefetch cache: FIFO (the chosen one), or the LRU and
  // Instant Zero policies it was compared with.
  typedef enum logic [1:0] {
    PFC_FIFO,
    PFC_LRU,
    PFC_IZ
  } pfc_repl_e;

  typedef struct packed {
    blk_t     blk;     // block to prefetch
    pf_kind_e kind;    // who asked for it
    logic     iz;      // IAP next-block prefetch: the line obeys Instant Zero
  } pf_req_t;

  // Per-line flags carried with a line when it is installed.
  typedef struct packed {
    logic dirty;       // D
    logic iap;         // I: line obeys Instant Zero once referenced
    logic pf_unref;    // prefetched and not yet referenced
  } line_flags_t;

  // Run-time selection of the policies.
  typedef struct packed {
    logic iap_en;      // combined IAP (else prefetch-on-miss only)
    logic iz_en;       // mixed LRU / Instant Zero replacement in the data cache
    logic ppu_en;      // priority pre-updating
    logic vc_en;       // victim cache for unreferenced prefetched lines
    logic pfc_en;      // prefetch cache holds the IAP lines
  } cfg_t;

  // One-cycle event pulses, brought out for performance counting.
  typedef struct packed {
    logic dc_hit;      // reference hit the data cache
    logic pfc_hit;     // reference hit the prefetch cache
    logic vc_hit;      // reference found its line in the victim cache
    logic miss;        // reference went to the second-level memory
    logic iz;          // Instant Zero applied to a referenced IAP line
    logic ppu_dec;     // a pre-update lowered a line's priority
    logic vc_ins;      // an unreferenced prefetched line entered the victim cache
    logic pf_issue;    // a prefetch was sent to the second-level memory
    logic pf_skip;     // a queued prefetch was dropped: line already on chip
    logic pf_abort;    // a demand fetch aborted a prefetch in flight
    logic pf_partial;  // a miss waited for the prefetch of its own line (partial hit)
    logic pq_overflow; // a prefetch request met a full prefetch queue and was dropped
    logic vc_evict;    // a full victim cache pushed out its oldest line
    logic pf_fill_dc;  // a prefetched line was placed in the data cache
    logic pf_fill_pfc; // a prefetched line was placed in the prefetch cache
    logic wb;          // a dirty line was written back
  } events_t;

  function automatic blk_t blk_of(addr_t a);
    return a[ADDR_W-1:OFFSET_W];
  endfunction

endpackage
