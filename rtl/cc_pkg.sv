// cc_pkg: shared constants and types of the thread-priority-aware shared data cache.
//
// The cache geometry follows the evaluated L1 data cache: 4 ways, 8 KB, 32-byte lines,
// 32-bit addresses, which gives 64 sets, a 5-bit line offset, a 6-bit set index and
// a 21-bit tag; the modules derive these widths from their own parameters. The
// mode type names the two allocation policies between which the dual-mode hybrid
// scheme switches; the event struct names the mechanisms the cache reports.
package cc_pkg;

  localparam int unsigned ADDR_W         = 32;
  localparam int unsigned WORD_W         = 32;
  localparam int unsigned DC_LINE_BYTES  = 32;
  localparam int unsigned DC_NUM_WAYS    = 4;
  localparam int unsigned DC_CACHE_BYTES = 8192;
  localparam int unsigned DC_NUM_SETS    = DC_CACHE_BYTES / (DC_LINE_BYTES * DC_NUM_WAYS);  // 64

  // Allocation policy in force. CBV: collision tag / bit vector scheme.
  // HPAL: "HP always locked", lock bit set together with the HP bit.
  typedef enum logic {
    MODE_CBV  = 1'b0,
    MODE_HPAL = 1'b1
  } cc_mode_e;

  // One-cycle event pulses reported by the cache, one per mechanism of the scheme.
  typedef struct packed {
    logic hit;           // a request hit
    logic miss;          // a request missed
    logic lp_evicts_hp;  // an LP line fill replaced a valid HP line (thread collision)
    logic ct_write;      // the victim's tag bits were stored in the collision entry
    logic relock;        // an HP fill matched the collision entry and was locked
    logic forced_evict;  // every way of the set was locked; a locked line was replaced
    logic hpal_lock;     // an HP line was locked on allocation in HPAL mode
    logic write_through; // a store was sent to the next memory level
  } cc_events_t;

endpackage
