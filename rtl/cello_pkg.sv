// cello_pkg: constants and types shared by the CELLO load/store queue blocks.
//
// CELLO tags every load and store with the region it was allocated in: a
// data-race-free (DRF) region or a synchronization (sync) region. The Mode bit
// encoding (1 = DRF, 0 = sync) and the sizes of the default configuration
// (2-way SMT, 192-entry LQ, 128-entry SQ, 3 LQ allocation ports, 2 SQ
// allocation ports, 2 LQ search ports, 8-bit num-sync counters, 512-entry ROB)
// follow the source design. The address width, cache-line size and the
// granularity of the dependence (D-) search are this design's own choices.
package cello_pkg;

  // Mode bit stored with every LQ and SQ entry
  typedef enum logic {
    MODE_SYNC = 1'b0,
    MODE_DRF  = 1'b1
  } mode_e;

  // Kinds of LQ search (the three rows of the LQ-search table of an SMT core)
  typedef enum logic [1:0] {
    SRCH_NONE  = 2'd0,
    SRCH_D     = 2'd1,  // store resolved its address: squash younger same-thread loads
    SRCH_MCORE = 2'd2,  // store writes to L1: squash loads of the co-running threads
    SRCH_MMEM  = 2'd3   // invalidation or eviction: squash loads of every thread
  } srch_kind_e;

  // Memory-system events that reach the core
  typedef enum logic {
    EVT_INVALIDATION = 1'b0,
    EVT_EVICTION     = 1'b1
  } mem_evt_e;

  // Default sizes
  localparam int unsigned THREADS_DEF    = 2;
  localparam int unsigned LQ_ENTRIES_DEF = 192;
  localparam int unsigned SQ_ENTRIES_DEF = 128;
  localparam int unsigned LQ_ALLOC_W_DEF = 3;
  localparam int unsigned SQ_ALLOC_W_DEF = 2;
  localparam int unsigned LQ_SPORTS_DEF  = 2;
  localparam int unsigned NSYNC_W_DEF    = 8;
  localparam int unsigned ADDR_W_DEF     = 48;  // physical address bits (own choice)
  localparam int unsigned LINE_OFF_DEF   = 6;   // 64-byte cache line (own choice)
  localparam int unsigned WORD_OFF_DEF   = 3;   // 8-byte D-search granularity (own choice)
  localparam int unsigned TAG_W_DEF      = 9;   // ROB tag for a 512-entry ROB

  // Circular-buffer pointers. A queue of DEPTH entries (DEPTH need not be a
  // power of two) uses pointers that run from 0 to 2*DEPTH-1; the extra lap
  // tells a full queue from an empty one. The entry index is ptr mod DEPTH.
  function automatic int unsigned ptr_idx(int unsigned p, int unsigned depth);
    return (p >= depth) ? p - depth : p;
  endfunction

  function automatic int unsigned ptr_add(int unsigned p, int unsigned n, int unsigned depth);
    int unsigned s;
    s = p + n;
    return (s >= 2 * depth) ? s - 2 * depth : s;
  endfunction

  // number of steps from b forward to a
  function automatic int unsigned ptr_diff(int unsigned a, int unsigned b, int unsigned depth);
    return (a >= b) ? a - b : a + 2 * depth - b;
  endfunction

endpackage
