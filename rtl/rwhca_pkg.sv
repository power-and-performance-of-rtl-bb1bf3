// rwhca_pkg: types and constants shared by the read-write aware hybrid cache (RWHCA).
//
// The cache line is 128 bytes, as in the L2 configuration this design follows; every
// data path in the cache moves one whole line per transfer. A store carries a byte mask so
// that partial-line writes from the upper level can be merged into a line.
// The event record is a set of one-cycle pulses the controller raises for each mechanism
// (right/wrong-region hits, misses, swaps, write-backs, swap-buffer drains, stalls), meant
// for statistics counters and for testbenches.
package rwhca_pkg;

  localparam int unsigned LINE_BYTES = 128;
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8;
  localparam int unsigned OFFSET_W   = $clog2(LINE_BYTES);

  typedef logic [LINE_BITS-1:0]  line_t;
  typedef logic [LINE_BYTES-1:0] bmask_t;

  // Request kind from the upper-level cache.
  typedef enum logic {
    OP_LOAD  = 1'b0,
    OP_STORE = 1'b1
  } op_e;

  // Region a line lives in: the SRAM write region or the NVM read region.
  typedef enum logic {
    REG_READ  = 1'b0,
    REG_WRITE = 1'b1
  } region_e;

  // One-cycle event pulses.
  typedef struct packed {
    logic hit_right;     // load hit in read region or store hit in write region
    logic hit_wrong;     // load hit in write region or store hit in read region
    logic miss_load;     // load miss, line allocated in the read region
    logic miss_store;    // store miss, line allocated in the write region
    logic swap;          // a swap between the two regions was started
    logic writeback;     // dirty victim written to memory
    logic drain;         // one swap-buffer entry written into the read region
    logic conflict;      // request waited for the swap buffer to drain its set
    logic snoop_retry;   // a snoop hit the swap buffer and was told to retry
  } ev_t;

  // Merge the bytes of 'wdata' selected by 'mask' into 'old'.
  function automatic line_t merge_line(line_t old, line_t wdata, bmask_t mask);
    line_t r;
    r = old;
    for (int b = 0; b < LINE_BYTES; b++)
      if (mask[b]) r[b*8 +: 8] = wdata[b*8 +: 8];
    return r;
  endfunction

endpackage
