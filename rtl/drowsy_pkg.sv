// drowsy_pkg: constants and types shared by the drowsy cache hierarchy.
//
// The default sizes are those of the evaluated machine: a 32 KB, 4-way L1
// data cache with 32-byte lines and a 1-cycle access, backed by a 512 KB,
// 4-way L2 with 32-byte lines and a 10-cycle access. The L1 keeps the five
// most recently used lines awake (RD5) and the L2 only one (RD1). Waking a
// drowsy line costs one cycle. The 32-bit physical address and the 64-bit
// load/store word are choices of this design.
package drowsy_pkg;

  // Hierarchy defaults
  localparam int unsigned DEF_ADDR_W      = 32;
  localparam int unsigned DEF_LINE_BYTES  = 32;
  localparam int unsigned DEF_WORD_BYTES  = 8;
  localparam int unsigned L1_SIZE_BYTES   = 32 * 1024;
  localparam int unsigned L1_WAYS         = 4;
  localparam int unsigned L1_HIT_LATENCY  = 1;
  localparam int unsigned L1_RD_N         = 5;
  localparam int unsigned L2_SIZE_BYTES   = 512 * 1024;
  localparam int unsigned L2_WAYS         = 4;
  localparam int unsigned L2_HIT_LATENCY  = 10;
  localparam int unsigned L2_RD_N         = 1;

  // Controller states of drowsy_cache
  typedef enum logic [3:0] {
    C_INIT,       // after reset: clear the tag and LRU arrays, one set a cycle
    C_IDLE,       // ready for a request; the arrays are read in this cycle
    C_LOOKUP,     // tags and data of the set are available, compare
    C_WAKE,       // hit line was drowsy: wake it and re-read its data
    C_WAIT,       // pad the hit to the configured access latency
    C_RESPOND,    // return the response to a miss upstream
    C_VICTIM,     // miss: wake the victim frame and read it for write-back
    C_WB_REQ,     // send the dirty victim line downstream
    C_WB_RESP,    // wait for the write-back acknowledge
    C_FILL_REQ,   // request the missing line downstream
    C_FILL_RESP   // wait for the line and write it into the frame
  } cache_state_e;

  // Width of an LRU age counter for an n-entry structure (at least one bit).
  function automatic int unsigned age_width(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
