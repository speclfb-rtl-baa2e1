// speclfb_pkg: constants and types shared by the SpecLFB blocks.
//
// The defaults describe the main evaluated core, a two-wide out-of-order
// RV64 core: 64-entry ROB, 16-entry load and store queues, a 16 KB 4-way L1
// data cache with 64-byte lines and 2 MSHRs. The ROB is organised as rows
// of ROB_BANKS slots (one slot per decode lane), so 64 entries form 32 rows;
// the ROB unsafe mask has one bit per row. The branch-tag count, the number
// of requests an MSHR can merge and the physical address width are this
// design's own choices.
package speclfb_pkg;

  // ROB geometry
  localparam int unsigned ROB_ENTRIES = 64;
  localparam int unsigned ROB_BANKS   = 2;
  localparam int unsigned ROB_ROWS    = ROB_ENTRIES / ROB_BANKS;

  // Branch tags (one bit of br_mask per in-flight branch)
  localparam int unsigned MAX_BR = 12;

  // Load / store queues
  localparam int unsigned LDQ_ENTRIES = 16;
  localparam int unsigned STQ_ENTRIES = 16;

  // Memory system
  localparam int unsigned PADDR_BITS  = 32;
  localparam int unsigned XLEN        = 64;
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned L1D_BYTES   = 16 * 1024;
  localparam int unsigned L1D_WAYS    = 4;
  localparam int unsigned L1D_SETS    = L1D_BYTES / (LINE_BYTES * L1D_WAYS);
  localparam int unsigned N_MSHR      = 2;
  localparam int unsigned MAX_MERGE   = 4;

  // Life cycle of one MSHR/LFB entry.
  //   FREE   : unused
  //   REQ    : miss recorded, line request not yet accepted by the bus
  //   WAIT   : request sent, waiting for the line
  //   HELD   : line is in the LFB, waiting for the security check to pass
  //   REFILL : check passed, writing the line into the L1D arrays
  //   REPLAY : returning data to the merged loads, one per cycle
  typedef enum logic [2:0] {
    LFB_FREE   = 3'd0,
    LFB_REQ    = 3'd1,
    LFB_WAIT   = 3'd2,
    LFB_HELD   = 3'd3,
    LFB_REFILL = 3'd4,
    LFB_REPLAY = 3'd5
  } lfb_state_e;

endpackage
