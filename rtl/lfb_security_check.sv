// lfb_security_check: the SpecLFB security check on one line fill buffer
// entry.
//
// What it does
//   A line returned from the lower level waits in the LFB. It may be
//   refilled into the L1D arrays only when the ROB unsafe mask bit of the
//   row that holds its requesting load is 0 (the check printed in the
//   design overview as !rob_unsafe_mask(rob_entry_id)).
//
// How it works
//   One MSHR entry can hold several merged requests for the same line. Each
//   live request looks up the mask bit of its own ROB row. The line passes
//   when at least one live request is safe: that load would bring the line
//   into the cache anyway, so the cache state no longer depends on a
//   speculative access. `live` tells whether any request is still alive;
//   a line whose requests have all been squashed must be dropped.
//
// Interface and timing
//   Purely combinational. req_row[k] is the ROB row of request k.
//
//   The per-request check follows the SpecLFB description; the rule for
//   merged requests ("any safe request lets the line in") is this design's
//   own choice.
module lfb_security_check
  import speclfb_pkg::*;
#(
  parameter int unsigned ROWS  = speclfb_pkg::ROB_ROWS,
  parameter int unsigned NREQ  = speclfb_pkg::MAX_MERGE,
  localparam int unsigned RW   = $clog2(ROWS)
) (
  input  logic [ROWS-1:0]  rob_unsafe_mask,
  input  logic [NREQ-1:0]  req_valid,
  input  logic [RW-1:0]    req_row [NREQ],
  output logic             pass,
  output logic             live
);

  always_comb begin
    pass = 1'b0;
    for (int k = 0; k < NREQ; k++)
      if (req_valid[k] && !rob_unsafe_mask[req_row[k]]) pass = 1'b1;
  end

  assign live = |req_valid;

endmodule
