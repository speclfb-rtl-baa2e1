// mshr_lfb: miss status holding registers (MSHRs) with the line fill buffer
// (LFB) and the SpecLFB security check.
//
// What it does
//   Records L1D misses, requests the missing lines from the lower level,
//   keeps each returned line in the LFB and writes it into the L1D arrays
//   only after the security check has passed. A miss to a line that already
//   has an entry is merged into that entry; no second request is sent. When
//   every load waiting on a line has been squashed, the line is dropped from
//   the LFB without touching the cache.
//
// How it works
//   Each of the NM entries steps through FREE -> REQ -> WAIT -> HELD ->
//   REFILL -> REPLAY -> FREE (see lfb_state_e):
//     REQ    the line request is offered on the bus, lowest entry first;
//     WAIT   the line is outstanding; the response is tagged with the entry;
//     HELD   the line sits in the LFB; one lfb_security_check per entry
//            compares the ROB rows of the merged loads with the ROB unsafe
//            mask and lets the line go once any live load is safe;
//     REFILL the line is offered to the cache arrays (refill_*);
//     REPLAY the merged loads get their 64-bit words back, one per cycle.
//   A load squashed by a mispredict or a flush (kill_vec) is removed from
//   every entry at once. An entry in WAIT whose loads are all gone still
//   takes its response and then frees itself; an entry in HELD with no live
//   load frees itself at once. A committed store that writes a line held in
//   the LFB updates the held copy (st_*).
//
// Interface and timing
//   miss_ready is combinational on miss_line. The bus request follows a
//   valid/ready handshake; the response has no back-pressure. A line that
//   arrives at cycle t and is already safe is offered for refill at t+2 and
//   its first load is replayed at t+3 or later. Reset (active low,
//   synchronous) frees all entries.
//
//   Merging, refilling through the LFB, the security check and discarding
//   squashed lines follow the SpecLFB description. The entry count (2) is
//   the evaluated core's; the number of merged loads per entry, the state
//   encoding and the replay port are this design's own.
module mshr_lfb #(
  parameter int unsigned NM         = speclfb_pkg::N_MSHR,
  parameter int unsigned NREQ       = speclfb_pkg::MAX_MERGE,
  parameter int unsigned ROWS       = speclfb_pkg::ROB_ROWS,
  parameter int unsigned BANKS      = speclfb_pkg::ROB_BANKS,
  parameter int unsigned PADDR      = speclfb_pkg::PADDR_BITS,
  parameter int unsigned LINE_BYTES = speclfb_pkg::LINE_BYTES,
  parameter int unsigned XLEN       = speclfb_pkg::XLEN,
  localparam int unsigned ENTRIES   = ROWS * BANKS,
  localparam int unsigned SW        = $clog2(ENTRIES),
  localparam int unsigned RW        = $clog2(ROWS),
  localparam int unsigned WORDS     = LINE_BYTES * 8 / XLEN,
  localparam int unsigned OW        = $clog2(WORDS),
  localparam int unsigned LB        = $clog2(LINE_BYTES),
  localparam int unsigned LAW       = PADDR - LB,
  localparam int unsigned LINEW     = LINE_BYTES * 8,
  localparam int unsigned IDW       = (NM > 1) ? $clog2(NM) : 1,
  localparam int unsigned KW        = (NREQ > 1) ? $clog2(NREQ) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ROWS-1:0]      rob_unsafe_mask,
  input  logic [ENTRIES-1:0]   kill_vec,
  // new miss (or secondary miss to merge)
  input  logic                 miss_valid,
  input  logic [LAW-1:0]       miss_line,
  input  logic [SW-1:0]        miss_slot,
  input  logic [OW-1:0]        miss_word,
  output logic                 miss_ready,
  // line lookup for stores: line outstanding (REQ/WAIT)
  output logic                 line_outstanding,
  // committed store into a held line
  input  logic                 st_valid,
  input  logic [LAW-1:0]       st_line,
  input  logic [OW-1:0]        st_word,
  input  logic [XLEN-1:0]      st_data,
  input  logic [XLEN/8-1:0]    st_be,
  // line request to the lower level
  output logic                 breq_valid,
  output logic [LAW-1:0]       breq_line,
  output logic [IDW-1:0]       breq_id,
  input  logic                 breq_ready,
  // line response
  input  logic                 bresp_valid,
  input  logic [IDW-1:0]       bresp_id,
  input  logic [LINEW-1:0]     bresp_data,
  // refill into the L1D arrays
  output logic                 refill_valid,
  output logic [LAW-1:0]       refill_line,
  output logic [LINEW-1:0]     refill_data,
  input  logic                 refill_ready,
  // replay of load data to merged loads
  output logic                 rp_valid,
  output logic [SW-1:0]        rp_slot,
  output logic [XLEN-1:0]      rp_data,
  input  logic                 rp_ready,
  // status
  output logic [NM-1:0]        held_blocked,
  output logic                 drop_pulse,
  output logic [NM-1:0]        busy
);

  import speclfb_pkg::*;

  lfb_state_e       st_q   [NM];
  logic [LAW-1:0]   line_q [NM];
  logic [LINEW-1:0] data_q [NM];
  logic [NREQ-1:0]  rv_q   [NM];
  logic [SW-1:0]    rslot_q[NM][NREQ];
  logic [OW-1:0]    rword_q[NM][NREQ];

  // requests alive this cycle (squashed ones removed)
  logic [NREQ-1:0]  rlive  [NM];
  logic [RW-1:0]    rrow   [NM][NREQ];
  logic [NM-1:0]    pass, live;

  always_comb begin
    for (int e = 0; e < NM; e++)
      for (int k = 0; k < NREQ; k++) begin
        rlive[e][k] = rv_q[e][k] && !kill_vec[rslot_q[e][k]];
        rrow[e][k]  = RW'(rslot_q[e][k] / SW'(BANKS));
      end
  end

  for (genvar e = 0; e < NM; e++) begin : g_chk
    lfb_security_check #(.ROWS(ROWS), .NREQ(NREQ)) u_chk (
      .rob_unsafe_mask (rob_unsafe_mask),
      .req_valid       (rlive[e]),
      .req_row         (rrow[e]),
      .pass            (pass[e]),
      .live            (live[e])
    );
  end

  // miss allocation / merge
  logic          merge_hit, free_found;
  logic [IDW-1:0] merge_e, free_e;
  logic [NREQ-1:0] merge_room;
  logic [KW-1:0] merge_k;
  always_comb begin
    merge_hit  = 1'b0;
    merge_e    = '0;
    free_found = 1'b0;
    free_e     = '0;
    line_outstanding = 1'b0;
    for (int e = NM - 1; e >= 0; e--) begin
      // an entry about to drop its line cannot take a new request
      if (line_q[e] == miss_line &&
          (st_q[e] == LFB_REQ ||
           (st_q[e] == LFB_WAIT && (live[e] || !(bresp_valid && bresp_id == IDW'(e)))) ||
           (st_q[e] == LFB_HELD && live[e]))) begin
        merge_hit = 1'b1;
        merge_e   = IDW'(e);
      end
      if (st_q[e] == LFB_FREE) begin
        free_found = 1'b1;
        free_e     = IDW'(e);
      end
      if ((st_q[e] == LFB_REQ || st_q[e] == LFB_WAIT) && line_q[e] == st_line)
        line_outstanding = 1'b1;
    end
    merge_room = ~rlive[merge_e];
    merge_k    = '0;
    for (int k = NREQ - 1; k >= 0; k--) if (merge_room[k]) merge_k = (KW)'(k);
  end
  assign miss_ready = merge_hit ? (|merge_room) : free_found;

  // bus request arbitration (lowest REQ entry)
  always_comb begin
    breq_valid = 1'b0;
    breq_id    = '0;
    for (int e = NM - 1; e >= 0; e--)
      if (st_q[e] == LFB_REQ) begin
        breq_valid = 1'b1;
        breq_id    = IDW'(e);
      end
    breq_line = line_q[breq_id];
  end

  // refill arbitration (lowest REFILL entry)
  logic [IDW-1:0] rf_e;
  always_comb begin
    refill_valid = 1'b0;
    rf_e         = '0;
    for (int e = NM - 1; e >= 0; e--)
      if (st_q[e] == LFB_REFILL) begin
        refill_valid = 1'b1;
        rf_e         = IDW'(e);
      end
    refill_line = line_q[rf_e];
    refill_data = data_q[rf_e];
  end

  // replay arbitration (lowest REPLAY entry, lowest live request)
  logic [IDW-1:0] rp_e;
  logic [KW-1:0] rp_k;
  always_comb begin
    rp_valid = 1'b0;
    rp_e     = '0;
    rp_k     = '0;
    for (int e = NM - 1; e >= 0; e--)
      if (st_q[e] == LFB_REPLAY && |rlive[e]) begin
        rp_valid = 1'b1;
        rp_e     = IDW'(e);
      end
    for (int k = NREQ - 1; k >= 0; k--) if (rlive[rp_e][k]) rp_k = (KW)'(k);
    rp_slot = rslot_q[rp_e][rp_k];
    rp_data = data_q[rp_e][rword_q[rp_e][rp_k]*XLEN +: XLEN];
  end

  always_comb begin
    for (int e = 0; e < NM; e++) held_blocked[e] = (st_q[e] == LFB_HELD) && live[e] && !pass[e];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      drop_pulse <= 1'b0;
      for (int e = 0; e < NM; e++) begin
        st_q[e]   <= LFB_FREE;
        line_q[e] <= '0;
        data_q[e] <= '0;
        rv_q[e]   <= '0;
        for (int k = 0; k < NREQ; k++) begin
          rslot_q[e][k] <= '0;
          rword_q[e][k] <= '0;
        end
      end
    end else begin
      logic drop;
      drop = 1'b0;
      for (int e = 0; e < NM; e++) begin
        logic [NREQ-1:0] rv_n;
        rv_n = rlive[e];
        unique case (st_q[e])
          LFB_FREE: ;
          LFB_REQ:
            if (breq_ready && breq_id == IDW'(e)) st_q[e] <= LFB_WAIT;
          LFB_WAIT:
            if (bresp_valid && bresp_id == IDW'(e)) begin
              data_q[e] <= bresp_data;
              if (live[e]) st_q[e] <= LFB_HELD;
              else begin
                st_q[e] <= LFB_FREE;
                drop     = 1'b1;
              end
            end
          LFB_HELD:
            if (!live[e]) begin
              st_q[e] <= LFB_FREE;
              drop     = 1'b1;
            end else if (pass[e]) begin
              st_q[e] <= LFB_REFILL;
            end
          LFB_REFILL:
            if (refill_ready && rf_e == IDW'(e)) st_q[e] <= LFB_REPLAY;
          LFB_REPLAY: begin
            if (rp_valid && rp_ready && rp_e == IDW'(e)) rv_n[rp_k] = 1'b0;
            if (rv_n == '0) st_q[e] <= LFB_FREE;
          end
          default: st_q[e] <= LFB_FREE;
        endcase
        // a committed store updates a held copy
        if (st_valid && st_q[e] == LFB_HELD && line_q[e] == st_line)
          for (int b = 0; b < XLEN / 8; b++)
            if (st_be[b]) data_q[e][st_word*XLEN + b*8 +: 8] <= st_data[b*8 +: 8];
        // new or merged miss
        if (miss_valid && miss_ready) begin
          if (merge_hit && merge_e == IDW'(e)) begin
            rv_n[merge_k]          = 1'b1;
            rslot_q[e][merge_k] <= miss_slot;
            rword_q[e][merge_k] <= miss_word;
          end else if (!merge_hit && free_e == IDW'(e)) begin
            rv_n                = '0;
            rv_n[0]             = 1'b1;
            rslot_q[e][0]      <= miss_slot;
            rword_q[e][0]      <= miss_word;
            line_q[e]          <= miss_line;
            st_q[e]            <= LFB_REQ;
          end
        end
        rv_q[e] <= rv_n;
      end
      drop_pulse <= drop;
    end
  end

  always_comb for (int e = 0; e < NM; e++) busy[e] = (st_q[e] != LFB_FREE);

  property p_resp_expected;
    @(posedge clk) disable iff (!rst_n) bresp_valid |-> (st_q[bresp_id] == LFB_WAIT);
  endproperty
  assert property (p_resp_expected) else $error("line response for an entry that is not waiting");

endmodule
