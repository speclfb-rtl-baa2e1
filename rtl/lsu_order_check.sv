// lsu_order_check: memory-order dependency check between the load queue
// (LDQ) and the store queue (STQ).
//
// What it does
//   Tells the ROB unsafe mask which memory instructions are still in an
//   unresolved memory access order. A memory instruction is resolved once its
//   own address is known and every older store still in the STQ has a known
//   address that differs from it (no read-after-write or write-after-write
//   dependency can appear any more). Output `mem_unsafe` has one bit per ROB
//   slot and is 1 for slots whose LDQ/STQ entry is not yet resolved.
//
// How it works
//   Both queues are circular FIFOs filled in program order at dispatch. On
//   allocation an entry records which STQ entries are valid at that moment
//   (its older-store mask); stores of the same dispatch row in a lower bank
//   count as older. The mask loses a bit when that store leaves the STQ, so
//   dependencies are updated when an instruction is dequeued. The address
//   generation unit writes each entry's address later (agu_*), together
//   with the store data and byte enables, which the STQ head presents to the
//   cache once the store has committed. The check is
//   combinational over all entries and re-evaluated every cycle.
//   Addresses are compared at CMP_LSB granularity (8-byte words by default).
//   Loads leave the LDQ when they commit (commit_vec). Stores are marked
//   committed at commit and leave the STQ, oldest first, when the cache has
//   accepted them (stq_deq). A committed store is never speculative.
//   Entries of killed ROB slots (kill_vec) are removed and the tail pointers
//   move back.
//
// Interface and timing
//   Up to BANKS allocations per queue per cycle (one per dispatch lane).
//   alloc_ready is 1 when both queues have room for BANKS more entries.
//   Results are combinational from the registered queue state, so a new
//   address or dequeue shows in mem_unsafe the next cycle.
//
//   The rule "compare a new memory instruction with every older LDQ/STQ
//   entry and clear its unsafe state when no dependency is found; update on
//   dequeue" follows the SpecLFB description. Comparing only against older
//   stores, the word granularity and the queue bookkeeping are this design's
//   own choices.
module lsu_order_check
  import speclfb_pkg::*;
#(
  parameter int unsigned LDQ     = speclfb_pkg::LDQ_ENTRIES,
  parameter int unsigned STQ     = speclfb_pkg::STQ_ENTRIES,
  parameter int unsigned ENTRIES = speclfb_pkg::ROB_ENTRIES,
  parameter int unsigned BANKS   = speclfb_pkg::ROB_BANKS,
  parameter int unsigned PADDR   = speclfb_pkg::PADDR_BITS,
  parameter int unsigned CMP_LSB = 3,
  parameter int unsigned XW      = speclfb_pkg::XLEN,
  localparam int unsigned LW = $clog2(LDQ),
  localparam int unsigned QW = $clog2(STQ),
  localparam int unsigned SW = $clog2(ENTRIES),
  localparam int unsigned IW = (LW > QW) ? LW : QW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // allocation at dispatch, one per lane
  input  logic [BANKS-1:0]     alloc_valid,
  input  logic [BANKS-1:0]     alloc_is_store,
  input  logic [SW-1:0]        alloc_slot [BANKS],
  output logic [IW-1:0]        alloc_idx  [BANKS],
  output logic                 alloc_ready,
  // address generation
  input  logic                 agu_valid,
  input  logic                 agu_is_store,
  input  logic [IW-1:0]        agu_idx,
  input  logic [PADDR-1:0]     agu_addr,
  input  logic [XW-1:0]        agu_wdata,
  input  logic [XW/8-1:0]      agu_be,
  // commit / kill from the ROB
  input  logic [ENTRIES-1:0]   commit_vec,
  input  logic [ENTRIES-1:0]   kill_vec,
  // store leaves the STQ (written to the cache)
  input  logic                 stq_deq,
  output logic                 stq_head_valid,
  output logic                 stq_head_committed,
  output logic [PADDR-1:0]     stq_head_addr,
  output logic [XW-1:0]        stq_head_data,
  output logic [XW/8-1:0]      stq_head_be,
  // result
  output logic [ENTRIES-1:0]   mem_unsafe
);

  // LDQ state
  logic [LDQ-1:0]   lv_q, laddr_v_q;
  logic [SW-1:0]    lslot_q [LDQ];
  logic [PADDR-1:0] laddr_q [LDQ];
  logic [STQ-1:0]   ldep_q  [LDQ];
  logic [LW-1:0]    lhead_q, ltail_q;
  logic [LW:0]      lcnt_q;
  // STQ state
  logic [STQ-1:0]   sv_q, saddr_v_q, scom_q;
  logic [SW-1:0]    sslot_q [STQ];
  logic [PADDR-1:0] saddr_q [STQ];
  logic [STQ-1:0]   sdep_q  [STQ];
  logic [XW-1:0]    sdata_q [STQ];
  logic [XW/8-1:0]  sbe_q   [STQ];
  logic [QW-1:0]    shead_q, stail_q;
  logic [QW:0]      scnt_q;

  function automatic logic same_word(input logic [PADDR-1:0] a, input logic [PADDR-1:0] b);
    return (a >> CMP_LSB) == (b >> CMP_LSB);
  endfunction

  // dependency check
  logic [LDQ-1:0] l_safe;
  logic [STQ-1:0] s_safe;
  always_comb begin
    for (int l = 0; l < LDQ; l++) begin
      l_safe[l] = laddr_v_q[l];
      for (int s = 0; s < STQ; s++)
        if (ldep_q[l][s] && sv_q[s] && (!saddr_v_q[s] || same_word(saddr_q[s], laddr_q[l])))
          l_safe[l] = 1'b0;
    end
    for (int t = 0; t < STQ; t++) begin
      logic conflict;
      conflict = !saddr_v_q[t];
      for (int s = 0; s < STQ; s++)
        if (sdep_q[t][s] && sv_q[s] && (!saddr_v_q[s] || same_word(saddr_q[s], saddr_q[t])))
          conflict = 1'b1;
      s_safe[t] = scom_q[t] || !conflict;
    end
    mem_unsafe = '0;
    for (int l = 0; l < LDQ; l++)
      if (lv_q[l] && !l_safe[l]) mem_unsafe[lslot_q[l]] = 1'b1;
    for (int t = 0; t < STQ; t++)
      if (sv_q[t] && !scom_q[t] && !s_safe[t]) mem_unsafe[sslot_q[t]] = 1'b1;
  end

  // allocation indices: lanes take consecutive entries in order
  logic [LW-1:0]  lidx [BANKS];
  logic [QW-1:0]  sidx [BANKS];
  logic [STQ-1:0] row_st_before [BANKS];
  always_comb begin
    logic [LW-1:0]  lp;
    logic [QW-1:0]  sp;
    logic [STQ-1:0] acc;
    lp  = ltail_q;
    sp  = stail_q;
    acc = '0;
    for (int j = 0; j < BANKS; j++) begin
      lidx[j]          = lp;
      sidx[j]          = sp;
      row_st_before[j] = acc;
      alloc_idx[j]     = alloc_is_store[j] ? IW'(sp) : IW'(lp);
      if (alloc_valid[j]) begin
        if (alloc_is_store[j]) begin
          acc[sp] = 1'b1;
          sp      = sp + QW'(1);
        end else begin
          lp = lp + LW'(1);
        end
      end
    end
  end

  assign alloc_ready = (lcnt_q <= (LW+1)'(LDQ - BANKS)) && (scnt_q <= (QW+1)'(STQ - BANKS));

  assign stq_head_valid     = sv_q[shead_q];
  assign stq_head_committed = scom_q[shead_q];
  assign stq_head_addr      = saddr_q[shead_q];
  assign stq_head_data      = sdata_q[shead_q];
  assign stq_head_be        = sbe_q[shead_q];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lv_q <= '0; laddr_v_q <= '0; lhead_q <= '0; ltail_q <= '0; lcnt_q <= '0;
      sv_q <= '0; saddr_v_q <= '0; scom_q <= '0; shead_q <= '0; stail_q <= '0; scnt_q <= '0;
      for (int l = 0; l < LDQ; l++) begin
        lslot_q[l] <= '0; laddr_q[l] <= '0; ldep_q[l] <= '0;
      end
      for (int s = 0; s < STQ; s++) begin
        sslot_q[s] <= '0; saddr_q[s] <= '0; sdep_q[s] <= '0;
        sdata_q[s] <= '0; sbe_q[s] <= '0;
      end
    end else begin
      logic [LDQ-1:0] lv_n;
      logic [STQ-1:0] sv_n;
      logic [LW:0]    lc;
      logic [QW:0]    sc;
      logic [LW-1:0]  lh;
      logic [STQ-1:0] s_leave;
      lv_n    = lv_q;
      sv_n    = sv_q;
      lh      = lhead_q;
      s_leave = '0;
      // load commit: loads leave in order from the head
      for (int l = 0; l < LDQ; l++)
        if (lv_q[l] && commit_vec[lslot_q[l]]) lv_n[l] = 1'b0;
      for (int l = 0; l < LDQ; l++)
        if (lv_q[lh] && !lv_n[lh]) lh = lh + LW'(1);
      // kills
      for (int l = 0; l < LDQ; l++)
        if (lv_q[l] && kill_vec[lslot_q[l]]) lv_n[l] = 1'b0;
      for (int s = 0; s < STQ; s++)
        if (sv_q[s] && !scom_q[s] && kill_vec[sslot_q[s]]) sv_n[s] = 1'b0;
      // store commit
      for (int s = 0; s < STQ; s++)
        if (sv_q[s] && !scom_q[s] && commit_vec[sslot_q[s]]) scom_q[s] <= 1'b1;
      // store dequeue
      if (stq_deq) begin
        sv_n[shead_q]    = 1'b0;
        s_leave[shead_q] = 1'b1;
        scom_q[shead_q] <= 1'b0;
        shead_q         <= shead_q + QW'(1);
      end
      // remaining counts (killed entries are the youngest, so tails follow)
      lc = '0;
      sc = '0;
      for (int l = 0; l < LDQ; l++) lc = lc + (LW+1)'(lv_n[l]);
      for (int s = 0; s < STQ; s++) sc = sc + (QW+1)'(sv_n[s]);
      lhead_q <= lh;
      ltail_q <= lh + LW'(lc);
      stail_q <= (stq_deq ? shead_q + QW'(1) : shead_q) + QW'(sc);
      // drop departed stores from every dependency mask
      for (int l = 0; l < LDQ; l++) ldep_q[l] <= ldep_q[l] & ~s_leave;
      for (int s = 0; s < STQ; s++) sdep_q[s] <= sdep_q[s] & ~s_leave;
      // address generation
      if (agu_valid) begin
        if (agu_is_store) begin
          saddr_q[QW'(agu_idx)]   <= agu_addr;
          saddr_v_q[QW'(agu_idx)] <= 1'b1;
          sdata_q[QW'(agu_idx)]   <= agu_wdata;
          sbe_q[QW'(agu_idx)]     <= agu_be;
        end else begin
          laddr_q[LW'(agu_idx)]   <= agu_addr;
          laddr_v_q[LW'(agu_idx)] <= 1'b1;
        end
      end
      // allocation (after kills; the ROB never dispatches in a kill cycle)
      for (int j = 0; j < BANKS; j++) begin
        if (alloc_valid[j]) begin
          if (alloc_is_store[j]) begin
            sv_n[sidx[j]]       = 1'b1;
            sslot_q[sidx[j]]   <= alloc_slot[j];
            saddr_v_q[sidx[j]] <= 1'b0;
            scom_q[sidx[j]]    <= 1'b0;
            sdep_q[sidx[j]]    <= (sv_q & ~s_leave) | row_st_before[j];
            sc = sc + 1'b1;
          end else begin
            lv_n[lidx[j]]       = 1'b1;
            lslot_q[lidx[j]]   <= alloc_slot[j];
            laddr_v_q[lidx[j]] <= 1'b0;
            ldep_q[lidx[j]]    <= (sv_q & ~s_leave) | row_st_before[j];
            lc = lc + 1'b1;
          end
        end
      end
      if (|alloc_valid) begin
        ltail_q <= lh + LW'(lc);
        stail_q <= (stq_deq ? shead_q + QW'(1) : shead_q) + QW'(sc);
      end
      lv_q   <= lv_n;
      sv_q   <= sv_n;
      lcnt_q <= lc;
      scnt_q <= sc;
    end
  end

  property p_alloc_room;
    @(posedge clk) disable iff (!rst_n) (|alloc_valid) |-> alloc_ready;
  endproperty
  assert property (p_alloc_room) else $error("LDQ/STQ allocation without room");
  property p_deq_committed;
    @(posedge clk) disable iff (!rst_n) stq_deq |-> (stq_head_valid && stq_head_committed);
  endproperty
  assert property (p_deq_committed) else $error("dequeue of an uncommitted store");

endmodule
