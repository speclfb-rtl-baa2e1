// rob_unsafe_mask: the ROB unsafe mask of SpecLFB.
//
// What it does
//   Keeps one security bit b[i][j] for every instruction slot of the ROB
//   (row i, bank j) and reduces each row to one mask bit,
//   r[i] = b[i][0] | b[i][1] | ... | b[i][N-1]. A mask bit of 1 means that
//   some instruction in that ROB row may still issue an unsafe speculative
//   load that missed in the cache (a MUSL); the line fill buffer only lets a
//   line into the L1D when the bit of its requesting row is 0.
//
// How it works
//   * Dispatch writes one ROB row per cycle at the tail. A slot's bit starts
//     at the uop's `unsafe` flag (loads, stores other than fences, branches
//     and jumps). The slot also stores the uop's branch mask.
//   * Every cycle each slot is re-evaluated:
//       b = unsafe & (older branch unresolved | own branch unresolved
//                   | memory order unresolved)
//     Resolved branch tags are cleared from every stored branch mask
//     (br_resolve_mask). Memory-order state comes from the LSU dependency
//     check as one bit per ROB slot (mem_unsafe).
//   * A branch or jump uop also brings its own tag (dis_br_tag, one-hot);
//     its own bit stays set until that tag resolves. Its branch mask holds
//     only the older branches, so its own mispredict does not kill it.
//   * A mispredicted branch kills every slot whose branch mask holds the
//     mispredicted tag and moves the tail back to the row after the branch.
//   * An exception reported by the execution units or by the LSU (the two
//     sources are multiplexed, the older one wins) freezes the bits of the
//     excepting instruction and all younger ones: while frozen a bit can be
//     set but cannot be cleared. `flush` (the exception has been handled)
//     empties the ROB and lifts the freeze.
//   * Commit retires the head row.
//
// Interface and timing
//   Slot index = row * ROB_BANKS + bank. All state is updated on the rising
//   clock edge; `mask` is a register output, so a resolution seen in cycle t
//   shows in the mask in cycle t+1. Reset (active low, synchronous) empties
//   the ROB. dis_valid must only be asserted while dis_ready is 1 and
//   com_valid only while the ROB is not empty.
//
//   The OR reduction, the set/clear rules and the exception freeze follow
//   the SpecLFB description; the head/tail bookkeeping, the single-row
//   dispatch and commit ports and the "older exception wins" choice are this
//   design's own.
module rob_unsafe_mask
  import speclfb_pkg::*;
#(
  parameter int unsigned ROWS  = speclfb_pkg::ROB_ROWS,
  parameter int unsigned BANKS = speclfb_pkg::ROB_BANKS,
  parameter int unsigned NBR   = speclfb_pkg::MAX_BR,
  localparam int unsigned ENTRIES = ROWS * BANKS,
  localparam int unsigned RW      = $clog2(ROWS),
  localparam int unsigned SW      = $clog2(ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // dispatch of one row at the tail
  input  logic                 dis_valid,
  input  logic [BANKS-1:0]     dis_uop_valid,
  input  logic [BANKS-1:0]     dis_unsafe,
  input  logic [NBR-1:0]       dis_br_mask [BANKS],
  input  logic [NBR-1:0]       dis_br_tag  [BANKS],
  output logic                 dis_ready,
  output logic [RW-1:0]        tail_row,
  // commit of the head row
  input  logic                 com_valid,
  output logic [RW-1:0]        head_row,
  output logic [ENTRIES-1:0]   commit_vec,
  // branch resolution from the branch unit
  input  logic [NBR-1:0]       br_resolve_mask,
  input  logic                 br_mispredict,
  input  logic [NBR-1:0]       br_mispredict_tag,
  input  logic [RW-1:0]        br_row,
  // memory-order state from the LSU dependency check, one bit per slot
  input  logic [ENTRIES-1:0]   mem_unsafe,
  // exceptions (exu.exception and lsu.exception)
  input  logic                 exu_exc_valid,
  input  logic [SW-1:0]        exu_exc_slot,
  input  logic                 lsu_exc_valid,
  input  logic [SW-1:0]        lsu_exc_slot,
  input  logic                 flush,
  // outputs
  output logic [ROWS-1:0]      mask,
  output logic [ENTRIES-1:0]   slot_valid,
  output logic [ENTRIES-1:0]   slot_unsafe,
  output logic [ENTRIES-1:0]   kill_vec,
  output logic                 exc_active,
  output logic                 empty
);

  logic [ENTRIES-1:0] valid_q, unsafe_q, b_q;
  logic [NBR-1:0]     brm_q [ENTRIES];
  logic [NBR-1:0]     own_q [ENTRIES];
  logic [RW-1:0]      head_q, tail_q;
  logic [RW:0]        count_q;
  logic               exc_q;
  logic [SW-1:0]      exc_slot_q;

  // age of a slot relative to the head: smaller is older
  function automatic logic [SW-1:0] age_of(input logic [SW-1:0] slot, input logic [RW-1:0] head);
    logic [RW-1:0] row;
    logic [RW-1:0] rel;
    row = RW'(slot / SW'(BANKS));
    rel = row - head;
    return SW'(rel) * SW'(BANKS) + (slot % SW'(BANKS));
  endfunction

  // exception source multiplexer: keep the oldest pending exception
  logic          new_exc;
  logic [SW-1:0] new_exc_slot;
  always_comb begin
    new_exc      = 1'b0;
    new_exc_slot = exu_exc_slot;
    if (exu_exc_valid && lsu_exc_valid) begin
      new_exc      = 1'b1;
      new_exc_slot = (age_of(lsu_exc_slot, head_q) < age_of(exu_exc_slot, head_q))
                     ? lsu_exc_slot : exu_exc_slot;
    end else if (exu_exc_valid) begin
      new_exc      = 1'b1;
      new_exc_slot = exu_exc_slot;
    end else if (lsu_exc_valid) begin
      new_exc      = 1'b1;
      new_exc_slot = lsu_exc_slot;
    end
  end

  logic          exc_d;
  logic [SW-1:0] exc_slot_d;
  always_comb begin
    exc_d      = exc_q;
    exc_slot_d = exc_slot_q;
    if (new_exc && (!exc_q || age_of(new_exc_slot, head_q) < age_of(exc_slot_q, head_q))) begin
      exc_d      = 1'b1;
      exc_slot_d = new_exc_slot;
    end
  end

  // kill vector: slots removed by a mispredict or a flush
  always_comb begin
    for (int k = 0; k < ENTRIES; k++) begin
      kill_vec[k] = valid_q[k] && (flush || (br_mispredict && |(brm_q[k] & br_mispredict_tag)));
    end
  end

  // commit vector: the head row
  always_comb begin
    commit_vec = '0;
    for (int k = 0; k < ENTRIES; k++) begin
      if (com_valid && RW'(k / BANKS) == head_q) commit_vec[k] = valid_q[k];
    end
  end

  logic [RW-1:0] next_tail;
  assign next_tail = tail_q + RW'(1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q    <= '0;
      unsafe_q   <= '0;
      b_q        <= '0;
      head_q     <= '0;
      tail_q     <= '0;
      count_q    <= '0;
      exc_q      <= 1'b0;
      exc_slot_q <= '0;
      for (int k = 0; k < ENTRIES; k++) begin
        brm_q[k] <= '0;
        own_q[k] <= '0;
      end
    end else if (flush) begin
      valid_q    <= '0;
      unsafe_q   <= '0;
      b_q        <= '0;
      head_q     <= '0;
      tail_q     <= '0;
      count_q    <= '0;
      exc_q      <= 1'b0;
    end else begin
      logic [RW:0] cnt;
      logic        killed_exc;
      cnt        = count_q;
      killed_exc = 1'b0;
      // per-slot re-evaluation
      for (int k = 0; k < ENTRIES; k++) begin
        logic [NBR-1:0] brm_n, own_n;
        logic           cond, frozen;
        brm_n  = brm_q[k] & ~br_resolve_mask;
        own_n  = own_q[k] & ~br_resolve_mask;
        cond   = unsafe_q[k] && ((|brm_n) || (|own_n) || mem_unsafe[k]);
        frozen = exc_d && (age_of(SW'(k), head_q) >= age_of(exc_slot_d, head_q));
        brm_q[k] <= brm_n;
        own_q[k] <= own_n;
        if (valid_q[k]) b_q[k] <= frozen ? (b_q[k] | cond) : cond;
        if (kill_vec[k] || commit_vec[k]) begin
          valid_q[k] <= 1'b0;
          b_q[k]     <= 1'b0;
          if (kill_vec[k] && exc_d && SW'(k) == exc_slot_d) killed_exc = 1'b1;
        end
      end
      exc_q      <= exc_d && !killed_exc;
      exc_slot_q <= exc_slot_d;
      // commit
      if (com_valid) begin
        head_q <= head_q + RW'(1);
        cnt    = cnt - 1'b1;
      end
      // mispredict rollback, else dispatch
      if (br_mispredict) begin
        tail_q <= br_row + RW'(1);
        cnt    = (RW+1)'(RW'(br_row - head_q)) + 1'b1 - (RW+1)'(com_valid);
      end else if (dis_valid) begin
        for (int j = 0; j < BANKS; j++) begin
          valid_q[tail_q*BANKS+j]  <= dis_uop_valid[j];
          unsafe_q[tail_q*BANKS+j] <= dis_uop_valid[j] & dis_unsafe[j];
          b_q[tail_q*BANKS+j]      <= dis_uop_valid[j] & dis_unsafe[j];
          brm_q[tail_q*BANKS+j]    <= dis_br_mask[j] & ~br_resolve_mask;
          own_q[tail_q*BANKS+j]    <= dis_br_tag[j] & ~br_resolve_mask;
        end
        tail_q <= next_tail;
        cnt    = cnt + 1'b1;
      end
      count_q <= cnt;
    end
  end

  // row reduction, Eq. (1)
  always_comb begin
    for (int i = 0; i < ROWS; i++) begin
      mask[i] = 1'b0;
      for (int j = 0; j < BANKS; j++) mask[i] = mask[i] | (valid_q[i*BANKS+j] & b_q[i*BANKS+j]);
    end
  end

  assign slot_valid  = valid_q;
  assign slot_unsafe = valid_q & b_q;
  assign dis_ready   = (count_q != (RW+1)'(ROWS)) && !br_mispredict && !flush;
  assign tail_row    = tail_q;
  assign head_row    = head_q;
  assign exc_active  = exc_q;
  assign empty       = (count_q == '0);

  // handshake rules
  property p_no_dispatch_when_full;
    @(posedge clk) disable iff (!rst_n) dis_valid |-> dis_ready;
  endproperty
  assert property (p_no_dispatch_when_full) else $error("dispatch into a full ROB");
  property p_no_commit_when_empty;
    @(posedge clk) disable iff (!rst_n) com_valid |-> !empty;
  endproperty
  assert property (p_no_commit_when_empty) else $error("commit from an empty ROB");

endmodule
