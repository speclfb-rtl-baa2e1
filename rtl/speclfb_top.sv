// speclfb_top: the SpecLFB protection around the L1 data cache of an
// out-of-order core.
//
// What it does
//   Connects the three parts of SpecLFB:
//     * rob_unsafe_mask  - one bit per ROB row telling whether the row may
//                          still hold an unsafe speculative load;
//     * lsu_order_check  - the LDQ/STQ dependency check that resolves the
//                          memory-order reason for a load or store being
//                          unsafe;
//     * l1d_cache        - the L1D with its MSHRs and line fill buffer, where
//                          a missed line waits until the mask bit of its
//                          load's ROB row is 0 before it is refilled.
//   The surrounding core (front end, branch unit, execution units, address
//   generation, the rest of the LSU) and the L2/memory are outside; their
//   signals are the ports of this module.
//
// How it works
//   A dispatch row enters the ROB and, for its loads and stores, the LDQ/STQ
//   in the same cycle; the row number and the queue indices come back
//   combinationally (dis_row, dis_lsq_idx). Branch resolutions, mispredicts,
//   exceptions and the flush after an exception go to the mask; the mask's
//   kill and commit vectors go to the queues and to the MSHRs. Loads are
//   issued to the cache on the ld_* port. Committed stores leave the STQ
//   head and go to the cache on their own; they have priority over loads.
//
// Interface and timing
//   dispatch is a valid/ready port: a row enters when dis_valid and
//   dis_ready (ROB row and both queues have room) are both 1. All ports
//   are synchronous to clk; reset is active low and synchronous. Load data
//   returns on ld_resp_* one cycle after a hit, or after the refill of a
//   missed line. The memory port is the cache's (line reads tagged by MSHR,
//   posted 64-bit writes).
//
//   The block structure follows the SpecLFB overview; the port list and the
//   store-before-load priority are this design's own.
module speclfb_top
  import speclfb_pkg::*;
#(
  parameter int unsigned ROWS  = speclfb_pkg::ROB_ROWS,
  parameter int unsigned BANKS = speclfb_pkg::ROB_BANKS,
  parameter int unsigned NBR   = speclfb_pkg::MAX_BR,
  parameter int unsigned LDQ   = speclfb_pkg::LDQ_ENTRIES,
  parameter int unsigned STQ   = speclfb_pkg::STQ_ENTRIES,
  parameter int unsigned SETS  = speclfb_pkg::L1D_SETS,
  parameter int unsigned WAYS  = speclfb_pkg::L1D_WAYS,
  parameter int unsigned NM    = speclfb_pkg::N_MSHR,
  parameter int unsigned NREQ  = speclfb_pkg::MAX_MERGE,
  localparam int unsigned ENTRIES = ROWS * BANKS,
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned SW    = $clog2(ENTRIES),
  localparam int unsigned AW    = speclfb_pkg::PADDR_BITS,
  localparam int unsigned XW    = speclfb_pkg::XLEN,
  localparam int unsigned LINEW = speclfb_pkg::LINE_BYTES * 8,
  localparam int unsigned IW    = ($clog2(LDQ) > $clog2(STQ)) ? $clog2(LDQ) : $clog2(STQ),
  localparam int unsigned IDW   = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // dispatch
  input  logic               dis_valid,
  input  logic [BANKS-1:0]   dis_uop_valid,
  input  logic [BANKS-1:0]   dis_unsafe,
  input  logic [BANKS-1:0]   dis_is_load,
  input  logic [BANKS-1:0]   dis_is_store,
  input  logic [NBR-1:0]     dis_br_mask [BANKS],
  input  logic [NBR-1:0]     dis_br_tag  [BANKS],
  output logic               dis_ready,
  output logic [RW-1:0]      dis_row,
  output logic [IW-1:0]      dis_lsq_idx [BANKS],
  // commit
  input  logic               com_valid,
  output logic [RW-1:0]      head_row,
  output logic               rob_empty,
  // branch unit
  input  logic [NBR-1:0]     br_resolve_mask,
  input  logic               br_mispredict,
  input  logic [NBR-1:0]     br_mispredict_tag,
  input  logic [RW-1:0]      br_row,
  // exceptions
  input  logic               exu_exc_valid,
  input  logic [SW-1:0]      exu_exc_slot,
  input  logic               lsu_exc_valid,
  input  logic [SW-1:0]      lsu_exc_slot,
  input  logic               flush,
  // address generation
  input  logic               agu_valid,
  input  logic               agu_is_store,
  input  logic [IW-1:0]      agu_idx,
  input  logic [AW-1:0]      agu_addr,
  input  logic [XW-1:0]      agu_wdata,
  input  logic [XW/8-1:0]    agu_be,
  // load issue and response
  input  logic               ld_valid,
  output logic               ld_ready,
  input  logic [AW-1:0]      ld_addr,
  input  logic [SW-1:0]      ld_slot,
  output logic               ld_resp_valid,
  output logic [SW-1:0]      ld_resp_slot,
  output logic [XW-1:0]      ld_resp_data,
  output logic               ld_resp_refill,
  // lower level
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_write,
  output logic [AW-1:0]      mem_req_addr,
  output logic [XW-1:0]      mem_req_wdata,
  output logic [XW/8-1:0]    mem_req_be,
  output logic [IDW-1:0]     mem_req_id,
  input  logic               mem_resp_valid,
  input  logic [IDW-1:0]     mem_resp_id,
  input  logic [LINEW-1:0]   mem_resp_data,
  // observation
  output logic [ROWS-1:0]    rob_unsafe_mask_o,
  output logic [ENTRIES-1:0] mem_unsafe_o,
  output logic [ENTRIES-1:0] slot_valid,
  output logic [ENTRIES-1:0] slot_unsafe,
  output logic [NM-1:0]      mshr_busy,
  output logic               exc_active,
  output logic               ev_hit,
  output logic               ev_miss,
  output logic               ev_refill,
  output logic               ev_drop,
  output logic [NM-1:0]      lfb_blocked,
  output logic               ev_store
);

  logic [ROWS-1:0]    mask;
  logic [ENTRIES-1:0] kill_vec, commit_vec, mem_unsafe;
  logic               rob_ready, lsq_ready;
  logic [RW-1:0]      tail_row;
  logic               dis_fire;

  // ---------------------------------------------------------------- ROB mask
  rob_unsafe_mask #(.ROWS(ROWS), .BANKS(BANKS), .NBR(NBR)) u_mask (
    .clk               (clk),
    .rst_n             (rst_n),
    .dis_valid         (dis_fire),
    .dis_uop_valid     (dis_uop_valid),
    .dis_unsafe        (dis_unsafe),
    .dis_br_mask       (dis_br_mask),
    .dis_br_tag        (dis_br_tag),
    .dis_ready         (rob_ready),
    .tail_row          (tail_row),
    .com_valid         (com_valid),
    .head_row          (head_row),
    .commit_vec        (commit_vec),
    .br_resolve_mask   (br_resolve_mask),
    .br_mispredict     (br_mispredict),
    .br_mispredict_tag (br_mispredict_tag),
    .br_row            (br_row),
    .mem_unsafe        (mem_unsafe),
    .exu_exc_valid     (exu_exc_valid),
    .exu_exc_slot      (exu_exc_slot),
    .lsu_exc_valid     (lsu_exc_valid),
    .lsu_exc_slot      (lsu_exc_slot),
    .flush             (flush),
    .mask              (mask),
    .slot_valid        (slot_valid),
    .slot_unsafe       (slot_unsafe),
    .kill_vec          (kill_vec),
    .exc_active        (exc_active),
    .empty             (rob_empty)
  );

  assign dis_ready = rob_ready && lsq_ready;
  assign dis_fire  = dis_valid && dis_ready;
  assign dis_row   = tail_row;

  // ------------------------------------------------------ LDQ/STQ dependency
  logic [BANKS-1:0] alloc_valid, alloc_is_store;
  logic [SW-1:0]    alloc_slot [BANKS];
  always_comb begin
    for (int j = 0; j < BANKS; j++) begin
      alloc_valid[j]    = dis_fire && dis_uop_valid[j] && (dis_is_load[j] || dis_is_store[j]);
      alloc_is_store[j] = dis_is_store[j];
      alloc_slot[j]     = SW'(tail_row) * SW'(BANKS) + SW'(j);
    end
  end

  logic             stq_head_valid, stq_head_committed, stq_deq;
  logic [AW-1:0]    stq_head_addr;
  logic [XW-1:0]    stq_head_data;
  logic [XW/8-1:0]  stq_head_be;

  lsu_order_check #(
    .LDQ(LDQ), .STQ(STQ), .ENTRIES(ENTRIES), .BANKS(BANKS), .PADDR(AW), .XW(XW)
  ) u_order (
    .clk                (clk),
    .rst_n              (rst_n),
    .alloc_valid        (alloc_valid),
    .alloc_is_store     (alloc_is_store),
    .alloc_slot         (alloc_slot),
    .alloc_idx          (dis_lsq_idx),
    .alloc_ready        (lsq_ready),
    .agu_valid          (agu_valid),
    .agu_is_store       (agu_is_store),
    .agu_idx            (agu_idx),
    .agu_addr           (agu_addr),
    .agu_wdata          (agu_wdata),
    .agu_be             (agu_be),
    .commit_vec         (commit_vec),
    .kill_vec           (kill_vec),
    .stq_deq            (stq_deq),
    .stq_head_valid     (stq_head_valid),
    .stq_head_committed (stq_head_committed),
    .stq_head_addr      (stq_head_addr),
    .stq_head_data      (stq_head_data),
    .stq_head_be        (stq_head_be),
    .mem_unsafe         (mem_unsafe)
  );

  // ------------------------------------------------------------------- L1D
  logic          c_valid, c_ready, c_is_store;
  logic [AW-1:0] c_addr;
  logic          st_pending;
  assign st_pending = stq_head_valid && stq_head_committed;
  assign c_valid    = st_pending || ld_valid;
  assign c_is_store = st_pending;
  assign c_addr     = st_pending ? stq_head_addr : ld_addr;
  assign stq_deq    = st_pending && c_ready;
  assign ld_ready   = !st_pending && c_ready;
  assign ev_store   = stq_deq;

  l1d_cache #(
    .SETS(SETS), .WAYS(WAYS), .NM(NM), .NREQ(NREQ), .ROWS(ROWS), .BANKS(BANKS)
  ) u_l1d (
    .clk             (clk),
    .rst_n           (rst_n),
    .rob_unsafe_mask (mask),
    .kill_vec        (kill_vec),
    .req_valid       (c_valid),
    .req_ready       (c_ready),
    .req_is_store    (c_is_store),
    .req_addr        (c_addr),
    .req_wdata       (stq_head_data),
    .req_be          (stq_head_be),
    .req_slot        (ld_slot),
    .resp_valid      (ld_resp_valid),
    .resp_slot       (ld_resp_slot),
    .resp_data       (ld_resp_data),
    .resp_refill     (ld_resp_refill),
    .mem_req_valid   (mem_req_valid),
    .mem_req_ready   (mem_req_ready),
    .mem_req_write   (mem_req_write),
    .mem_req_addr    (mem_req_addr),
    .mem_req_wdata   (mem_req_wdata),
    .mem_req_be      (mem_req_be),
    .mem_req_id      (mem_req_id),
    .mem_resp_valid  (mem_resp_valid),
    .mem_resp_id     (mem_resp_id),
    .mem_resp_data   (mem_resp_data),
    .ev_hit          (ev_hit),
    .ev_miss         (ev_miss),
    .ev_refill       (ev_refill),
    .ev_drop         (ev_drop),
    .lfb_blocked     (lfb_blocked),
    .mshr_busy       (mshr_busy)
  );

  assign rob_unsafe_mask_o = mask;
  assign mem_unsafe_o      = mem_unsafe;

endmodule
