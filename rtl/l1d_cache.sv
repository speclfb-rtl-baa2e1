// l1d_cache: non-blocking set-associative L1 data cache whose refills pass
// through the SpecLFB line fill buffer.
//
// What it does
//   Serves loads and committed stores from a tag array and a data array
//   (16 KB, 4 ways, 64-byte lines by default). A load that hits returns its
//   64-bit word one cycle later. A load that misses is handed to the MSHRs
//   (mshr_lfb): the line is fetched from the lower level and held in the LFB
//   until the ROB unsafe mask says the requesting load is safe; only then is
//   it written into the arrays and the load answered. A line whose loads are
//   all squashed never reaches the arrays, so a mis-speculated miss leaves
//   the cache state untouched.
//
// How it works
//   The address splits into tag | index | offset. The index selects one set;
//   the WAYS tags of the set are compared in parallel with the request tag.
//   Victims are chosen among invalid ways first, otherwise by a per-set
//   round-robin pointer. Stores arrive only after commit, are written
//   through to the lower level (one bus write each) and update the line in
//   the arrays on a hit and the held copy in the LFB; a store to a line that
//   is still being fetched waits. A refill from the LFB takes the array write
//   port for one cycle and blocks new requests in that cycle; so does a
//   replay of load data from the LFB, which shares the response port.
//
// Interface and timing
//   req_* is a valid/ready port; req_ready is combinational on the request.
//   resp_* has no back-pressure; resp_refill marks an answer that came from
//   the LFB after a miss. The memory port carries line reads (tagged with the
//   MSHR number, answered on mem_resp_*) and posted 64-bit writes, whose
//   data and byte enables are the store request's own, passed straight
//   through to mem_req_wdata/mem_req_be. Reset
//   (active low, synchronous) invalidates every line.
//
//   The cache organisation, the MSHR count and the refill path through the
//   LFB follow the evaluated core. Write-through without write-allocate,
//   round-robin replacement, one-beat line transfers and the one-cycle hit
//   latency are this design's own simplifications.
module l1d_cache
  import speclfb_pkg::*;
#(
  parameter int unsigned SETS  = speclfb_pkg::L1D_SETS,
  parameter int unsigned WAYS  = speclfb_pkg::L1D_WAYS,
  parameter int unsigned LBYTES = speclfb_pkg::LINE_BYTES,
  parameter int unsigned XW    = speclfb_pkg::XLEN,
  parameter int unsigned AW    = speclfb_pkg::PADDR_BITS,
  parameter int unsigned NM    = speclfb_pkg::N_MSHR,
  parameter int unsigned NREQ  = speclfb_pkg::MAX_MERGE,
  parameter int unsigned ROWS  = speclfb_pkg::ROB_ROWS,
  parameter int unsigned BANKS = speclfb_pkg::ROB_BANKS,
  localparam int unsigned ENTRIES = ROWS * BANKS,
  localparam int unsigned SW    = $clog2(ENTRIES),
  localparam int unsigned LB    = $clog2(LBYTES),
  localparam int unsigned IB    = $clog2(SETS),
  localparam int unsigned TB    = AW - LB - IB,
  localparam int unsigned LAW   = AW - LB,
  localparam int unsigned WB    = $clog2(XW / 8),
  localparam int unsigned OW    = LB - WB,
  localparam int unsigned LINEW = LBYTES * 8,
  localparam int unsigned WYW   = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned IDW   = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // SpecLFB inputs from the ROB
  input  logic [ROWS-1:0]    rob_unsafe_mask,
  input  logic [ENTRIES-1:0] kill_vec,
  // request from the LSU
  input  logic               req_valid,
  output logic               req_ready,
  input  logic               req_is_store,
  input  logic [AW-1:0]      req_addr,
  input  logic [XW-1:0]      req_wdata,
  input  logic [XW/8-1:0]    req_be,
  input  logic [SW-1:0]      req_slot,
  // load response
  output logic               resp_valid,
  output logic [SW-1:0]      resp_slot,
  output logic [XW-1:0]      resp_data,
  output logic               resp_refill,
  // lower level (L2 / memory)
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
  // events
  output logic               ev_hit,
  output logic               ev_miss,
  output logic               ev_refill,
  output logic               ev_drop,
  output logic [NM-1:0]      lfb_blocked,
  output logic [NM-1:0]      mshr_busy
);

  // arrays
  logic [TB-1:0]    tag_q   [SETS][WAYS];
  logic [WAYS-1:0]  valid_q [SETS];
  logic [LINEW-1:0] data_q  [SETS][WAYS];
  logic [WYW-1:0]   rr_q    [SETS];

  // address fields
  logic [TB-1:0]  r_tag;
  logic [IB-1:0]  r_idx;
  logic [OW-1:0]  r_word;
  logic [LAW-1:0] r_line;
  assign r_line = req_addr[AW-1:LB];
  assign r_tag  = r_line[LAW-1:IB];
  assign r_idx  = r_line[IB-1:0];
  assign r_word = req_addr[LB-1:WB];

  // tag check
  logic           hit;
  logic [WYW-1:0] hit_way;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[r_idx][w] && tag_q[r_idx][w] == r_tag) begin
        hit     = 1'b1;
        hit_way = WYW'(w);
      end
  end

  // MSHR / LFB
  logic             miss_ready, line_outstanding;
  logic             breq_valid, breq_ready;
  logic [LAW-1:0]   breq_line;
  logic [IDW-1:0]   breq_id;
  logic             refill_valid;
  logic [LAW-1:0]   refill_line;
  logic [LINEW-1:0] refill_data;
  logic             rp_valid, rp_ready;
  logic [SW-1:0]    rp_slot;
  logic [XW-1:0]    rp_data;
  logic             drop_pulse;
  logic             acc_load_miss, acc_store;
  logic             hit_q;
  logic [SW-1:0]    hit_slot_q;
  logic [XW-1:0]    hit_data_q;

  mshr_lfb #(
    .NM(NM), .NREQ(NREQ), .ROWS(ROWS), .BANKS(BANKS), .PADDR(AW),
    .LINE_BYTES(LBYTES), .XLEN(XW)
  ) u_mshr_lfb (
    .clk              (clk),
    .rst_n            (rst_n),
    .rob_unsafe_mask  (rob_unsafe_mask),
    .kill_vec         (kill_vec),
    .miss_valid       (acc_load_miss),
    .miss_line        (r_line),
    .miss_slot        (req_slot),
    .miss_word        (r_word),
    .miss_ready       (miss_ready),
    .line_outstanding (line_outstanding),
    .st_valid         (acc_store),
    .st_line          (r_line),
    .st_word          (r_word),
    .st_data          (req_wdata),
    .st_be            (req_be),
    .breq_valid       (breq_valid),
    .breq_line        (breq_line),
    .breq_id          (breq_id),
    .breq_ready       (breq_ready),
    .bresp_valid      (mem_resp_valid),
    .bresp_id         (mem_resp_id),
    .bresp_data       (mem_resp_data),
    .refill_valid     (refill_valid),
    .refill_line      (refill_line),
    .refill_data      (refill_data),
    .refill_ready     (1'b1),
    .rp_valid         (rp_valid),
    .rp_slot          (rp_slot),
    .rp_data          (rp_data),
    .rp_ready         (rp_ready),
    .held_blocked     (lfb_blocked),
    .drop_pulse       (drop_pulse),
    .busy             (mshr_busy)
  );

  // request acceptance
  logic port_free;
  assign port_free = !refill_valid && !rp_valid;
  always_comb begin
    if (!port_free)        req_ready = 1'b0;
    else if (req_is_store) req_ready = !line_outstanding && !breq_valid && mem_req_ready;
    else                   req_ready = hit || miss_ready;
  end
  assign acc_load_miss = req_valid && req_ready && !req_is_store && !hit;
  assign acc_store     = req_valid && req_ready && req_is_store;

  // lower-level port: line reads have priority over write-through stores
  assign breq_ready    = mem_req_ready;
  assign mem_req_valid = breq_valid || acc_store;
  assign mem_req_write = !breq_valid;
  assign mem_req_addr  = breq_valid ? {breq_line, {LB{1'b0}}} : req_addr;
  assign mem_req_wdata = req_wdata;
  assign mem_req_be    = req_be;
  assign mem_req_id    = breq_id;

  // refill victim
  logic [IB-1:0]  f_idx;
  logic [TB-1:0]  f_tag;
  logic [WYW-1:0] f_way;
  assign f_idx = refill_line[IB-1:0];
  assign f_tag = refill_line[LAW-1:IB];
  always_comb begin
    f_way = rr_q[f_idx];
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid_q[f_idx][w]) f_way = WYW'(w);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        rr_q[s]    <= '0;
      end
      hit_q      <= 1'b0;
      hit_slot_q <= '0;
      hit_data_q <= '0;
    end else begin
      hit_q <= req_valid && req_ready && !req_is_store && hit;
      if (req_valid && req_ready && !req_is_store && hit) begin
        hit_slot_q <= req_slot;
        hit_data_q <= data_q[r_idx][hit_way][r_word*XW +: XW];
      end
      if (acc_store && hit)
        for (int b = 0; b < XW / 8; b++)
          if (req_be[b]) data_q[r_idx][hit_way][r_word*XW + b*8 +: 8] <= req_wdata[b*8 +: 8];
      if (refill_valid) begin
        tag_q[f_idx][f_way]   <= f_tag;
        data_q[f_idx][f_way]  <= refill_data;
        valid_q[f_idx][f_way] <= 1'b1;
        rr_q[f_idx]           <= f_way + WYW'(1);
      end
    end
  end

  // response port: hit answers have priority, LFB replays wait one cycle
  assign rp_ready    = !hit_q;
  assign resp_valid  = hit_q || rp_valid;
  assign resp_slot   = hit_q ? hit_slot_q : rp_slot;
  assign resp_data   = hit_q ? hit_data_q : rp_data;
  assign resp_refill = !hit_q;

  assign ev_hit    = req_valid && req_ready && !req_is_store && hit;
  assign ev_miss   = acc_load_miss;
  assign ev_refill = refill_valid;
  assign ev_drop   = drop_pulse;

  property p_one_port_user;
    @(posedge clk) disable iff (!rst_n) refill_valid |-> !(req_valid && req_ready);
  endproperty
  assert property (p_one_port_user) else $error("refill and request in the same cycle");

endmodule
