// tb_spectre_poc: the Evict+Reload proof-of-concept attacks of Spectre v1
// (unresolved branch) and Spectre v4 (store bypass) played against
// speclfb_top at its default size, with the probe timing of the attack.
//
// The testbench acts as both victim and attacker on one core model:
//   evict  - 256 loads to an eviction buffer fill every way of every set of
//            the 16 KB L1D, so no line of the probe array array2 (256 lines
//            of 64 bytes) is cached;
//   victim - v1: a load of array2[secret*64] under a branch that is later
//            found mispredicted. v4: the same load under an older store
//            whose address is still unknown; when the store's address turns
//            out to be the same word, the load is marked with an exception
//            (memory-order violation), the store commits, and the pipeline
//            is flushed at the load;
//   probe  - every line of array2 is loaded once by a safe load and its
//            latency (issue to answer) is compared with a 50-cycle threshold.
// With SpecLFB no probe may be fast after the squashed victim load: the line
// was held in the fill buffer while unsafe and dropped at the squash. As a
// control, the v1 run is repeated with the branch resolved correctly; then
// exactly the victim's line must be fast, which shows that the probe would
// see a leak and that safe lines still reach the cache.
// The memory model answers line reads after 60 cycles (this testbench's own
// number; the 50-cycle threshold is the one used for the evaluated core).
module tb_spectre_poc;
  import speclfb_pkg::*;
  localparam int unsigned ROWS = ROB_ROWS, BANKS = ROB_BANKS, NBR = MAX_BR;
  localparam int unsigned ENTRIES = ROWS * BANKS;
  localparam int unsigned RW = $clog2(ROWS), SW = $clog2(ENTRIES), IW = 4, AW = PADDR_BITS;
  localparam int unsigned MEM_LAT = 60, THRESHOLD = 50, PROBE_LINES = 256;
  localparam logic [AW-1:0] ARRAY2 = 32'h0001_0000, EVICT_BUF = 32'h0004_0000;
  localparam int unsigned SECRET = 8'h53;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dis_valid, dis_ready;
  logic [BANKS-1:0] dis_uop_valid, dis_unsafe, dis_is_load, dis_is_store;
  logic [NBR-1:0] dis_br_mask [BANKS];
  logic [NBR-1:0] dis_br_tag  [BANKS];
  logic [RW-1:0] dis_row, head_row, br_row;
  logic [IW-1:0] dis_lsq_idx [BANKS];
  logic com_valid, rob_empty;
  logic [NBR-1:0] br_resolve_mask, br_mispredict_tag;
  logic br_mispredict;
  logic exu_exc_valid, lsu_exc_valid, flush;
  logic [SW-1:0] exu_exc_slot, lsu_exc_slot;
  logic agu_valid, agu_is_store;
  logic [IW-1:0] agu_idx;
  logic [AW-1:0] agu_addr;
  logic [63:0] agu_wdata;
  logic [7:0] agu_be;
  logic ld_valid, ld_ready, ld_resp_valid, ld_resp_refill;
  logic [AW-1:0] ld_addr;
  logic [SW-1:0] ld_slot, ld_resp_slot;
  logic [63:0] ld_resp_data;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_resp_valid;
  logic [AW-1:0] mem_req_addr;
  logic [63:0] mem_req_wdata;
  logic [7:0] mem_req_be;
  logic [0:0] mem_req_id, mem_resp_id;
  logic [511:0] mem_resp_data;
  logic [ROWS-1:0] rob_unsafe_mask_o;
  logic [ENTRIES-1:0] mem_unsafe_o, slot_valid, slot_unsafe;
  logic [1:0] mshr_busy, lfb_blocked;
  logic exc_active, ev_hit, ev_miss, ev_refill, ev_drop, ev_store;

  speclfb_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_drop = 0, n_refill = 0, n_hold = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // ------------------------------------------------------------ memory
  logic          pend_v [2];
  logic [AW-1:0] pend_a [2];
  int            pend_t [2];
  assign mem_req_ready = 1'b1;
  always_comb begin
    mem_resp_valid = 0; mem_resp_id = '0; mem_resp_data = '0;
    for (int i = 1; i >= 0; i--)
      if (pend_v[i] && pend_t[i] == 0) begin
        mem_resp_valid = 1; mem_resp_id = 1'(i);
      end
    for (int w = 0; w < 8; w++)
      mem_resp_data[w*64 +: 64] = {32'(pend_a[mem_resp_id][31:6]), 32'(w)};
  end

  // ------------------------------------------------------------ monitor
  logic got   [ENTRIES];
  int   got_c [ENTRIES];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      pend_v[0] <= 0; pend_v[1] <= 0;
    end else begin
      if (mem_req_valid && !mem_req_write) begin
        pend_v[mem_req_id] <= 1;
        pend_a[mem_req_id] <= mem_req_addr;
        pend_t[mem_req_id] <= int'(MEM_LAT);
      end
      for (int i = 0; i < 2; i++) if (pend_v[i] && pend_t[i] > 0) pend_t[i] <= pend_t[i] - 1;
      if (mem_resp_valid) pend_v[mem_resp_id] <= 0;
      if (ld_resp_valid) begin got[ld_resp_slot] = 1; got_c[ld_resp_slot] = cyc; end
      if (ev_drop) n_drop++;
      if (ev_refill) n_refill++;
      if (lfb_blocked != '0) n_hold++;
    end
  end

  // ------------------------------------------------------------ core actions
  task automatic idle();
    dis_valid = 0; dis_uop_valid = '0; dis_unsafe = '0; dis_is_load = '0; dis_is_store = '0;
    for (int j = 0; j < BANKS; j++) begin dis_br_mask[j] = '0; dis_br_tag[j] = '0; end
    com_valid = 0; br_resolve_mask = '0; br_mispredict = 0; br_mispredict_tag = '0; br_row = '0;
    exu_exc_valid = 0; lsu_exc_valid = 0; exu_exc_slot = '0; lsu_exc_slot = '0; flush = 0;
    agu_valid = 0; agu_is_store = 0; agu_idx = '0; agu_addr = '0; agu_wdata = '0; agu_be = '0;
    ld_valid = 0; ld_addr = '0; ld_slot = '0;
  endtask
  task automatic step();
    @(posedge clk); #1 idle();
  endtask

  // one uop in bank 0 of a new ROB row: kind 1 load, 2 store, 3 branch
  task automatic dispatch(input int kind, input logic [NBR-1:0] brm, input logic [NBR-1:0] tag,
                          output logic [RW-1:0] row, output logic [IW-1:0] idx);
    dis_valid = 1; dis_uop_valid = 2'b01; dis_unsafe = 2'b01;
    dis_is_load = {1'b0, kind == 1}; dis_is_store = {1'b0, kind == 2};
    dis_br_mask[0] = brm; dis_br_tag[0] = tag;
    #1;
    while (!dis_ready) begin
      @(posedge clk); #1;
    end
    row = dis_row; idx = dis_lsq_idx[0];
    step();
  endtask

  task automatic agu(input logic st, input logic [IW-1:0] idx, input logic [AW-1:0] a);
    agu_valid = 1; agu_is_store = st; agu_idx = idx; agu_addr = a; agu_wdata = 64'h5ec2e7; agu_be = 8'hff;
    step();
  endtask

  // issue a load; returns the cycle it was accepted
  task automatic issue(input logic [RW-1:0] row, input logic [AW-1:0] a, output int t0);
    got[SW'(row) * SW'(BANKS)] = 0;
    ld_valid = 1; ld_addr = a; ld_slot = SW'(row) * SW'(BANKS);
    #1;
    while (!ld_ready) begin
      @(posedge clk); #1;
    end
    t0 = cyc;
    step();
  endtask

  task automatic wait_answer(input logic [RW-1:0] row, input int t0, output int lat);
    int s, n;
    s = int'(row) * BANKS;
    n = 0;
    while (!got[s] && n < 1000) begin step(); n++; end
    lat = got[s] ? got_c[s] - t0 : 9999;
  endtask

  task automatic commit_head();
    com_valid = 1;
    step();
  endtask

  // a complete safe load: dispatch, address, issue, answer, commit
  task automatic safe_load(input logic [AW-1:0] a, output int lat);
    logic [RW-1:0] r;
    logic [IW-1:0] i;
    int t0;
    dispatch(1, '0, '0, r, i);
    agu(1'b0, i, a);
    issue(r, a, t0);
    wait_answer(r, t0, lat);
    commit_head();
  endtask

  task automatic evict();
    int lat;
    for (int k = 0; k < int'(PROBE_LINES); k++) safe_load(EVICT_BUF + AW'(k * 64), lat);
  endtask

  // probe array2; returns how many lines were fast and whether the secret one was
  task automatic probe(output int fast, output logic secret_fast);
    int lat;
    fast = 0; secret_fast = 0;
    for (int k = 0; k < int'(PROBE_LINES); k++) begin
      safe_load(ARRAY2 + AW'(k * 64), lat);
      if (lat < int'(THRESHOLD)) begin
        fast++;
        if (k == int'(SECRET)) secret_fast = 1;
      end
    end
  endtask

  // ------------------------------------------------------------ the attacks
  logic [RW-1:0] rb, rl, rs;
  logic [IW-1:0] ib, il, ist;
  int t0, lat, fast, d0, r0, h0;
  logic sf;
  logic [AW-1:0] victim_a;

  initial begin
    idle();
    for (int k = 0; k < ENTRIES; k++) begin got[k] = 0; got_c[k] = 0; end
    pend_v[0] = 0; pend_v[1] = 0; pend_t[0] = 0; pend_t[1] = 0; pend_a[0] = '0; pend_a[1] = '0;
    victim_a = ARRAY2 + AW'(SECRET * 64);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---------------- control: v1 shape, branch predicted correctly
    evict();
    dispatch(3, '0, 12'h001, rb, ib);
    dispatch(1, 12'h001, '0, rl, il);
    agu(1'b0, il, victim_a);
    issue(rl, victim_a, t0);
    repeat (MEM_LAT + 20) step();
    expect_true(lfb_blocked != '0 && !got[int'(rl) * BANKS], "control: line held while the branch ist unresolved");
    br_resolve_mask = 12'h001;
    step();
    wait_answer(rl, t0, lat);
    expect_true(lat < 1000, "control: load answered once the branch resolved");
    commit_head(); commit_head();
    probe(fast, sf);
    $display("control (correct path): %0d fast probe lines, secret line fast: %b", fast, sf);
    expect_true(fast == 1 && sf, "control: exactly the accessed line ist cached");

    // ---------------- Spectre v1: load under a mispredicted branch
    evict();
    d0 = n_drop; r0 = n_refill;
    dispatch(3, '0, 12'h002, rb, ib);
    dispatch(1, 12'h002, '0, rl, il);
    agu(1'b0, il, victim_a);
    issue(rl, victim_a, t0);
    repeat (MEM_LAT + 20) step();
    expect_true(lfb_blocked != '0, "v1: line held in the LFB");
    br_resolve_mask = 12'h002; br_mispredict = 1; br_mispredict_tag = 12'h002; br_row = rb;
    step();
    repeat (5) step();
    expect_true(n_drop == d0 + 1 && n_refill == r0, "v1: squashed line dropped, not refilled");
    expect_true(!got[int'(rl) * BANKS], "v1: squashed load never answered");
    commit_head();
    expect_true(rob_empty, "v1: ROB empty after the branch commits");
    probe(fast, sf);
    $display("Spectre v1: %0d fast probe lines, secret line fast: %b", fast, sf);
    expect_true(fast == 0 && !sf, "v1: no probe line ist cached");

    // ---------------- Spectre v4: load bypassing an older store
    evict();
    d0 = n_drop; r0 = n_refill;
    dispatch(2, '0, '0, rs, ist);
    dispatch(1, '0, '0, rl, il);
    agu(1'b0, il, victim_a);
    #1 expect_true(mem_unsafe_o[int'(rl) * BANKS], "v4: load unsafe while the store address ist unknown");
    issue(rl, victim_a, t0);
    repeat (MEM_LAT + 20) step();
    expect_true(lfb_blocked != '0, "v4: line held in the LFB");
    agu(1'b1, ist, victim_a);              // the store writes the same word
    lsu_exc_valid = 1; lsu_exc_slot = SW'(rl) * SW'(BANKS);   // memory-order violation
    step();
    commit_head();                        // the store commits and drains
    repeat (20) step();
    expect_true(lfb_blocked != '0 && n_refill == r0, "v4: line still held after the store left");
    expect_true(head_row == rl, "v4: the violating load ist at the head");
    flush = 1;
    step();
    repeat (5) step();
    expect_true(n_drop == d0 + 1 && n_refill == r0, "v4: squashed line dropped, not refilled");
    expect_true(rob_empty && !exc_active, "v4: flush emptied the ROB");
    probe(fast, sf);
    $display("Spectre v4: %0d fast probe lines, secret line fast: %b", fast, sf);
    expect_true(fast == 0 && !sf, "v4: no probe line ist cached");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
