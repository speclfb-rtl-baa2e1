// tb_speclfb_top: end-to-end self-checking test of the whole SpecLFB design
// at its default size (64-entry ROB in 32 rows of 2, 16/16 LDQ/STQ, 16 KB
// 4-way L1D with 2 MSHRs).
//
// The testbench plays the rest of an out-of-order core around speclfb_top:
//   * a front end that dispatches rows of two uops (ALU, load or store) or
//     a branch alone in a row, giving each uop the mask of unresolved older
//     branches and each branch its own tag;
//   * an address unit that computes load/store addresses out of order;
//   * a load pipe that issues loads to the cache in program order (so the
//     MSHRs are always taken by the oldest loads and nothing can wait on a
//     younger load) but long before they are safe;
//   * a branch unit that resolves branches out of order, some of them as
//     mispredicts, which squash the younger uops;
//   * a commit stage that retires the head row once all its uops are done;
//   * now and then an exception on the oldest unanswered load, followed by a
//     flush once that load reaches the head of the ROB.
// A behavioural memory answers line reads after 4..19 cycles and applies the
// write-through stores to a shadow copy.
//
// Checked:
//   * every answered load returns a value its word held between the issue
//     and the answer, and only loads that were issued and not squashed by a
//     mispredict or flush get a refill answer;
//   * every refill happens for a line with at least one live load whose ROB
//     row was safe (the SpecLFB rule);
//   * the mask bit of a row holding a memory uop or branch under an
//     unresolved branch is 1, and a row holding only ALU uops has bit 0;
//   * the row of the excepting load stays unsafe while the exception is
//     pending;
//   * commit always finds its head row complete, and the whole run ends.
// Every mechanism is counted and a failure is counted for each one that
// never happened: hit, miss, merge, LFB hold, refill, drop, mispredict kill,
// memory-order hold and release, exception freeze, flush, store drain,
// MSHR-full stall, store-priority stall and dispatch stall.
module tb_speclfb_top;
  import speclfb_pkg::*;
  localparam int unsigned ROWS = ROB_ROWS, BANKS = ROB_BANKS, NBR = MAX_BR;
  localparam int unsigned ENTRIES = ROWS * BANKS;
  localparam int unsigned RW = $clog2(ROWS), SW = $clog2(ENTRIES), IW = 4, AW = PADDR_BITS;
  localparam int unsigned NCYC = 30000;

  typedef enum logic [1:0] {T_ALU, T_LD, T_ST, T_BR} utype_e;

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
  // loop bounds held in variables so the model's loops stay loops
  int n_ent = ENTRIES, n_tag = NBR, n_rows = ROWS, n_banks = BANKS;

  initial begin : watchdog
    repeat (NCYC * 4) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s (cycle %0d)", what, cyc);
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_hit, n_miss, n_merge, n_hold, n_refill, n_drop, n_kill, n_mo_hold, n_mo_rel;
  int n_freeze, n_flush, n_store, n_mshr_stall, n_st_stall, n_dis_stall, n_commit;

  // ------------------------------------------------------------ memory model
  logic [63:0] shadow [logic [28:0]];
  function automatic logic [63:0] mem_word(input logic [AW-1:0] a);
    if (shadow.exists(a[31:3])) return shadow[a[31:3]];
    return {3'b0, a[31:3], 32'h0bad_f00d} ^ 64'h0123_4567_0000_0000;
  endfunction

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
      mem_resp_data[w*64 +: 64] = mem_word({pend_a[mem_resp_id][31:6], 3'(w), 3'b000});
  end

  // ------------------------------------------------------------ core model
  logic          s_v    [ENTRIES];  // uop present in the ROB
  utype_e        s_t    [ENTRIES];
  logic [NBR-1:0] s_brm [ENTRIES];  // unresolved older branches
  logic [NBR-1:0] s_tag [ENTRIES];  // own tag (branches)
  logic [IW-1:0] s_idx  [ENTRIES];
  logic [AW-1:0] s_addr [ENTRIES];
  logic          s_agu  [ENTRIES];
  logic          s_iss  [ENTRIES];
  logic          s_done [ENTRIES];
  longint        s_seq  [ENTRIES];
  int            s_dis  [ENTRIES];  // dispatch cycle
  logic [63:0]   s_vals [ENTRIES][$]; // values the word held since issue
  logic          o_miss [ENTRIES];  // miss outstanding in the cache
  logic          o_hit  [ENTRIES];  // hit answered next cycle
  int            row_chg [ROWS];    // last cycle the row changed
  logic          tag_busy [NBR];
  longint        seq_ctr;
  logic          exc_pend;
  logic [SW-1:0] exc_slot;
  int            exc_cyc;

  function automatic logic [AW-1:0] rand_addr();
    logic [AW-1:0] a;
    a = '0;
    a[7:6]   = 2'($urandom % 4);
    a[14:12] = 3'($urandom % 6);
    a[5:3]   = 3'($urandom % 8);
    return a;
  endfunction

  function automatic logic slot_row_is(input int s, input logic [RW-1:0] r);
    return RW'(s / BANKS) == r;
  endfunction

  // remove a uop from the model (squash)
  task automatic squash(input int s);
    s_v[s] = 0;
    if (s_t[s] == T_BR && !s_done[s]) begin
      for (int t = 0; t < n_tag; t++) if (s_tag[s][t]) tag_busy[t] = 0;
    end
    if (o_miss[s]) n_kill++;
    o_miss[s] = 0;
    row_chg[s / BANKS] = cyc;
  endtask

  // ------------------------------------------------------------ monitor
  logic [ROWS-1:0] mask_q;
  always @(posedge clk) if (rst_n) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (ev_miss && dut.u_l1d.u_mshr_lfb.merge_hit) n_merge++;
    if (ev_drop) n_drop++;
    if (lfb_blocked != '0) n_hold++;
    if (ev_store) n_store++;
    if (ld_valid && !ld_ready && dut.st_pending) n_st_stall++;
    if (ld_valid && !ld_ready && !dut.st_pending && mshr_busy == '1) n_mshr_stall++;
    if (dis_valid && !dis_ready) n_dis_stall++;
    mask_q <= rob_unsafe_mask_o;
    // load answers
    if (ld_resp_valid) begin
      int s;
      logic ok;
      s = int'(ld_resp_slot);
      checks++;
      if (!ld_resp_refill) begin
        if (!o_hit[s]) fail($sformatf("hit answer for slot %0d without a hit", s));
        else if (ld_resp_data !== mem_word(s_addr[s])) fail($sformatf("hit data slot %0d", s));
        else if (s_v[s]) s_done[s] = 1;
        o_hit[s] = 0;
      end else begin
        ok = 0;
        for (int i = 0; i < s_vals[s].size(); i++) if (s_vals[s][i] === ld_resp_data) ok = 1;
        if (!s_v[s] || !o_miss[s]) fail($sformatf("refill answer for dead slot %0d", s));
        else if (!ok) fail($sformatf("refill data slot %0d: %h", s, ld_resp_data));
        o_miss[s] = 0;
        s_done[s] = 1;
      end
    end
    // memory: accept requests, age pending reads
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_write) begin
        logic [63:0] w;
        w = mem_word(mem_req_addr);
        for (int b = 0; b < 8; b++) if (mem_req_be[b]) w[b*8 +: 8] = mem_req_wdata[b*8 +: 8];
        shadow[mem_req_addr[31:3]] = w;
        for (int s = 0; s < n_ent; s++)
          if (o_miss[s] && s_addr[s][31:3] == mem_req_addr[31:3]) s_vals[s].push_back(w);
      end else begin
        pend_v[mem_req_id] <= 1;
        pend_a[mem_req_id] <= mem_req_addr;
        pend_t[mem_req_id] <= 4 + int'($urandom % 16);
      end
    end
    for (int i = 0; i < 2; i++) if (pend_v[i] && pend_t[i] > 0) pend_t[i] <= pend_t[i] - 1;
    if (mem_resp_valid) pend_v[mem_resp_id] <= 0;
    // security check of every refill
    if (ev_refill) begin
      logic ok;
      n_refill++;
      ok = 0;
      for (int s = 0; s < n_ent; s++)
        if (s_v[s] && o_miss[s] && s_addr[s][31:6] == dut.u_l1d.refill_line && !mask_q[s / BANKS]) ok = 1;
      checks++;
      if (!ok) fail($sformatf("refill of line %h without a live safe load", dut.u_l1d.refill_line));
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic idle();
    dis_valid = 0; dis_uop_valid = '0; dis_unsafe = '0; dis_is_load = '0; dis_is_store = '0;
    for (int j = 0; j < n_banks; j++) begin dis_br_mask[j] = '0; dis_br_tag[j] = '0; end
    com_valid = 0; br_resolve_mask = '0; br_mispredict = 0; br_mispredict_tag = '0; br_row = '0;
    exu_exc_valid = 0; lsu_exc_valid = 0; exu_exc_slot = '0; lsu_exc_slot = '0; flush = 0;
    agu_valid = 0; agu_is_store = 0; agu_idx = '0; agu_addr = '0; agu_wdata = '0; agu_be = '0;
    ld_valid = 0; ld_addr = '0; ld_slot = '0;
  endtask

  logic [NBR-1:0] live_br;   // tags of unresolved branches in flight
  logic [ENTRIES-1:0] mu_prev;

  task automatic check_mask();
    for (int r = 0; r < n_rows; r++) begin
      logic want1, only_alu, any;
      want1 = 0; only_alu = 1; any = 0;
      for (int j = 0; j < n_banks; j++) begin
        int s;
        s = r * BANKS + j;
        if (!s_v[s]) continue;
        any = 1;
        if (s_t[s] != T_ALU) only_alu = 0;
        if (s_t[s] != T_ALU && s_dis[s] <= cyc - 2 && (s_brm[s] != '0 || (s_t[s] == T_BR && !s_done[s])))
          want1 = 1;
      end
      if (want1) begin
        checks++;
        if (!rob_unsafe_mask_o[r])
          fail($sformatf("row %0d under an unresolved branch is not unsafe: t=%0d/%0d brm=%h/%h dis=%0d/%0d v=%b%b",
                         r, s_t[2*r], s_t[2*r+1], s_brm[2*r], s_brm[2*r+1], s_dis[2*r], s_dis[2*r+1], s_v[2*r], s_v[2*r+1]));
      end
      if (any && only_alu && row_chg[r] <= cyc - 2 && !exc_pend) begin
        checks++;
        if (rob_unsafe_mask_o[r]) fail($sformatf("row %0d of ALU uops is unsafe", r));
      end
    end
  endtask

  initial begin
    int s, best;
    longint best_seq;
    logic mispredicted;
    idle();
    for (int k = 0; k < n_ent; k++) begin
      s_v[k] = 0; s_t[k] = T_ALU; s_brm[k] = '0; s_tag[k] = '0; s_idx[k] = '0; s_addr[k] = '0;
      s_agu[k] = 0; s_iss[k] = 0; s_done[k] = 0; s_seq[k] = 0; s_dis[k] = 0;
      o_miss[k] = 0; o_hit[k] = 0;
    end
    for (int r = 0; r < n_rows; r++) row_chg[r] = 0;
    for (int t = 0; t < n_tag; t++) tag_busy[t] = 0;
    pend_v[0] = 0; pend_v[1] = 0; pend_t[0] = 0; pend_t[1] = 0; pend_a[0] = '0; pend_a[1] = '0;
    seq_ctr = 0; exc_pend = 0; exc_slot = '0; exc_cyc = 0; mu_prev = '0;
    {n_hit, n_miss, n_merge, n_hold, n_refill, n_drop, n_kill, n_mo_hold, n_mo_rel} = '0;
    {n_freeze, n_flush, n_store, n_mshr_stall, n_st_stall, n_dis_stall, n_commit} = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (cyc = 0; cyc < NCYC; cyc++) begin
      logic quiet;
      quiet = (cyc >= NCYC - 1500);   // drain at the end: no new work
      // ---- checks on the state after the last edge
      check_mask();
      for (int k = 0; k < n_ent; k++) begin
        if (mem_unsafe_o[k] && s_v[k]) n_mo_hold++;
        if (mu_prev[k] && !mem_unsafe_o[k] && s_v[k] && s_t[k] != T_ALU) n_mo_rel++;
      end
      mu_prev = mem_unsafe_o;
      if (exc_pend && cyc - exc_cyc >= 2) begin
        checks++;
        if (!exc_active) fail("exception not recorded");
        // the load sat under a branch when the exception came, so its row
        // was unsafe then and must stay so until the flush
        if (s_dis[exc_slot] <= exc_cyc - 2) begin
          checks++;
          if (!rob_unsafe_mask_o[int'(exc_slot) / BANKS]) fail("excepting row became safe");
        end
        if (rob_unsafe_mask_o[int'(exc_slot) / BANKS] && s_brm[exc_slot] == '0 && !mem_unsafe_o[exc_slot]) n_freeze++;
      end

      mispredicted = 0;
      // ---- flush: the excepting load reached the head
      if (exc_pend && head_row == RW'(int'(exc_slot) / BANKS) && !rob_empty) begin
        flush = 1;
        n_flush++;
        for (int k = 0; k < n_ent; k++) if (s_v[k]) squash(k);
        exc_pend = 0;
      end else begin
        // ---- branch resolution
        if ($urandom % 3 == 0) begin
          int k0;
          k0 = int'($urandom % ENTRIES);
          for (int i = 0; i < n_ent; i++) begin
            int k;
            k = (k0 + i) % ENTRIES;
            if (s_v[k] && s_t[k] == T_BR && !s_done[k] && s_dis[k] < cyc && br_resolve_mask == '0) begin
              br_resolve_mask = s_tag[k];
              if (!exc_pend && !quiet && ($urandom % 4 == 0)) begin
                br_mispredict = 1; br_mispredict_tag = s_tag[k]; br_row = RW'(k / BANKS);
                mispredicted = 1;
                for (int m = 0; m < n_ent; m++) if (s_v[m] && (s_brm[m] & s_tag[k]) != '0) squash(m);
              end
              for (int m = 0; m < n_ent; m++) if (s_v[m]) s_brm[m] &= ~s_tag[k];
              for (int t = 0; t < n_tag; t++) if (s_tag[k][t]) tag_busy[t] = 0;
              s_done[k] = 1;
              row_chg[k / BANKS] = cyc;
            end
          end
        end
        // ---- exception on the oldest unanswered load
        if (!exc_pend && !mispredicted && !quiet && ($urandom % 50 == 0)) begin
          best = -1; best_seq = 0;
          for (int k = 0; k < n_ent; k++)
            if (s_v[k] && s_t[k] == T_LD && !s_done[k] && (best < 0 || s_seq[k] < best_seq)) begin
              best = k; best_seq = s_seq[k];
            end
          if (best >= 0 && (best % BANKS) == 0 && s_brm[best] != '0) begin
            lsu_exc_valid = 1; lsu_exc_slot = SW'(best);
            exc_pend = 1; exc_slot = SW'(best); exc_cyc = cyc;
          end
        end
        // ---- dispatch
        if (!exc_pend && !mispredicted && !quiet && ($urandom % 4 != 0)) begin
          utype_e ty [BANKS];
          logic [NBR-1:0] brm, newtag;
          int free_t;
          brm = '0;
          for (int m = 0; m < n_ent; m++) if (s_v[m] && s_t[m] == T_BR && !s_done[m]) brm |= s_tag[m];
          free_t = -1;
          // a tag freed in this cycle is not handed out again in the same cycle
          for (int t = 0; t < n_tag; t++)
            if (!tag_busy[t] && !br_resolve_mask[t] && free_t < 0) free_t = t;
          newtag = '0;
          for (int j = 0; j < n_banks; j++) begin
            int r;
            r = int'($urandom % 10);
            ty[j] = (r < 3) ? T_ALU : (r < 6) ? T_LD : (r < 8) ? T_ST : T_BR;
            if (ty[j] == T_BR && (newtag != '0 || free_t < 0)) ty[j] = T_ALU;
            if (ty[j] == T_BR) newtag = NBR'(1) << free_t;
          end
          // a branch is dispatched alone into its ROB row (bank 0)
          if (ty[1] == T_BR) begin ty[1] = T_ALU; newtag = '0; end
          dis_valid = 1;
          for (int j = 0; j < n_banks; j++) begin
            dis_uop_valid[j] = !(j > 0 && ty[0] == T_BR);
            dis_unsafe[j]    = ty[j] != T_ALU;
            dis_is_load[j]   = ty[j] == T_LD;
            dis_is_store[j]  = ty[j] == T_ST;
            dis_br_mask[j]   = brm | ((j == 1 && ty[0] == T_BR) ? newtag : '0);
            dis_br_tag[j]    = (ty[j] == T_BR) ? newtag : '0;
          end
          #1;
          if (dis_ready) begin
            for (int j = 0; j < n_banks; j++) begin
              s = int'(dis_row) * BANKS + j;
              if (!dis_uop_valid[j]) begin s_v[s] = 0; continue; end
              s_v[s] = 1; s_t[s] = ty[j]; s_brm[s] = dis_br_mask[j]; s_tag[s] = dis_br_tag[j];
              s_idx[s] = dis_lsq_idx[j]; s_addr[s] = rand_addr(); s_agu[s] = 0; s_iss[s] = 0;
              s_done[s] = (ty[j] == T_ALU); s_seq[s] = seq_ctr++; s_dis[s] = cyc;
              o_miss[s] = 0;
              if (ty[j] == T_BR) tag_busy[free_t] = 1;
            end
            row_chg[dis_row] = cyc;
          end
        end
        // ---- address generation (out of order)
        if (!mispredicted && ($urandom % 3 != 0)) begin
          int k0;
          k0 = int'($urandom % ENTRIES);
          for (int i = 0; i < n_ent && !agu_valid; i++) begin
            int k;
            k = (k0 + i) % ENTRIES;
            if (s_v[k] && (s_t[k] == T_LD || s_t[k] == T_ST) && !s_agu[k] && s_dis[k] < cyc) begin
              agu_valid = 1; agu_is_store = s_t[k] == T_ST; agu_idx = s_idx[k]; agu_addr = s_addr[k];
              agu_wdata = {$urandom, $urandom}; agu_be = 8'($urandom) | 8'h01;
              s_agu[k] = 1;
              if (s_t[k] == T_ST) s_done[k] = 1;
            end
          end
        end
        // ---- load issue: the oldest load not yet issued, once its address is known
        if (!mispredicted && !flush) begin
          best = -1; best_seq = 0;
          for (int k = 0; k < n_ent; k++)
            if (s_v[k] && s_t[k] == T_LD && !s_iss[k] && (best < 0 || s_seq[k] < best_seq)) begin
              best = k; best_seq = s_seq[k];
            end
          if (best >= 0 && s_agu[best] && s_dis[best] < cyc - 1) begin
            ld_valid = 1; ld_addr = s_addr[best]; ld_slot = SW'(best);
            #1;
            if (ld_ready) begin
              s_iss[best] = 1;
              if (dut.u_l1d.hit) o_hit[best] = 1;
              else begin
                o_miss[best] = 1;
                s_vals[best].delete();
                s_vals[best].push_back(mem_word(s_addr[best]));
              end
            end
          end
        end
        // ---- commit of the head row
        if (!rob_empty && !flush) begin
          logic ready;
          ready = 1;
          for (int j = 0; j < n_banks; j++) begin
            s = int'(head_row) * BANKS + j;
            if (s_v[s] && (!s_done[s] || o_hit[s] || (exc_pend && s == int'(exc_slot)))) ready = 0;
          end
          if (ready && ($urandom % 4 != 0)) begin
            com_valid = 1;
            n_commit++;
            for (int j = 0; j < n_banks; j++) begin
              s = int'(head_row) * BANKS + j;
              s_v[s] = 0;
            end
            row_chg[head_row] = cyc;
          end
        end
      end
      @(posedge clk);
      #1 idle();
    end

    // end of run: everything answered and retired
    checks++;
    if (!rob_empty) fail("ROB not empty at the end");
    checks++;
    if (mshr_busy != '0) fail("MSHRs still busy at the end");
    for (int k = 0; k < n_ent; k++) if (o_miss[k]) fail($sformatf("load in slot %0d never answered", k));

    $display("events: hit=%0d miss=%0d merge=%0d hold_cycles=%0d refill=%0d drop=%0d kill=%0d",
             n_hit, n_miss, n_merge, n_hold, n_refill, n_drop, n_kill);
    $display("events: mem_order_hold=%0d mem_order_release=%0d freeze=%0d flush=%0d store=%0d",
             n_mo_hold, n_mo_rel, n_freeze, n_flush, n_store);
    $display("events: mshr_full_stall=%0d store_priority_stall=%0d dispatch_stall=%0d commits=%0d",
             n_mshr_stall, n_st_stall, n_dis_stall, n_commit);
    if (n_hit == 0)        fail("no hit");
    if (n_miss == 0)       fail("no miss");
    if (n_merge == 0)      fail("no merged miss");
    if (n_hold == 0)       fail("no line held in the LFB");
    if (n_refill == 0)     fail("no refill");
    if (n_drop == 0)       fail("no dropped line");
    if (n_kill == 0)       fail("no squashed outstanding miss");
    if (n_mo_hold == 0)    fail("no memory-order hold");
    if (n_mo_rel == 0)     fail("no memory-order release");
    if (n_freeze == 0)     fail("no exception freeze");
    if (n_flush == 0)      fail("no flush");
    if (n_store == 0)      fail("no store drained");
    if (n_mshr_stall == 0) fail("no MSHR-full stall");
    if (n_st_stall == 0)   fail("no store-priority stall");
    if (n_dis_stall == 0)  fail("no dispatch stall");
    checks += 15;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
