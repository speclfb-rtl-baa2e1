// tb_l1d_cache: self-checking test of the L1 data cache with SpecLFB.
//
// A behavioural lower level answers line reads after 4..19 cycles, out of
// order between the two MSHRs, and applies posted writes to a shadow copy
// of memory. Random loads go to a small pool of lines that map to few sets,
// so hits, misses, merges and evictions all happen. The testbench plays the
// ROB: a new miss marks its ROB row unsafe half of the time, unsafe rows
// turn safe at random, and some outstanding misses are squashed.
// Checked:
//   * every answered load returns the shadow-memory word of its address;
//   * a hit answers exactly one cycle after the request was accepted;
//   * every refill carries a line for which at least one live, safe miss is
//     outstanding (the security check), and a line whose misses were all
//     squashed is never refilled;
//   * every miss that was not squashed is answered;
//   * committed stores are written through and later loads see them.
module tb_l1d_cache;
  import speclfb_pkg::*;
  localparam int unsigned ROWS = 32, ENTRIES = 64, SW = 6, AW = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0] rob_unsafe_mask;
  logic [ENTRIES-1:0] kill_vec;
  logic req_valid, req_ready, req_is_store;
  logic [AW-1:0] req_addr;
  logic [63:0] req_wdata;
  logic [7:0] req_be;
  logic [SW-1:0] req_slot;
  logic resp_valid, resp_refill;
  logic [SW-1:0] resp_slot;
  logic [63:0] resp_data;
  logic mem_req_valid, mem_req_ready, mem_req_write;
  logic [AW-1:0] mem_req_addr;
  logic [63:0] mem_req_wdata;
  logic [7:0] mem_req_be;
  logic [0:0] mem_req_id, mem_resp_id;
  logic mem_resp_valid;
  logic [511:0] mem_resp_data;
  logic ev_hit, ev_miss, ev_refill, ev_drop;
  logic [1:0] lfb_blocked, mshr_busy;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_refill = 0, n_drop = 0, n_block = 0, n_store = 0, n_kill = 0;

  l1d_cache dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ memory model
  logic [63:0] shadow [logic [28:0]];
  function automatic logic [63:0] mem_word(input logic [AW-1:0] a);
    if (shadow.exists(a[31:3])) return shadow[a[31:3]];
    return 64'({a[31:3], 3'b101}) ^ 64'h5a5a_0000_0000_0000;
  endfunction

  logic        pend_v   [2];
  logic [AW-1:0] pend_a [2];
  int          pend_t   [2];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_v[0] <= 0; pend_v[1] <= 0;
    end else begin
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_write) begin
          logic [63:0] w;
          w = mem_word(mem_req_addr);
          for (int b = 0; b < 8; b++) if (mem_req_be[b]) w[b*8 +: 8] = mem_req_wdata[b*8 +: 8];
          shadow[mem_req_addr[31:3]] = w;
        end else begin
          pend_v[mem_req_id] <= 1;
          pend_a[mem_req_id] <= mem_req_addr;
          pend_t[mem_req_id] <= 4 + int'($urandom % 16);
        end
      end
      for (int i = 0; i < 2; i++) if (pend_v[i] && pend_t[i] > 0) pend_t[i] <= pend_t[i] - 1;
      if (mem_resp_valid) pend_v[mem_resp_id] <= 0;
    end
  end
  always_comb begin
    mem_resp_valid = 0; mem_resp_id = '0; mem_resp_data = '0;
    for (int i = 1; i >= 0; i--)
      if (pend_v[i] && pend_t[i] == 0) begin
        mem_resp_valid = 1; mem_resp_id = 1'(i);
      end
    for (int w = 0; w < 8; w++)
      mem_resp_data[w*64 +: 64] = mem_word({pend_a[mem_resp_id][31:6], 3'(w), 3'b000});
  end
  assign mem_req_ready = 1'b1;

  // ------------------------------------------------------------ ROB model
  logic          out_v    [ENTRIES];   // load outstanding in slot
  logic          out_miss [ENTRIES];
  logic          out_kill [ENTRIES];
  logic [AW-1:0] out_a    [ENTRIES];
  int            outstanding;

  always_comb begin
    outstanding = 0;
    for (int s = 0; s < ENTRIES; s++) if (out_v[s]) outstanding++;
  end

  // monitor: responses, refills, hit latency
  logic          acc_hit_q;
  logic [ROWS-1:0] mask_q;
  logic [SW-1:0] acc_slot_q;
  always @(posedge clk) if (rst_n) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (ev_drop) n_drop++;
    if (lfb_blocked != '0) n_block++;
    mask_q <= rob_unsafe_mask;
    if (resp_valid) begin
      checks++;
      if (!out_v[resp_slot] || resp_data !== mem_word(out_a[resp_slot])) begin
        failures++;
        $display("FAIL response slot %0d data %h expected %h", resp_slot, resp_data, mem_word(out_a[resp_slot]));
      end
      if (!resp_refill) begin
        checks++;
        if (!(acc_hit_q && acc_slot_q == resp_slot)) begin
          failures++; $display("FAIL hit not answered after one cycle");
        end
      end
      out_v[resp_slot] = 1'b0;
    end
    if (ev_refill) begin
      logic ok;
      n_refill++;
      ok = 0;
      for (int s = 0; s < ENTRIES; s++)
        if (out_v[s] && out_miss[s] && !out_kill[s] && out_a[s][31:6] == dut.refill_line
            && !mask_q[s/2]) ok = 1;
      checks++;
      if (!ok) begin failures++; $display("FAIL refill of line %h without a live safe miss", dut.refill_line); end
    end
    acc_hit_q  <= ev_hit;
    acc_slot_q <= req_slot;
  end

  // address pool: 24 lines in 4 sets -> 6 lines per 4-way set
  function automatic logic [AW-1:0] rand_addr();
    logic [AW-1:0] a;
    a = '0;
    a[7:6]   = 2'($urandom % 4);          // set (low index bits)
    a[14:12] = 3'($urandom % 6);          // tag bits
    a[5:3]   = 3'($urandom % 8);          // word in line
    return a;
  endfunction

  task automatic free_slot(output int s);
    s = -1;
    for (int k = 0; k < ENTRIES; k++) if (!out_v[k] && s < 0 && ($urandom % 4 == 0 || k > 40)) s = k;
  endtask

  int s, waitc;
  initial begin
    for (int k = 0; k < ENTRIES; k++) begin out_v[k] = 0; out_kill[k] = 0; out_miss[k] = 0; out_a[k] = '0; end
    rob_unsafe_mask = '0; kill_vec = '0;
    req_valid = 0; req_is_store = 0; req_addr = '0; req_wdata = '0; req_be = '0; req_slot = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int phase = 0; phase < 40; phase++) begin
      // load traffic
      for (int c = 0; c < 300; c++) begin
        // ROB side: retire answered loads, relax the mask, squash now and then
        for (int r = 0; r < ROWS; r++) if (rob_unsafe_mask[r] && ($urandom % 12 == 0)) rob_unsafe_mask[r] = 0;
        kill_vec = '0;
        if ($urandom % 20 == 0) begin
          int k0;
          logic done;
          k0 = int'($urandom % ENTRIES);
          done = 0;
          for (int i = 0; i < ENTRIES; i++) begin
            int k;
            k = (k0 + i) % ENTRIES;
            if (!done && out_v[k] && out_miss[k] && !out_kill[k] && rob_unsafe_mask[k/2]) begin
              kill_vec[k] = 1'b1; out_kill[k] = 1; n_kill++; done = 1;
            end
          end
        end
        // issue a load
        free_slot(s);
        req_valid = 0;
        if (s >= 0 && ($urandom % 2 == 0)) begin
          req_valid = 1; req_is_store = 0; req_slot = SW'(s); req_addr = rand_addr();
        end
        #1;
        if (req_valid && req_ready) begin
          out_v[s] = 1; out_a[s] = req_addr; out_kill[s] = 0; out_miss[s] = !dut.hit;
          if (!dut.hit && !out_v[s ^ 1] && ($urandom % 2 == 0)) rob_unsafe_mask[s/2] = 1'b1;
        end
        @(posedge clk);
        // answered loads leave
        #1;
        kill_vec = '0;
        req_valid = 0;
        // squashed misses are never answered; their slot frees once the MSHRs let go
        for (int k = 0; k < ENTRIES; k++)
          if (out_v[k] && out_kill[k] && mshr_busy == '0) out_v[k] = 0;
      end
      // drain: every non-squashed miss must be answered
      rob_unsafe_mask = '0;
      waitc = 0;
      while (waitc < 200) begin
        @(posedge clk);
        #1;
        waitc++;
      end
      for (int k = 0; k < ENTRIES; k++) begin
        if (out_v[k] && !out_kill[k]) begin
          checks++; failures++;
          $display("FAIL load in slot %0d never answered", k);
        end
        out_v[k] = 0; out_kill[k] = 0;
      end
      // committed stores, then the next phase's loads must see them
      for (int n = 0; n < 8; n++) begin
        req_valid = 1; req_is_store = 1; req_addr = rand_addr();
        req_wdata = {$urandom, $urandom}; req_be = 8'($urandom) | 8'h01;
        #1;
        while (!req_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        n_store++;
        req_valid = 0; req_is_store = 0;
      end
    end
    // every mechanism must have been exercised
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_refill == 0 || n_drop == 0 || n_block == 0 || n_kill == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: hit=%0d miss=%0d refill=%0d drop=%0d block=%0d kill=%0d",
               n_hit, n_miss, n_refill, n_drop, n_block, n_kill);
    end
    $display("events: hit=%0d miss=%0d refill=%0d drop=%0d blocked_cycles=%0d kill=%0d store=%0d",
             n_hit, n_miss, n_refill, n_drop, n_block, n_kill, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
