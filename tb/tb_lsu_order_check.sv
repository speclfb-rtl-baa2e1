// tb_lsu_order_check: self-checking test of the LDQ/STQ memory-order check.
//
// Random rounds: up to 10 loads and stores are allocated in program order
// (sometimes two in one dispatch row), some get addresses from a small pool
// so that conflicts are frequent, others keep their address unknown. The
// expected unsafe set is computed here from program order: a memory
// instruction is unsafe while its own address is unknown or an older store
// has an unknown or same-word address, and it is rechecked after every
// address update. At the end of a round everything commits (and is then no
// longer unsafe) and the stores drain in program order. Directed checks cover kills (tail
// roll-back), the full condition and the word granularity.
module tb_lsu_order_check;
  import speclfb_pkg::*;
  localparam int unsigned LDQ = 16, STQ = 16, ENTRIES = 64, BANKS = 2, PADDR = 32;
  localparam int unsigned SW = $clog2(ENTRIES), IW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BANKS-1:0] alloc_valid, alloc_is_store;
  logic [SW-1:0]    alloc_slot [BANKS];
  logic [IW-1:0]    alloc_idx  [BANKS];
  logic             alloc_ready;
  logic             agu_valid, agu_is_store;
  logic [IW-1:0]    agu_idx;
  logic [PADDR-1:0] agu_addr;
  logic [63:0]      agu_wdata;
  logic [7:0]       agu_be;
  logic [ENTRIES-1:0] commit_vec, kill_vec, mem_unsafe;
  logic             stq_deq, stq_head_valid, stq_head_committed;
  logic [PADDR-1:0] stq_head_addr;
  logic [63:0]      stq_head_data;
  logic [7:0]       stq_head_be;
  int checks = 0, failures = 0;

  lsu_order_check #(.LDQ(LDQ), .STQ(STQ), .ENTRIES(ENTRIES), .BANKS(BANKS), .PADDR(PADDR)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    alloc_valid = '0; alloc_is_store = '0; alloc_slot[0] = '0; alloc_slot[1] = '0;
    agu_valid = 0; agu_is_store = 0; agu_idx = '0; agu_addr = '0; agu_wdata = '0; agu_be = '0;
    commit_vec = '0; kill_vec = '0; stq_deq = 0;
  endtask
  task automatic step();
    @(posedge clk); #1; idle(); #1;
  endtask

  // program-order model of one round
  int          n;
  logic        is_st  [10];
  logic        known  [10];
  logic [31:0] addr   [10];
  logic [SW-1:0] slot [10];
  logic [IW-1:0] qidx [10];
  logic        gone   [10];

  task automatic check_expect(input string what);
    logic [ENTRIES-1:0] exp;
    exp = '0;
    for (int i = 0; i < n; i++) begin
      logic u;
      if (gone[i]) continue;
      u = !known[i];
      for (int j = 0; j < i; j++)
        if (is_st[j] && !gone[j] && (!known[j] || (addr[j] >> 3) == (addr[i] >> 3))) u = 1'b1;
      exp[slot[i]] = u;
    end
    checks++;
    if (mem_unsafe !== exp) begin
      failures++;
      $display("FAIL %s: mem_unsafe=%h expected=%h", what, mem_unsafe, exp);
    end
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1;
    checks++;
    if (mem_unsafe !== '0 || !alloc_ready) begin failures++; $display("FAIL after reset"); end

    // directed: word granularity; store 0x100, loads 0x104 (same word) and 0x108
    alloc_valid = 2'b11; alloc_is_store = 2'b01; alloc_slot[0] = 6'd0; alloc_slot[1] = 6'd1;
    step();
    alloc_valid = 2'b01; alloc_is_store = 2'b00; alloc_slot[0] = 6'd2;
    step();
    agu_valid = 1; agu_is_store = 1; agu_idx = 0; agu_addr = 32'h100; agu_wdata = 64'h1234; agu_be = 8'hff;
    step();
    agu_valid = 1; agu_is_store = 0; agu_idx = 0; agu_addr = 32'h104;
    step();
    agu_valid = 1; agu_is_store = 0; agu_idx = 1; agu_addr = 32'h108;
    step();
    checks++;
    if (mem_unsafe[2:0] !== 3'b010) begin
      failures++; $display("FAIL word granularity: %b", mem_unsafe[2:0]);
    end
    // store commits and drains: the load becomes safe
    commit_vec[0] = 1'b1;
    step();
    checks++;
    if (!(stq_head_valid && stq_head_committed && stq_head_addr == 32'h100 && stq_head_data == 64'h1234)) begin
      failures++; $display("FAIL STQ head after commit");
    end
    stq_deq = 1;
    step();
    checks++;
    if (mem_unsafe !== '0) begin failures++; $display("FAIL load not safe after store left"); end
    // kill the two loads; a new load reuses LDQ index 0
    kill_vec[1] = 1'b1; kill_vec[2] = 1'b1;
    step();
    alloc_valid = 2'b01; alloc_is_store = 2'b00; alloc_slot[0] = 6'd5;
    #1;
    checks++;
    if (alloc_idx[0] !== 4'd0) begin failures++; $display("FAIL tail not rolled back: %0d", alloc_idx[0]); end
    step();
    commit_vec[5] = 1'b1;     // commit it so the queues are empty again
    step();
    // full: 8 rows of two loads
    for (int r = 0; r < 8; r++) begin
      alloc_valid = 2'b11; alloc_is_store = 2'b00;
      alloc_slot[0] = SW'(2 * r); alloc_slot[1] = SW'(2 * r + 1);
      step();
    end
    checks++;
    if (alloc_ready !== 1'b0) begin failures++; $display("FAIL LDQ full not reported"); end
    commit_vec = '1;
    step();
    checks++;
    if (alloc_ready !== 1'b1) begin failures++; $display("FAIL LDQ not empty after commit"); end

    // random rounds
    for (int round = 0; round < 300; round++) begin
      n = 2 + ($urandom % 9);
      for (int i = 0; i < n; i++) begin
        is_st[i] = 1'($urandom % 2);
        known[i] = 1'b0;
        addr[i]  = 32'h1000 + 32'(($urandom % 6) * 4);
        slot[i]  = SW'(i + 20);
        gone[i]  = 1'b0;
      end
      // allocate, one or two per row
      for (int i = 0; i < n; ) begin
        if (i + 1 < n && ($urandom % 2 != 0)) begin
          alloc_valid = 2'b11; alloc_is_store = {is_st[i+1], is_st[i]};
          alloc_slot[0] = slot[i]; alloc_slot[1] = slot[i+1];
          #1 qidx[i] = alloc_idx[0]; qidx[i+1] = alloc_idx[1];
          step();
          i += 2;
        end else begin
          alloc_valid = 2'b01; alloc_is_store = {1'b0, is_st[i]};
          alloc_slot[0] = slot[i];
          #1 qidx[i] = alloc_idx[0];
          step();
          i += 1;
        end
      end
      check_expect("after allocation");
      // random addresses become known
      for (int i = 0; i < n; i++) begin
        if ($urandom % 4 != 0) begin
          agu_valid = 1; agu_is_store = is_st[i]; agu_idx = qidx[i]; agu_addr = addr[i];
          agu_wdata = 64'(i); agu_be = 8'hff;
          known[i] = 1'b1;
          step();
          check_expect("after address");
        end
      end
      // all addresses known
      for (int i = 0; i < n; i++) if (!known[i]) begin
        agu_valid = 1; agu_is_store = is_st[i]; agu_idx = qidx[i]; agu_addr = addr[i];
        known[i] = 1'b1;
        step();
      end
      check_expect("all addresses known");
      // commit everything in order; stores drain one per cycle
      for (int i = 0; i < n; i++) commit_vec[slot[i]] = 1'b1;
      step();
      // committed instructions are no longer speculative
      for (int i = 0; i < n; i++) gone[i] = 1'b1;
      check_expect("after commit");
      for (int i = 0; i < n; i++) if (is_st[i]) begin
        checks++;
        if (!(stq_head_valid && stq_head_committed && stq_head_addr == addr[i])) begin
          failures++; $display("FAIL STQ head order");
        end
        stq_deq = 1;
        step();
      end
      checks++;
      if (stq_head_valid !== 1'b0) begin failures++; $display("FAIL STQ not drained"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
