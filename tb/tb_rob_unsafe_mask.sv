// tb_rob_unsafe_mask: self-checking test of the ROB unsafe mask.
//
// Directed scenarios, each checked against the mask expected from the
// SpecLFB update rules:
//   1. a load whose memory order is unresolved keeps its row unsafe until
//      the LSU reports the order resolved; a safe ALU uop never sets a bit;
//   2. a branch and a load under it stay unsafe until the branch resolves,
//      and the mask drops one cycle after the resolution;
//   3. a mispredict kills the younger uops (kill_vec) and rolls the tail back
//      while the branch itself survives;
//   4. an exception freezes the bits of the excepting uop and all younger
//      uops: resolving their branch does not clear them, while older uops
//      clear; with both exception sources active the older one is taken;
//      flush empties everything;
//   5. commit retires the head row (commit_vec) and the ROB reports full
//      after ROWS rows.
module tb_rob_unsafe_mask;
  import speclfb_pkg::*;
  localparam int unsigned ROWS = 32, BANKS = 2, NBR = 12;
  localparam int unsigned ENTRIES = ROWS * BANKS;
  localparam int unsigned RW = $clog2(ROWS), SW = $clog2(ENTRIES);

  logic clk = 1'b0, rst_n = 1'b0;
  logic dis_valid; logic [BANKS-1:0] dis_uop_valid, dis_unsafe;
  logic [NBR-1:0] dis_br_mask [BANKS];
  logic [NBR-1:0] dis_br_tag  [BANKS];
  logic dis_ready; logic [RW-1:0] tail_row, head_row, br_row;
  logic com_valid; logic [ENTRIES-1:0] commit_vec, mem_unsafe, slot_valid, slot_unsafe, kill_vec;
  logic [NBR-1:0] br_resolve_mask, br_mispredict_tag; logic br_mispredict;
  logic exu_exc_valid, lsu_exc_valid, flush, exc_active, empty;
  logic [SW-1:0] exu_exc_slot, lsu_exc_slot;
  logic [ROWS-1:0] mask;
  int checks = 0, failures = 0;

  rob_unsafe_mask #(.ROWS(ROWS), .BANKS(BANKS), .NBR(NBR)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    dis_valid = 0; dis_uop_valid = '0; dis_unsafe = '0;
    for (int j = 0; j < BANKS; j++) begin dis_br_mask[j] = '0; dis_br_tag[j] = '0; end
    com_valid = 0; br_resolve_mask = '0; br_mispredict = 0; br_mispredict_tag = '0; br_row = '0;
    exu_exc_valid = 0; lsu_exc_valid = 0; exu_exc_slot = '0; lsu_exc_slot = '0; flush = 0;
  endtask

  task automatic step();
    @(posedge clk); #1;
    idle();
  endtask

  // dispatch one row: per bank {valid, unsafe, br_mask, own tag}
  task automatic dispatch(input logic [1:0] v, input logic [1:0] u,
                          input logic [NBR-1:0] m0, input logic [NBR-1:0] m1,
                          input logic [NBR-1:0] t0, input logic [NBR-1:0] t1,
                          output logic [RW-1:0] row);
    #1 row = tail_row;
    if (!dis_ready) begin failures++; $display("FAIL dispatch while not ready at row %0d t=%0t", tail_row, $time); end
    dis_valid = 1; dis_uop_valid = v; dis_unsafe = u;
    dis_br_mask[0] = m0; dis_br_mask[1] = m1; dis_br_tag[0] = t0; dis_br_tag[1] = t1;
    step();
  endtask

  task automatic expect_mask(input logic [ROWS-1:0] exp, input string what);
    checks++;
    if (mask !== exp) begin
      failures++;
      $display("FAIL %s: mask=%b expected=%b", what, mask, exp);
    end
  endtask

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  logic [RW-1:0] r0, r1, r2, r3, r4, r5, r6, r7, r8;
  logic [ROWS-1:0] exp;

  initial begin
    idle();
    mem_unsafe = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    expect_mask('0, "after reset");
    expect_bit(empty, 1'b1, "empty after reset");

    // 1. memory order
    mem_unsafe[0] = 1'b1;                       // slot 0 = row 0 bank 0
    dispatch(2'b11, 2'b01, '0, '0, '0, '0, r0);
    exp = '0; exp[r0] = 1'b1;
    step();
    expect_mask(exp, "load with unresolved memory order");
    expect_bit(slot_unsafe[1], 1'b0, "ALU uop never unsafe");
    mem_unsafe[0] = 1'b0;
    step();
    expect_mask('0, "memory order resolved");

    // 2. branch (tag 0) in row 1, load under it in row 2
    dispatch(2'b01, 2'b01, '0, '0, 12'h001, '0, r1);
    dispatch(2'b11, 2'b10, '0, 12'h001, '0, '0, r2);
    exp = '0; exp[r1] = 1; exp[r2] = 1;
    expect_mask(exp, "branch and load under it");
    repeat (3) step();
    expect_mask(exp, "still unresolved");
    br_resolve_mask = 12'h001;
    @(posedge clk); #1; idle();
    expect_mask('0, "branch resolved, mask cleared next cycle");

    // 3. mispredict: branch tag 1 in row 3, loads in rows 4 and 5
    dispatch(2'b01, 2'b01, '0, '0, 12'h002, '0, r3);
    dispatch(2'b11, 2'b11, 12'h002, 12'h002, '0, '0, r4);
    dispatch(2'b01, 2'b01, 12'h002, '0, '0, '0, r5);
    br_mispredict = 1; br_mispredict_tag = 12'h002; br_row = r3; br_resolve_mask = 12'h002;
    #1;
    expect_bit(kill_vec[r4*2] & kill_vec[r4*2+1] & kill_vec[r5*2], 1'b1, "younger uops killed");
    expect_bit(kill_vec[r3*2], 1'b0, "branch not killed");
    expect_bit(dis_ready, 1'b0, "no dispatch in a mispredict cycle");
    step();
    expect_bit(tail_row == r3 + 1, 1'b1, "tail rolled back");
    expect_bit(slot_valid[r4*2] | slot_valid[r5*2], 1'b0, "killed slots invalid");
    expect_mask('0, "mask clear after mispredict");

    // 4. exceptions: row 6 load (tag 2 older), row 7 load, row 8 load; branch tag 2 at row r6-...
    dispatch(2'b01, 2'b01, '0, '0, 12'h004, '0, r6);      // branch tag 2
    dispatch(2'b01, 2'b01, 12'h004, '0, '0, '0, r7);      // load under it
    dispatch(2'b01, 2'b01, 12'h004, '0, '0, '0, r8);      // load under it
    // exceptions from both sources in the same cycle: EU at r8, LSU at r7
    exu_exc_valid = 1; exu_exc_slot = SW'(r8 * 2);
    lsu_exc_valid = 1; lsu_exc_slot = SW'(r7 * 2);
    step();
    expect_bit(exc_active, 1'b1, "exception recorded");
    br_resolve_mask = 12'h004;   // branch resolves correctly
    step();
    step();
    exp = '0; exp[r7] = 1; exp[r8] = 1;
    expect_mask(exp, "excepting uop and younger stay unsafe, older branch clears");
    flush = 1;
    step();
    expect_mask('0, "flush clears the mask");
    expect_bit(empty, 1'b1, "flush empties the ROB");
    expect_bit(exc_active, 1'b0, "flush ends the exception");

    // 5. commit and full
    for (int i = 0; i < ROWS; i++) begin
      logic [RW-1:0] r;
      dispatch(2'b11, 2'b00, '0, '0, '0, '0, r);
    end
    expect_bit(dis_ready, 1'b0, "ROB full after ROWS rows");
    com_valid = 1;
    #1;
    expect_bit(commit_vec[1:0] == 2'b11 && commit_vec[ENTRIES-1:2] == '0, 1'b1, "commit vector is the head row");
    step();
    expect_bit(head_row == RW'(1), 1'b1, "head advanced");
    expect_bit(dis_ready, 1'b1, "room after commit");
    // random stress of the mem-order path: mask equals OR of mem_unsafe per valid row
    for (int n = 0; n < 200; n++) begin
      logic [ENTRIES-1:0] mu;
      mu = {$urandom, $urandom};
      mem_unsafe = mu;
      step();
      exp = '0;
      for (int i = 0; i < ROWS; i++) exp[i] = 1'b0;
      checks++;
      // all slots were dispatched with unsafe = 0, so nothing may be set
      if (mask !== '0) begin failures++; $display("FAIL safe uops became unsafe"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
