// tb_mshr_lfb: self-checking test of the MSHRs, the line fill buffer and
// the SpecLFB security check.
//
// Directed scenarios with a hand-driven lower level:
//   1. a miss from an unsafe ROB row: the line request goes out, the line
//      comes back and is held (no refill) for as long as the row's mask bit
//      is 1; after the bit drops the line is refilled within 2 cycles and the
//      load gets its word back;
//   2. a second miss to the same line is merged (no second bus request) and
//      both loads are replayed;
//   3. all loads of a line are squashed while the line is held: the line is
//      dropped and never refilled; a squash while waiting drops the line
//      when it arrives;
//   4. both entries busy: a miss to a third line is refused;
//   5. a committed store to a held line updates the copy that is refilled.
module tb_mshr_lfb;
  import speclfb_pkg::*;
  localparam int unsigned NM = 2, NREQ = 4, ROWS = 32, BANKS = 2;
  localparam int unsigned ENTRIES = 64, SW = 6, LAW = 26, OW = 3, LINEW = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0]    rob_unsafe_mask;
  logic [ENTRIES-1:0] kill_vec;
  logic miss_valid, miss_ready, line_outstanding;
  logic [LAW-1:0] miss_line, st_line, breq_line, refill_line;
  logic [SW-1:0]  miss_slot, rp_slot;
  logic [OW-1:0]  miss_word, st_word;
  logic st_valid; logic [63:0] st_data, rp_data; logic [7:0] st_be;
  logic breq_valid, breq_ready, bresp_valid, refill_valid, refill_ready, rp_valid, rp_ready, drop_pulse;
  logic [0:0] breq_id, bresp_id;
  logic [LINEW-1:0] bresp_data, refill_data;
  logic [NM-1:0] held_blocked, busy;
  int checks = 0, failures = 0;
  int n_breq = 0, n_refill = 0, n_drop = 0;

  mshr_lfb #(.NM(NM), .NREQ(NREQ), .ROWS(ROWS), .BANKS(BANKS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  always @(posedge clk) if (rst_n) begin
    if (breq_valid && breq_ready) n_breq++;
    if (refill_valid && refill_ready) n_refill++;
    if (drop_pulse) n_drop++;
  end

  function automatic logic [LINEW-1:0] line_data(input logic [LAW-1:0] l);
    logic [LINEW-1:0] d;
    for (int w = 0; w < 8; w++) d[w*64 +: 64] = {32'(l), 32'(w)};
    return d;
  endfunction

  task automatic idle();
    kill_vec = '0; miss_valid = 0; miss_line = '0; miss_slot = '0; miss_word = '0;
    st_valid = 0; st_line = '0; st_word = '0; st_data = '0; st_be = '0;
    bresp_valid = 0; bresp_id = '0; bresp_data = '0;
  endtask
  task automatic step();
    @(posedge clk); #1; idle(); #1;
  endtask
  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic miss(input logic [LAW-1:0] l, input logic [SW-1:0] s, input logic [OW-1:0] w);
    miss_valid = 1; miss_line = l; miss_slot = s; miss_word = w;
    #1 expect_true(miss_ready, "miss accepted");
    step();
  endtask

  // wait for the bus request of line l, return its id
  task automatic take_req(input logic [LAW-1:0] l, output logic [0:0] id);
    int t = 0;
    while (!breq_valid && t < 20) begin step(); t++; end
    expect_true(breq_valid && breq_line == l, "line request issued");
    id = breq_id;
    breq_ready = 1;
    step();
    breq_ready = 0;
  endtask

  task automatic respond(input logic [0:0] id, input logic [LAW-1:0] l);
    bresp_valid = 1; bresp_id = id; bresp_data = line_data(l);
    step();
  endtask

  logic [0:0] id0, id1;
  int t;

  initial begin
    idle();
    rob_unsafe_mask = '0;
    breq_ready = 0; refill_ready = 1; rp_ready = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. unsafe miss held until safe
    rob_unsafe_mask[5] = 1'b1;               // slot 10 is row 5
    miss(26'h123, 6'd10, 3'd2);
    take_req(26'h123, id0);
    expect_true(n_breq == 1, "one bus request");
    respond(id0, 26'h123);
    repeat (10) begin
      expect_true(!refill_valid && held_blocked != '0, "line held while unsafe");
      step();
    end
    rob_unsafe_mask[5] = 1'b0;
    t = 0;
    while (!refill_valid && t < 10) begin step(); t++; end
    expect_true(t <= 2, "refill within 2 cycles of the mask bit dropping");
    expect_true(refill_line == 26'h123 && refill_data == line_data(26'h123), "refill data");
    step();
    t = 0;
    while (!rp_valid && t < 10) begin step(); t++; end
    expect_true(rp_valid && rp_slot == 6'd10 && rp_data == {32'h123, 32'd2}, "replayed word");
    step();
    expect_true(busy == '0, "entry free after replay");

    // 2. merge
    rob_unsafe_mask[7] = 1'b1; rob_unsafe_mask[8] = 1'b1;
    miss(26'h200, 6'd14, 3'd1);
    miss(26'h200, 6'd17, 3'd6);
    take_req(26'h200, id0);
    repeat (3) step();
    expect_true(n_breq == 2, "merged miss sends no second request");
    respond(id0, 26'h200);
    repeat (3) step();
    expect_true(!refill_valid, "held while both unsafe");
    rob_unsafe_mask[8] = 1'b0;                // the younger load is safe: line may go in
    t = 0;
    while (!refill_valid && t < 10) begin step(); t++; end
    expect_true(refill_valid && refill_line == 26'h200, "merged line refilled");
    step();
    begin
      logic seen14, seen17;
      seen14 = 0; seen17 = 0;
      for (int k = 0; k < 6; k++) begin
        if (rp_valid && rp_slot == 6'd14 && rp_data == {32'h200, 32'd1}) seen14 = 1;
        if (rp_valid && rp_slot == 6'd17 && rp_data == {32'h200, 32'd6}) seen17 = 1;
        step();
      end
      expect_true(seen14 && seen17, "both merged loads replayed");
    end
    rob_unsafe_mask = '0;

    // 3a. squash while held
    rob_unsafe_mask[3] = 1'b1;
    miss(26'h300, 6'd6, 3'd0);
    take_req(26'h300, id0);
    respond(id0, 26'h300);
    repeat (2) step();
    kill_vec[6] = 1'b1;
    step();
    step();
    expect_true(n_drop == 1, "squashed line dropped");
    repeat (3) step();
    expect_true(n_refill == 2 && busy == '0, "dropped line never refilled");
    // 3b. squash while waiting
    miss(26'h310, 6'd6, 3'd0);
    take_req(26'h310, id0);
    kill_vec[6] = 1'b1;
    step();
    respond(id0, 26'h310);
    repeat (3) step();
    expect_true(n_drop == 2 && n_refill == 2 && busy == '0, "line arriving after squash dropped");
    rob_unsafe_mask = '0;

    // 4. both entries busy
    rob_unsafe_mask[1] = 1'b1; rob_unsafe_mask[2] = 1'b1;
    miss(26'h400, 6'd2, 3'd0);
    miss(26'h500, 6'd4, 3'd0);
    miss_valid = 1; miss_line = 26'h600; miss_slot = 6'd5;
    #1 expect_true(!miss_ready, "third line refused with both MSHRs busy");
    idle();
    // 5. store into a held line, then release
    take_req(26'h400, id0);
    take_req(26'h500, id1);
    respond(id0, 26'h400);
    respond(id1, 26'h500);
    st_valid = 1; st_line = 26'h400; st_word = 3'd0; st_data = 64'hdead_beef_0000_0000; st_be = 8'hf0;
    step();
    rob_unsafe_mask = '0;
    t = 0;
    while (!(refill_valid && refill_line == 26'h400) && t < 10) begin step(); t++; end
    expect_true(refill_data[63:0] == {32'hdeadbeef, 32'd0}, "store merged into held line");
    repeat (10) step();
    expect_true(busy == '0 && n_refill == 4, "both lines refilled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
