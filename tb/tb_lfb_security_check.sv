// tb_lfb_security_check: self-checking test of the LFB security check.
//
// Drives random ROB unsafe masks and random sets of merged requests and
// compares `pass` and `live` with a reference computed here: the line may
// pass only if some live request sits in a ROB row whose mask bit is 0.
// A few directed cases cover "no request", "only unsafe requests" and
// "one safe request among unsafe ones".
module tb_lfb_security_check;
  localparam int unsigned ROWS = 32;
  localparam int unsigned NREQ = 4;
  localparam int unsigned RW   = $clog2(ROWS);

  logic [ROWS-1:0] mask;
  logic [NREQ-1:0] rv;
  logic [RW-1:0]   row [NREQ];
  logic            pass, live;
  int              checks = 0, failures = 0;
  logic            clk = 1'b0;

  lfb_security_check #(.ROWS(ROWS), .NREQ(NREQ)) dut (
    .rob_unsafe_mask (mask),
    .req_valid       (rv),
    .req_row         (row),
    .pass            (pass),
    .live            (live)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now(input string what);
    logic exp_pass, exp_live;
    exp_pass = 1'b0;
    exp_live = 1'b0;
    for (int k = 0; k < NREQ; k++) begin
      if (rv[k]) exp_live = 1'b1;
      if (rv[k] && mask[row[k]] == 1'b0) exp_pass = 1'b1;
    end
    checks++;
    if (pass !== exp_pass || live !== exp_live) begin
      failures++;
      $display("FAIL %s: mask=%h rv=%b pass=%b/%b live=%b/%b", what, mask, rv, pass, exp_pass, live, exp_live);
    end
  endtask

  initial begin
    // directed: nothing pending
    mask = '1; rv = '0;
    for (int k = 0; k < NREQ; k++) row[k] = RW'(k);
    #1 check_now("empty");
    if (pass !== 1'b0) begin failures++; $display("FAIL empty entry passes"); end
    // directed: one unsafe request blocks
    mask = '0; mask[7] = 1'b1; rv = 4'b0001; row[0] = 5'd7;
    #1 check_now("unsafe");
    if (pass !== 1'b0) begin failures++; $display("FAIL unsafe load passes"); end
    checks++;
    // directed: becomes safe
    mask[7] = 1'b0;
    #1 check_now("safe");
    if (pass !== 1'b1) begin failures++; $display("FAIL safe load blocked"); end
    checks++;
    // directed: one safe among unsafe merged requests
    mask = '1; mask[3] = 1'b0; rv = 4'b1011;
    row[0] = 5'd1; row[1] = 5'd2; row[3] = 5'd3; row[2] = 5'd3;
    #1 check_now("merged");
    // random
    for (int n = 0; n < 5000; n++) begin
      mask = $urandom & $urandom;
      rv   = NREQ'($urandom);
      for (int k = 0; k < NREQ; k++) row[k] = RW'($urandom);
      #1 check_now("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
