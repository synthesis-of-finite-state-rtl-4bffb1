// tb_ctrl_onehot: self-checking testbench for circuit B (one-hot controller).
//
// After an init pulse the machine must be in A. The document's 14-step request
// sequence is applied first, then 4000 cycles of random requests (biased so
// that requests are held for several cycles). Requests change at the falling
// clock edge; after each rising edge the state lines are compared with an
// independent transcription of the state table (fsm_ref_pkg). Each of the 16
// table rows must be exercised at least once. One clock period is 10 time
// units.
module tb_ctrl_onehot;
  import fsm_cdp_pkg::*;
  import fsm_ref_pkg::*;

  logic         clk = 1'b0;
  logic         init = 1'b0;
  logic         x = 1'b0, y = 1'b0;
  state_lines_t st;

  int checks = 0, failures = 0;
  int cur = 0, cyc = 0;
  int row_hits [NROWS];

  ctrl_onehot dut (
    .clk  (clk),
    .init (init),
    .x    (x),
    .y    (y),
    .st   (st)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (st !== ref_lines(cur)) begin
      failures++;
      $display("FAIL %s cycle %0d: st=%b expected state %0d", what, cyc, st, cur);
    end
  endtask

  // Apply one request pair for one clock period and check the state after it.
  task automatic step(bit nx, bit ny, string what);
    int r;
    x = nx;
    y = ny;
    r = ref_row(cur, nx, ny);
    if (r >= 0) row_hits[r]++;
    @(posedge clk);
    #1;
    cur = ref_next(cur, nx, ny);
    cyc++;
    compare(what);
    @(negedge clk);
  endtask

  initial begin
    bit hx, hy;
    foreach (row_hits[i]) row_hits[i] = 0;
    @(negedge clk);
    init = 1'b1;
    #2;
    cur = 0;
    compare("init");
    init = 1'b0;
    @(negedge clk);
    // The document's test sequence.
    for (int i = 0; i < 14; i++) step(SEQ_X[i], SEQ_Y[i], "sequence");
    // Random requests, each held for a while.
    hx = 1'b0; hy = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 3) == 0) hx = ~hx;
      if ($urandom_range(0, 3) == 0) hy = ~hy;
      step(hx, hy, "random");
    end
    for (int r = 0; r < NROWS; r++) begin
      checks++;
      if (row_hits[r] == 0) begin
        failures++;
        $display("FAIL: state table row %0d never exercised", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
