// tb_fsm_cdp_top: end-to-end testbench of the shared-memory access control
// unit, at the top's default parameters.
//
// Two processor agents share one memory through each of the two units (unit A
// with the decoder controller, unit B with the one-hot controller); each unit
// drives its own copy of a behavioural memory. Run:
//   1. init, then the document's 14-step request sequence on x, y;
//   2. 6000 cycles of traffic: each processor now and then raises its request,
//      waits to be connected, performs 1..6 random reads and writes over the
//      whole address range, and drops its request with its last access.
// Every cycle the testbench checks: both units' state lines equal the state
// predicted by the transition table (fsm_ref_pkg), at most one processor is
// connected, the memory port carries the connected processor's bus, and every
// read returns the last value written to that address by either processor (a
// reference copy of the memory). It also counts the mechanisms of the design
// and fails if one never occurred: contention resolved for processor 1 and for
// processor 2 (priority passing each way), uncontended grants in both priority
// modes, each state, each of the 16 transition-table rows, reads and writes by
// each processor. One clock period is 10 time units.
module tb_fsm_cdp_top;
  import fsm_cdp_pkg::*;
  import fsm_ref_pkg::*;

  localparam int unsigned AW = 8;   // top defaults
  localparam int unsigned DW = 8;
  localparam int TRAFFIC_CYCLES = 6000;

  logic clk = 1'b0, init = 1'b0, x = 1'b0, y = 1'b0;
  logic [AW-1:0] p1_addr = '0, p2_addr = '0;
  logic [DW-1:0] p1_wdata = '0, p2_wdata = '0;
  logic          p1_we = 1'b0, p2_we = 1'b0;

  state_lines_t  a_st, b_st;
  logic [2:0]    a_code;
  logic          a_gnt1, a_gnt2, b_gnt1, b_gnt2;
  logic [DW-1:0] a_p1_rdata, a_p2_rdata, b_p1_rdata, b_p2_rdata;
  logic          a_mem_en, a_mem_we, b_mem_en, b_mem_we;
  logic [AW-1:0] a_mem_addr, b_mem_addr;
  logic [DW-1:0] a_mem_wdata, b_mem_wdata, a_mem_rdata, b_mem_rdata;

  fsm_cdp_top dut (.*);

  shared_mem_model #(.ADDR_W(AW), .DATA_W(DW)) u_mem_a (
    .clk(clk), .en(a_mem_en), .we(a_mem_we), .addr(a_mem_addr),
    .wdata(a_mem_wdata), .rdata(a_mem_rdata));
  shared_mem_model #(.ADDR_W(AW), .DATA_W(DW)) u_mem_b (
    .clk(clk), .en(b_mem_en), .we(b_mem_we), .addr(b_mem_addr),
    .wdata(b_mem_wdata), .rdata(b_mem_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cur = 0, cyc = 0;
  logic [DW-1:0] ref_mem [2**AW];

  // mechanism counters
  int row_hits [NROWS];
  int state_hits [6];
  int n_cont_p1 = 0, n_cont_p2 = 0;   // contention won by P1 (A->D) / P2 (E->C)
  int n_solo_p1_a = 0, n_solo_p2_a = 0, n_solo_p1_e = 0, n_solo_p2_e = 0;
  int n_wr1 = 0, n_rd1 = 0, n_wr2 = 0, n_rd2 = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 30) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  initial begin : watchdog
    repeat (TRAFFIC_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checks made in the middle of a clock period, when all inputs are stable.
  task automatic check_cycle();
    logic g1, g2;
    checks++;
    if (a_st !== ref_lines(cur)) fail($sformatf("unit A state %b, expected %0d", a_st, cur));
    checks++;
    if (b_st !== ref_lines(cur)) fail($sformatf("unit B state %b, expected %0d", b_st, cur));
    checks++;
    if (a_code !== 3'(cur)) fail($sformatf("unit A code %b, expected %0d", a_code, cur));
    g1 = (cur == 1 || cur == 3);
    g2 = (cur == 2 || cur == 5);
    checks++;
    if ({a_gnt1, a_gnt2, b_gnt1, b_gnt2} !== {g1, g2, g1, g2})
      fail($sformatf("grants A %b%b B %b%b", a_gnt1, a_gnt2, b_gnt1, b_gnt2));
    checks++;
    if (a_mem_en !== (g1 | g2) || b_mem_en !== (g1 | g2)) fail("memory enable");
    if (g1) begin
      checks++;
      if (a_mem_addr !== p1_addr || b_mem_addr !== p1_addr ||
          a_mem_we !== p1_we || b_mem_we !== p1_we) fail("P1 bus not routed");
      if (!p1_we) begin
        checks++;
        if (a_p1_rdata !== ref_mem[p1_addr] || b_p1_rdata !== ref_mem[p1_addr])
          fail($sformatf("P1 read %0h: A %0h B %0h expected %0h", p1_addr,
                         a_p1_rdata, b_p1_rdata, ref_mem[p1_addr]));
      end
    end
    if (g2) begin
      checks++;
      if (a_mem_addr !== p2_addr || b_mem_addr !== p2_addr ||
          a_mem_we !== p2_we || b_mem_we !== p2_we) fail("P2 bus not routed");
      if (!p2_we) begin
        checks++;
        if (a_p2_rdata !== ref_mem[p2_addr] || b_p2_rdata !== ref_mem[p2_addr])
          fail($sformatf("P2 read %0h: A %0h B %0h expected %0h", p2_addr,
                         a_p2_rdata, b_p2_rdata, ref_mem[p2_addr]));
      end
    end
  endtask

  // Advance one clock edge: update the reference state and memory.
  task automatic clock_edge();
    int r, nxt;
    r = ref_row(cur, x, y);
    if (r >= 0) row_hits[r]++;
    nxt = ref_next(cur, x, y);
    if (cur == 0 && nxt == 3) n_cont_p1++;
    if (cur == 4 && nxt == 2) n_cont_p2++;
    if (cur == 0 && nxt == 1) n_solo_p1_a++;
    if (cur == 0 && nxt == 2) n_solo_p2_a++;
    if (cur == 4 && nxt == 3) n_solo_p1_e++;
    if (cur == 4 && nxt == 5) n_solo_p2_e++;
    if ((cur == 1 || cur == 3) && p1_we) ref_mem[p1_addr] = p1_wdata;
    if ((cur == 2 || cur == 5) && p2_we) ref_mem[p2_addr] = p2_wdata;
    if (cur == 1 || cur == 3) begin if (p1_we) n_wr1++; else n_rd1++; end
    if (cur == 2 || cur == 5) begin if (p2_we) n_wr2++; else n_rd2++; end
    @(posedge clk);
    cur = nxt;
    cyc++;
    state_hits[cur]++;
    @(negedge clk);
  endtask

  // Processor agent state
  int left1 = 0, left2 = 0;

  task automatic drive_processors();
    // processor 1
    if (!x && $urandom_range(0, 5) == 0) begin
      x = 1'b1; left1 = $urandom_range(1, 6);
    end
    if (x && (cur == 1 || cur == 3)) begin
      p1_we = 1'($urandom); p1_addr = AW'($urandom); p1_wdata = DW'($urandom);
      left1--;
      if (left1 == 0) x = 1'b0;
    end else begin
      p1_we = 1'($urandom); p1_addr = AW'($urandom); p1_wdata = DW'($urandom);
    end
    // processor 2
    if (!y && $urandom_range(0, 5) == 0) begin
      y = 1'b1; left2 = $urandom_range(1, 6);
    end
    if (y && (cur == 2 || cur == 5)) begin
      p2_we = 1'($urandom); p2_addr = AW'($urandom); p2_wdata = DW'($urandom);
      left2--;
      if (left2 == 0) y = 1'b0;
    end else begin
      p2_we = 1'($urandom); p2_addr = AW'($urandom); p2_wdata = DW'($urandom);
    end
  endtask

  task automatic need(int n, string what);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) fail({what, " never happened"});
  endtask

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = '0;
    foreach (row_hits[i]) row_hits[i] = 0;
    foreach (state_hits[i]) state_hits[i] = 0;
    @(negedge clk);
    init = 1'b1;
    #2;
    cur = 0;
    check_cycle();
    init = 1'b0;
    @(negedge clk);

    // 1. the document's request sequence
    for (int i = 0; i < 14; i++) begin
      x = SEQ_X[i];
      y = SEQ_Y[i];
      #1;
      check_cycle();
      clock_edge();
    end
    x = 1'b0; y = 1'b0;
    #1; check_cycle(); clock_edge();
    #1; check_cycle(); clock_edge();

    // 2. processor traffic
    for (int i = 0; i < TRAFFIC_CYCLES; i++) begin
      drive_processors();
      #1;
      check_cycle();
      clock_edge();
    end
    #1; check_cycle();

    $display("mechanism counts:");
    need(n_cont_p1,   "contention won by P1, priority to P2");
    need(n_cont_p2,   "contention won by P2, priority to P1");
    need(n_solo_p1_a, "P1 alone, P1 priority");
    need(n_solo_p2_a, "P2 alone, P1 priority");
    need(n_solo_p1_e, "P1 alone, P2 priority");
    need(n_solo_p2_e, "P2 alone, P2 priority");
    need(n_wr1, "P1 writes");
    need(n_rd1, "P1 reads");
    need(n_wr2, "P2 writes");
    need(n_rd2, "P2 reads");
    foreach (state_hits[s]) need(state_hits[s], $sformatf("cycles in state %c", 8'("A") + 8'(s)));
    foreach (row_hits[r]) need(row_hits[r], $sformatf("transition-table row %0d", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
