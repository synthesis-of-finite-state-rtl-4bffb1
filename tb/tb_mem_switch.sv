// tb_mem_switch: self-checking testbench for the data-path bus switch.
// Applies every legal controller state (and the all-zero pattern) with random
// processor buses and memory read data, and checks that the memory port carries
// processor 1's bus in states B and D, processor 2's in C and F, and nothing
// (port disabled, zeros) in A and E; that read data reaches only the connected
// processor; and that the grants match.
module tb_mem_switch;
  import fsm_cdp_pkg::*;

  localparam int unsigned AW = 8;
  localparam int unsigned DW = 8;

  state_lines_t    st;
  logic [AW-1:0]   p1_addr, p2_addr, mem_addr;
  logic [DW-1:0]   p1_wdata, p2_wdata, p1_rdata, p2_rdata, mem_wdata, mem_rdata;
  logic            p1_we, p2_we, gnt1, gnt2, mem_en, mem_we;
  int checks = 0, failures = 0;

  mem_switch #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  task automatic expect_eq(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0h want %0h (st=%b)", what, got, want, st);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 700; i++) begin
      int s;
      bit w1, w2;
      s = i % 7;  // 0..5 = A..F, 6 = no state line
      st        = (s < 6) ? state_lines_t'(6'b100000 >> s) : state_lines_t'(6'b0);
      p1_addr   = AW'($urandom); p2_addr  = AW'($urandom);
      p1_wdata  = DW'($urandom); p2_wdata = DW'($urandom);
      p1_we     = 1'($urandom);  p2_we    = 1'($urandom);
      mem_rdata = DW'($urandom);
      #1;
      w1 = (s == 1 || s == 3);
      w2 = (s == 2 || s == 5);
      expect_eq(32'(gnt1), 32'(w1), "gnt1");
      expect_eq(32'(gnt2), 32'(w2), "gnt2");
      expect_eq(32'(mem_en), 32'(w1 | w2), "mem_en");
      expect_eq(32'(mem_we), w1 ? 32'(p1_we) : w2 ? 32'(p2_we) : 32'd0, "mem_we");
      expect_eq(32'(mem_addr), w1 ? 32'(p1_addr) : w2 ? 32'(p2_addr) : 32'd0, "mem_addr");
      expect_eq(32'(mem_wdata), w1 ? 32'(p1_wdata) : w2 ? 32'(p2_wdata) : 32'd0, "mem_wdata");
      expect_eq(32'(p1_rdata), w1 ? 32'(mem_rdata) : 32'd0, "p1_rdata");
      expect_eq(32'(p2_rdata), w2 ? 32'(mem_rdata) : 32'd0, "p2_rdata");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
