// tb_dff_pc: self-checking testbench for the D flip-flop with asynchronous
// preset and clear. Drives random data with occasional preset / clear pulses
// between clock edges and compares q with an independent model: q follows d at
// each rising edge, jumps to 1 on preset and to 0 on clear immediately (clear
// winning over preset), and holds otherwise.
module tb_dff_pc;

  logic clk = 1'b0;
  logic preset = 1'b0, clear = 1'b0, d = 1'b0, q;
  logic model;
  int   checks = 0, failures = 0;

  dff_pc dut (.clk(clk), .preset(preset), .clear(clear), .d(d), .q(q));

  task automatic check(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, model);
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
    // start with a clear
    clear = 1'b1; #1; model = 1'b0; check("initial clear"); clear = 1'b0; #1;
    for (int i = 0; i < 400; i++) begin
      int kind;
      kind = $urandom_range(0, 9);
      d = 1'($urandom);
      #2;
      if (kind == 0) begin
        preset = 1'b1; #1; model = 1'b1; check("async preset");
        // the clock edge while preset is held must not load d
        clk = 1'b1; #1; check("preset held over edge"); clk = 1'b0;
        preset = 1'b0; #1; check("preset released");
      end else if (kind == 1) begin
        clear = 1'b1; #1; model = 1'b0; check("async clear");
        clk = 1'b1; #1; check("clear held over edge"); clk = 1'b0;
        clear = 1'b0; #1; check("clear released");
      end else if (kind == 2) begin
        preset = 1'b1; clear = 1'b1; #1; model = 1'b0; check("clear over preset");
        preset = 1'b0; clear = 1'b0; #1;
      end else begin
        clk = 1'b1; #1; model = d; check("clock edge");
        d = ~d; #1; check("hold after edge");
        clk = 1'b0; #1; check("hold on falling edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
