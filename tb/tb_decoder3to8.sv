// tb_decoder3to8: exhaustive self-checking testbench for the 3-to-8 decoder.
// For each of the eight codes the output must be the single bit 1 << code.
module tb_decoder3to8;

  logic [2:0] g;
  logic [7:0] y;
  int checks = 0, failures = 0;

  decoder3to8 dut (.g(g), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      g = 3'(k);
      #1;
      checks++;
      if (y !== (8'd1 << k)) begin
        failures++;
        $display("FAIL code %0d: y=%b", k, y);
      end
      checks++;
      if ($countones(y) != 1) begin
        failures++;
        $display("FAIL code %0d: not one-hot", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
