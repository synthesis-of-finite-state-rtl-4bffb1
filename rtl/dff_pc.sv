// dff_pc: edge-triggered D flip-flop with asynchronous preset and clear.
//
// This is the memory element of both controllers. The document draws it at
// transistor level as a master-slave flip-flop with a complementary clock
// (CK / CKN) and PRESET and CLEAR inputs, and uses PRESET and CLEAR only to put
// the machine in its initial state before operation. Here it is a single
// always_ff: q takes d at the rising edge of clk; preset forces q to 1 and
// clear forces q to 0 at once, whatever the clock does.
//
// Choices of this design, not of the document: the active clock edge is the
// rising one, preset and clear are active high (the document's stimulus pulses
// go from 0 V to 3.3 V), and clear wins when both are asserted.
//
// Ports: clk, preset, clear, d in; q out. Timing: one flip-flop, no latency
// beyond the clock edge.
module dff_pc (
  input  logic clk,
  input  logic preset,
  input  logic clear,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or posedge preset or posedge clear) begin
    if (clear)       q <= 1'b0;
    else if (preset) q <= 1'b1;
    else             q <= d;
  end

endmodule
