// ctrl_onehot: shared-memory access controller, one flip-flop per state
// ("circuit B").
//
// The same six-state Moore machine as ctrl_decoder (see there for what the
// states mean), synthesised with the one-hot assignment: six D flip-flops, one
// per state, exactly one of them set in every clock cycle. Each flip-flop's
// input is a sum of products read directly off the transitions into its
// state, built as two levels of NAND gates as in the document:
//   D_A = A X'Y' + B X' + C Y'
//   D_B = A X Y' + B X
//   D_C = A X'Y  + C Y  + E X Y
//   D_D = A X Y  + D X  + E X Y'
//   D_E = D X'   + E X'Y' + F Y'
//   D_F = E X'Y  + F Y
// Every path from the flip-flops to an output crosses the same number of
// gates, and the state lines come straight from flip-flops, so the outputs are
// free of decoding glitches.
//
// Interface: clk; init (active-high, asynchronous: presets flip-flop A and
// clears the other five, as the document initialises it); x, y requests.
// Output: the six state lines (Moore outputs and data path controls). Timing:
// x and y are sampled at the rising edge of clk. There is no recovery from an
// illegal (not one-hot) state: like the document's circuit, the machine relies
// on init. The clock edge and the active level of init are choices of this
// design.
module ctrl_onehot
  import fsm_cdp_pkg::*;
(
  input  logic         clk,
  input  logic         init,
  input  logic         x,
  input  logic         y,
  output state_lines_t st
);

  logic [5:0] q;      // {A, B, C, D, E, F}
  logic [5:0] d_in;
  logic       sa, sb, sc, sd, se, sf;

  assign {sa, sb, sc, sd, se, sf} = q;

  // Two-level NAND-NAND excitation logic.
  always_comb begin
    d_in[5] = ~(~(sa & ~x & ~y) & ~(sb & ~x) & ~(sc & ~y));     // D_A
    d_in[4] = ~(~(sa &  x & ~y) & ~(sb &  x));                  // D_B
    d_in[3] = ~(~(sa & ~x &  y) & ~(sc &  y) & ~(se & x & y));  // D_C
    d_in[2] = ~(~(sa &  x &  y) & ~(sd &  x) & ~(se & x & ~y)); // D_D
    d_in[1] = ~(~(sd & ~x) & ~(se & ~x & ~y) & ~(sf & ~y));     // D_E
    d_in[0] = ~(~(se & ~x &  y) & ~(sf &  y));                  // D_F
  end

  // Flip-flop A is preset by init, the others are cleared.
  for (genvar i = 0; i < 6; i++) begin : g_reg
    dff_pc u_ff (
      .clk    (clk),
      .preset ((i == 5) ? init : 1'b0),
      .clear  ((i == 5) ? 1'b0 : init),
      .d      (d_in[i]),
      .q      (q[i])
    );
  end

  assign st = q;

endmodule
