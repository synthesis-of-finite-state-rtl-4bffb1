// ctrl_decoder: shared-memory access controller, decoder-based synthesis
// ("circuit A").
//
// A six-state Moore machine arbitrating one memory between two processors.
// X and Y are the access requests of processor 1 and processor 2. When both
// request at once, the processor that holds priority is connected and the
// priority passes to the other one. States: A idle with processor 1 priority,
// B processor 1 served alone, C processor 2 served (priority back to 1),
// D processor 1 served (priority to 2), E idle with processor 2 priority,
// F processor 2 served alone.
//
// Structure, as the document synthesises it: a 3-bit state register of D
// flip-flops (G2 G1 G0, codes A=000 .. F=101), a 3x8 decoder whose outputs are
// the state lines A..F, and excitation logic taken from the state table, whose
// inputs are the decoded state lines and X, Y:
//   D_G2 = (D + E) X' + F
//   D_G1 = (A + C) Y  + (D + E) X
//   D_G0 = (A + B + D) X + E (X xor Y) + F Y
// The unused codes 110 and 111 drive all three excitations to 0, so the machine
// falls back to A on the next edge. The decoder outputs for those codes (G, H)
// are left unconnected, as in the document's schematic; the lint warning about
// them stands for that reason.
//
// Interface: clk; init (active-high, asynchronous: clears the three
// flip-flops, i.e. state A); x, y requests. Outputs: the state lines (also the
// Moore outputs and the data path controls) and the state code. Timing: x and
// y are sampled at the rising edge of clk; the outputs change after that edge.
// Choices of this design: the clock edge, the active level of init, and that
// x and y must be synchronous to clk (the document gives none of these).
module ctrl_decoder
  import fsm_cdp_pkg::*;
(
  input  logic         clk,
  input  logic         init,
  input  logic         x,
  input  logic         y,
  output state_lines_t st,
  output logic [2:0]   code
);

  logic [7:0] dec;
  logic [2:0] d_g;
  logic       sa, sb, sc, sd, se, sf;

  decoder3to8 u_dec (
    .g (code),
    .y (dec)
  );

  assign {sf, se, sd, sc, sb, sa} = dec[5:0];

  // Excitation logic (the document implements it with NAND/NOR gates).
  always_comb begin
    d_g[2] = ((sd | se) & ~x) | sf;
    d_g[1] = ((sa | sc) & y) | ((sd | se) & x);
    d_g[0] = ((sa | sb | sd) & x) | (se & (x ^ y)) | (sf & y);
  end

  // State register: three D flip-flops, preset unused, clear used for init.
  for (genvar i = 0; i < 3; i++) begin : g_reg
    dff_pc u_ff (
      .clk    (clk),
      .preset (1'b0),
      .clear  (init),
      .d      (d_g[i]),
      .q      (code[i])
    );
  end

  assign st = '{a: sa, b: sb, c: sc, d: sd, e: se, f: sf};

endmodule
