// decoder3to8: 3-to-8 line decoder.
//
// Drives exactly one of its eight outputs high: output y[k] is 1 when the input
// code {g2,g1,g0} equals k. In the decoder-based controller the eight outputs
// (named A..H in the document's schematic) are the state lines; only A..F are
// used, G and H (codes 110 and 111) are unused codes. There is no enable input,
// which the document does not mention. Purely combinational.
module decoder3to8 (
  input  logic [2:0] g,  // {G2, G1, G0}
  output logic [7:0] y   // y[0] = A .. y[7] = H
);

  always_comb begin
    y = '0;
    y[g] = 1'b1;
  end

endmodule
