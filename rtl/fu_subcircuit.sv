// fu_subcircuit -- one of the two independent circuits of the functional unit.
//
// The functional unit Y = f(X) is split by output bits: this module computes
// the WIDTH bits Y[LSB +: WIDTH] and nothing else, so that one instance per
// half shares no logic with the other. It is purely combinational: out
// follows x after gate delay, there is no clock or reset.
//
// Inside, each output bit is a sum of products: the OR, over every word Yj
// whose bit is 1, of the cube list that says where the unit produces Yj
// (aed_pkg::FU_CUBES). The word that takes all remaining inputs (Y5) is
// handled as "no other word matches". Which inputs give which word is the
// document's example function; writing it as this two-level sum of products
// is this design's own choice, as the document gives only the function.
//
// Ports
//   x    [M_IN-1:0]   primary inputs x4..x0
//   out  [WIDTH-1:0]  Y[LSB +: WIDTH]; c1 is LSB=2, WIDTH=3; c2 is LSB=0, WIDTH=2
module fu_subcircuit
  import aed_pkg::*;
#(
  parameter int unsigned LSB   = K2,
  parameter int unsigned WIDTH = K1
) (
  input  x_t               x,
  output logic [WIDTH-1:0] out
);

  logic [NWORDS-1:0] hit;   // hit[j]: the unit produces Y(j+1) for this x
  logic              other; // no listed word matches: the default word

  always_comb begin
    for (int unsigned j = 0; j < NWORDS; j++)
      hit[j] = (j == DEFAULT_WORD) ? 1'b0 : sop_eval(FU_CUBES[j], FU_NCUBES[j], x);
    other = ~|hit;
    for (int unsigned b = 0; b < WIDTH; b++) begin
      out[b] = other & WORDS[DEFAULT_WORD][LSB+b];
      for (int unsigned j = 0; j < NWORDS; j++)
        if (j != DEFAULT_WORD && WORDS[j][LSB+b]) out[b] |= hit[j];
    end
  end

endmodule
