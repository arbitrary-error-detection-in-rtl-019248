// sop_rail -- one of the two independent circuits of the SOP checker.
//
// Rail RAIL computes
//     R = OR over the words Yj assigned to this rail of  m(c1_j) m(c2_j) gj(X)
// where m(c1_j) m(c2_j) is the minterm that recognises word Yj on the unit's
// outputs and gj(X) is Yj's characteristic function over the primary inputs.
// gj is 1 wherever the fault-free unit produces Yj and 0 wherever it
// produces a word at distance one from Yj (a word equal to Yj in c1 or in
// c2), so a fault that turns one such word into the other leaves every
// product of both rails at 0. Words at distance two from all others (Y5
// here) need no input term at all.
//
// CHAR_SET selects the characteristic functions: CHAR_MIN_LITERALS (the
// fewest literals, the design's main setting) or CHAR_MIN_INPUTS (only x3,
// x2 and x0 reach the checker). The formula, the word minterms and both sets
// of functions are the document's; which words go to which rail
// (aed_pkg::PI1_MASK) is this design's own choice.
//
// Combinational, no clock or reset.
//
// Ports
//   x   [5]  primary inputs, routed straight from the unit's inputs
//   c1  [3]  sub-circuit 1 output (y4,y3,y2)
//   c2  [2]  sub-circuit 2 output (y1,y0)
//   r        this rail's output R_RAIL
module sop_rail
  import aed_pkg::*;
#(
  parameter bit        RAIL     = 1'b0,
  parameter char_set_e CHAR_SET = CHAR_MIN_LITERALS
) (
  input  x_t   x,
  input  c1_t  c1,
  input  c2_t  c2,
  output logic r
);

  logic [NWORDS-1:0] term; // term[j]: product for word Y(j+1)

  always_comb begin
    for (int unsigned j = 0; j < NWORDS; j++) begin
      term[j] = 1'b0;
      if (PI1_MASK[j] == RAIL) begin
        term[j] = (c1 == word_c1(j)) && (c2 == word_c2(j));
        if (CHAR_SET == CHAR_MIN_INPUTS)
          term[j] &= sop_eval(CHAR_MIN_IN[j], MININ_NC[j], x);
        else
          term[j] &= sop_eval(CHAR_MIN_LIT[j], MINLIT_NC[j], x);
      end
    end
    r = |term;
  end

endmodule
