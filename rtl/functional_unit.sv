// functional_unit -- the unit under check, built as two independent circuits.
//
// The 5-output function is partitioned by output bits: sub-circuit c1 makes
// (y4,y3,y2) and sub-circuit c2 makes (y1,y0). The two are separate
// instances with no common logic, so a single fault can corrupt only one of
// c1 and c2, in any arbitrary way (not only unidirectionally). The unit's
// output Y is simply (c1, c2) side by side; no check bits are added. This
// partition is the one the document uses for its example; with it c1 alone
// already tells every word apart.
//
// Combinational, no clock or reset.
//
// Ports
//   x   [5]  primary inputs x4..x0
//   c1  [3]  (y4,y3,y2) from sub-circuit 1
//   c2  [2]  (y1,y0) from sub-circuit 2
//   y   [5]  the unit's output word (y4..y0) = {c1, c2}
module functional_unit
  import aed_pkg::*;
(
  input  x_t  x,
  output c1_t c1,
  output c2_t c2,
  output y_t  y
);

  fu_subcircuit #(.LSB(K2), .WIDTH(K1)) u_c1 (.x(x), .out(c1));
  fu_subcircuit #(.LSB(0),  .WIDTH(K2)) u_c2 (.x(x), .out(c2));

  assign y = {c1, c2};

endmodule
