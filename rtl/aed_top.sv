// aed_top -- concurrently checked combinational unit without redundant code bits.
//
// The primary inputs x drive both the functional unit (two independent
// sub-circuits c1 and c2) and, directly, the SOP checker. The unit's output
// word y = {c1, c2} leaves uncoded; the checker compares it with the inputs
// and raises its rails to 01 or 10 for a correct word. Any single fault in
// one sub-circuit, whatever error it causes, either leaves y correct or
// makes (r0,r1) = 00. err is 1 when (r0,r1) is not a valid 1-out-of-2 pair;
// the document stops at the rails, so err is a convenience of this design.
//
// Everything is combinational: y, r0, r1 and err follow x after gate delay,
// with no clock, reset or latency.
//
// Ports
//   x      [5]  primary inputs x4..x0
//   y      [5]  the unit's output y4..y0
//   r0, r1      checker rails
//   err         1 = error detected ((r0,r1) is 00 or 11)
module aed_top
  import aed_pkg::*;
#(
  parameter char_set_e CHAR_SET = CHAR_MIN_LITERALS
) (
  input  x_t   x,
  output y_t   y,
  output logic r0,
  output logic r1,
  output logic err
);

  c1_t c1;
  c2_t c2;

  functional_unit u_fu (.x(x), .c1(c1), .c2(c2), .y(y));

  sop_checker #(.CHAR_SET(CHAR_SET)) u_chk (.x(x), .c1(c1), .c2(c2), .r0(r0), .r1(r1));

  assign err = ~(r0 ^ r1);

endmodule
