// sop_checker -- sum-of-products checker for the partitioned unit.
//
// Two independent rails, R0 and R1, each built from its own sop_rail
// instance. The six words are split between the rails: R0 carries Y1..Y3 and
// R1 carries Y4..Y6. With a fault-free unit exactly one product of one rail
// fires, so (R0,R1) is 01 or 10. If the unit's output is not one of the six
// words, or is a word that the inputs X rule out (its characteristic
// function is 0), no product fires and (R0,R1) = 00. Because each word's
// minterm fires on one rail only, 11 cannot arise from the unit's faults;
// it can only come from a fault inside the checker. The outputs are thus a
// 1-out-of-2 code: 01/10 valid, 00/11 error.
//
// The two-rail structure and its products are the document's; the word
// split and reading (R0,R1) as a 1-out-of-2 code are this design's own.
//
// Combinational, no clock or reset.
//
// Ports
//   x      [5]  primary inputs
//   c1     [3]  sub-circuit 1 output
//   c2     [2]  sub-circuit 2 output
//   r0, r1      checker outputs
module sop_checker
  import aed_pkg::*;
#(
  parameter char_set_e CHAR_SET = CHAR_MIN_LITERALS
) (
  input  x_t   x,
  input  c1_t  c1,
  input  c2_t  c2,
  output logic r0,
  output logic r1
);

  sop_rail #(.RAIL(1'b0), .CHAR_SET(CHAR_SET)) u_r0 (.x(x), .c1(c1), .c2(c2), .r(r0));
  sop_rail #(.RAIL(1'b1), .CHAR_SET(CHAR_SET)) u_r1 (.x(x), .c1(c1), .c2(c2), .r(r1));

  // Each word's minterm lives on one rail only, so whatever the unit
  // outputs the rails can never both be 1 unless the checker itself is broken.
  always_comb assert #0 (!(r0 && r1))
    else $error("sop_checker: both rails high for c1=%b c2=%b", c1, c2);

endmodule
