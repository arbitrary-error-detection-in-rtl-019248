// tb_sop_rail -- exhaustive test of one checker rail of each kind.
// Drives every combination of x (32), c1 (8) and c2 (4) into rail 0 and
// rail 1, for both sets of characteristic functions, and compares each rail
// with the reference sum of products written out in aed_tb_pkg.
module tb_sop_rail;
  import aed_tb_pkg::*;
  import aed_pkg::*;

  logic [4:0] x;
  logic [2:0] c1;
  logic [1:0] c2;
  logic r0l, r1l, r0i, r1i;
  int checks = 0, failures = 0;

  sop_rail #(.RAIL(1'b0), .CHAR_SET(CHAR_MIN_LITERALS)) dut_r0l (.x(x), .c1(c1), .c2(c2), .r(r0l));
  sop_rail #(.RAIL(1'b1), .CHAR_SET(CHAR_MIN_LITERALS)) dut_r1l (.x(x), .c1(c1), .c2(c2), .r(r1l));
  sop_rail #(.RAIL(1'b0), .CHAR_SET(CHAR_MIN_INPUTS))   dut_r0i (.x(x), .c1(c1), .c2(c2), .r(r0i));
  sop_rail #(.RAIL(1'b1), .CHAR_SET(CHAR_MIN_INPUTS))   dut_r1i (.x(x), .c1(c1), .c2(c2), .r(r1i));

  task automatic check(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: x=%b c1=%b c2=%b got %b expected %b", name, x, c1, c2, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int v = 0; v < 32; v++) begin
        x = 5'(i);
        {c1, c2} = 5'(v);
        #1;
        check("R0 min-literals", r0l, r_ref(1'b0, x, {c1, c2}, 1'b0));
        check("R1 min-literals", r1l, r_ref(1'b1, x, {c1, c2}, 1'b0));
        check("R0 min-inputs",   r0i, r_ref(1'b0, x, {c1, c2}, 1'b1));
        check("R1 min-inputs",   r1i, r_ref(1'b1, x, {c1, c2}, 1'b1));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
