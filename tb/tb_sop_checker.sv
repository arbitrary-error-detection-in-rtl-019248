// tb_sop_checker -- exhaustive test of the two-rail SOP checker.
// For every x and every possible unit output (c1,c2) it checks both rails
// against the reference model, for both sets of characteristic functions.
// It also checks the checker's purpose directly: for the correct word the
// rails are 01 or 10; for any other value of c1 with c2 correct, or of c2
// with c1 correct (an arbitrary error in one sub-circuit), they are 00.
module tb_sop_checker;
  import aed_tb_pkg::*;
  import aed_pkg::*;

  logic [4:0] x;
  logic [2:0] c1;
  logic [1:0] c2;
  logic r0l, r1l, r0i, r1i;
  int checks = 0, failures = 0;
  int n_valid = 0, n_detect = 0;

  sop_checker #(.CHAR_SET(CHAR_MIN_LITERALS)) dut_l (.x(x), .c1(c1), .c2(c2), .r0(r0l), .r1(r1l));
  sop_checker #(.CHAR_SET(CHAR_MIN_INPUTS))   dut_i (.x(x), .c1(c1), .c2(c2), .r0(r0i), .r1(r1i));

  task automatic check(input string name, input logic [1:0] got, input logic [1:0] exp);
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
        logic [4:0] good;
        bit one_side;
        x = 5'(i);
        {c1, c2} = 5'(v);
        #1;
        check("min-literals", {r1l, r0l},
              {r_ref(1'b1, x, {c1, c2}, 1'b0), r_ref(1'b0, x, {c1, c2}, 1'b0)});
        check("min-inputs", {r1i, r0i},
              {r_ref(1'b1, x, {c1, c2}, 1'b1), r_ref(1'b0, x, {c1, c2}, 1'b1)});
        good = f_ref(x);
        one_side = (c1 == good[4:2]) || (c2 == good[1:0]);
        if ({c1, c2} == good) begin
          n_valid++;
          checks += 2;
          if ((r0l ^ r1l) !== 1'b1) begin failures++; $display("valid word flagged (min-literals) x=%b", x); end
          if ((r0i ^ r1i) !== 1'b1) begin failures++; $display("valid word flagged (min-inputs) x=%b", x); end
          check("rail of word", {r1l, r0l}, rail_of(kmap(x)) ? 2'b10 : 2'b01);
        end else if (one_side) begin
          n_detect++;
          check("single-circuit error, min-literals", {r1l, r0l}, 2'b00);
          check("single-circuit error, min-inputs",   {r1i, r0i}, 2'b00);
        end
      end
    checks++;
    if (n_valid != 32 || n_detect != 32 * 10) begin
      failures++;
      $display("case counts wrong: valid=%0d detect=%0d", n_valid, n_detect);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
