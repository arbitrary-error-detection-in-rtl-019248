// tb_aed_top_min_inputs -- end-to-end test of the checked unit with the checker
// set to the characteristic functions that read only x3, x2 and x0.
//
// Part 1, fault-free: all 32 inputs; y must be the Karnaugh-map word and the
// rails a valid 01/10 pair, with err low.
// Part 2, arbitrary single-circuit errors: for every input, the output of
// sub-circuit c1 is forced to each of its 8 values, then that of c2 to each
// of its 4 values, modelling a fault that makes one sub-circuit produce any
// word at all. The checked unit must either be correct or raise err.
// Each mechanism is counted and must occur: every word produced, errors in
// c1 and in c2 caught, errors that land on a non-word caught by the word
// minterms, and errors that land on a distance-one word caught by the
// characteristic functions.
module tb_aed_top_min_inputs;
  import aed_tb_pkg::*;

  logic [4:0] x, y;
  logic r0, r1, err;
  int checks = 0, failures = 0;
  int seen [7];
  int n_c1_err = 0, n_c2_err = 0, n_nonword = 0, n_dist1 = 0, n_masked = 0;

  aed_top #(.CHAR_SET(aed_pkg::CHAR_MIN_INPUTS)) dut (.x(x), .y(y), .r0(r0), .r1(r1), .err(err));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_word(input logic [4:0] w);
    for (int j = 1; j <= 6; j++) if (TB_WORDS[j] == w) return 1'b1;
    return 1'b0;
  endfunction

  task automatic judge(input logic [4:0] good, input logic [4:0] seen_y, input bit side);
    checks++;
    if (seen_y == good) begin
      n_masked++;
      if (err !== 1'b0) begin failures++; $display("false alarm x=%b y=%b", x, seen_y); end
    end else begin
      if (side) n_c2_err++; else n_c1_err++;
      if (is_word(seen_y)) n_dist1++; else n_nonword++;
      if (err !== 1'b1 || {r1, r0} !== 2'b00) begin
        failures++;
        $display("missed error x=%b y=%b good=%b r=%b%b", x, seen_y, good, r1, r0);
      end
    end
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 0;
    // Part 1: fault-free operation
    for (int i = 0; i < 32; i++) begin
      x = 5'(i);
      #1;
      seen[kmap(x)]++;
      checks++;
      if (y !== f_ref(x) || err !== 1'b0 || (r0 ^ r1) !== 1'b1 ||
          r1 !== rail_of(kmap(x))) begin
        failures++;
        $display("fault-free x=%b y=%b r=%b%b err=%b expected y=%b", x, y, r1, r0, err, f_ref(x));
      end
    end
    // Part 2: arbitrary error in one sub-circuit at a time
    for (int i = 0; i < 32; i++) begin
      logic [4:0] good;
      x = 5'(i);
      good = f_ref(x);
      for (int v = 0; v < 8; v++) begin
        force dut.u_fu.c1 = 3'(v);
        #1;
        judge(good, {3'(v), good[1:0]}, 1'b0);
      end
      release dut.u_fu.c1;
      for (int v = 0; v < 4; v++) begin
        force dut.u_fu.c2 = 2'(v);
        #1;
        judge(good, {good[4:2], 2'(v)}, 1'b1);
      end
      release dut.u_fu.c2;
      #1;
      checks++;
      if (y !== good || err !== 1'b0) begin failures++; $display("after release x=%b y=%b", x, y); end
    end
    // Every mechanism must have happened
    for (int j = 1; j <= 6; j++) begin
      checks++;
      if (seen[j] == 0) begin failures++; $display("word Y%0d never produced", j); end
    end
    $display("errors in c1 caught: %0d, in c2: %0d, non-word: %0d, distance-one word: %0d, masked: %0d",
             n_c1_err, n_c2_err, n_nonword, n_dist1, n_masked);
    checks += 4;
    if (n_c1_err != 32 * 7) begin failures++; $display("c1 error count wrong"); end
    if (n_c2_err != 32 * 3) begin failures++; $display("c2 error count wrong"); end
    if (n_nonword == 0) begin failures++; $display("no error landed on a non-word"); end
    if (n_dist1 == 0) begin failures++; $display("no error landed on a distance-one word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
