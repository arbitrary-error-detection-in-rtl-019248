// tb_functional_unit -- exhaustive test of the partitioned functional unit.
// For all 32 inputs, y must equal the Karnaugh-map word and c1/c2 its halves.
// Also counts how often each of the six words appears (every word must).
module tb_functional_unit;
  import aed_tb_pkg::*;

  logic [4:0] x, y;
  logic [2:0] c1;
  logic [1:0] c2;
  int checks = 0, failures = 0;
  int seen [7];

  functional_unit dut (.x(x), .c1(c1), .c2(c2), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 32; i++) begin
      x = 5'(i);
      #1;
      seen[kmap(x)]++;
      checks++;
      if (y !== f_ref(x) || {c1, c2} !== y) begin
        failures++;
        $display("x=%b y=%b c1=%b c2=%b expected %b", x, y, c1, c2, f_ref(x));
      end
    end
    // Number of inputs giving each word, counted from the map by hand.
    begin
      int expect_n [7] = '{0, 4, 4, 2, 1, 16, 5};
      for (int j = 1; j <= 6; j++) begin
        checks++;
        if (seen[j] != expect_n[j]) begin
          failures++;
          $display("word Y%0d produced %0d times, expected %0d", j, seen[j], expect_n[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
