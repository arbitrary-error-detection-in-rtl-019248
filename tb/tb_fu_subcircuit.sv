// tb_fu_subcircuit -- exhaustive test of both sub-circuit configurations.
// Drives all 32 inputs and compares c1 = (y4,y3,y2) and c2 = (y1,y0) with the
// Karnaugh map of the example function.
module tb_fu_subcircuit;
  import aed_tb_pkg::*;

  logic [4:0] x;
  logic [2:0] c1;
  logic [1:0] c2;
  int checks = 0, failures = 0;

  fu_subcircuit #(.LSB(2), .WIDTH(3)) dut_c1 (.x(x), .out(c1));
  fu_subcircuit #(.LSB(0), .WIDTH(2)) dut_c2 (.x(x), .out(c2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      x = 5'(i);
      #1;
      checks += 2;
      if (c1 !== f_ref(x)[4:2]) begin
        failures++;
        $display("x=%b c1=%b expected %b", x, c1, f_ref(x)[4:2]);
      end
      if (c2 !== f_ref(x)[1:0]) begin
        failures++;
        $display("x=%b c2=%b expected %b", x, c2, f_ref(x)[1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
