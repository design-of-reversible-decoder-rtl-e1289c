// tb_dec2to4_um: exhaustive self-checking test of the UM-gate 2-to-4
// decoder.
//
// For each input it checks the one-hot output (index = input value, I0 most
// significant) and the two garbage lines: U is a copy of I0 and X is 0.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_dec2to4_um;
  logic [1:0] i;
  logic [3:0] y;
  logic [1:0] g;
  int checks = 0, failures = 0;

  dec2to4_um dut (.i(i), .y(y), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      i = 2'(v);
      #1;
      checks++;
      if (y !== 4'(1 << v)) begin
        failures++;
        $display("FAIL i=%02b y=%04b", i, y);
      end
      checks++;
      if (g !== {i[1], 1'b0}) begin
        failures++;
        $display("FAIL i=%02b garbage=%02b", i, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
