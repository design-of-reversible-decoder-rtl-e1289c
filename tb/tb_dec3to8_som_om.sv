// tb_dec3to8_som_om: exhaustive self-checking test of the SOM/OM 3-to-8
// decoder.
//
// For each of the eight inputs it checks the one-hot output (index = input
// value, I0 most significant) and the single garbage line, which carries I2
// out of the end of the OM chain.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_dec3to8_som_om;
  logic [2:0] i;
  logic [7:0] y;
  logic       g;
  int checks = 0, failures = 0;

  dec3to8_som_om dut (.i(i), .y(y), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      i = 3'(v);
      #1;
      checks++;
      if (y !== 8'(1 << v)) begin
        failures++;
        $display("FAIL i=%03b y=%08b", i, y);
      end
      checks++;
      if (g !== i[0]) begin
        failures++;
        $display("FAIL i=%03b garbage=%0b", i, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
