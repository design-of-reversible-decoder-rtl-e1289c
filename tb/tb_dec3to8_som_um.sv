// tb_dec3to8_som_um: exhaustive self-checking test of the SOM/UM 3-to-8
// decoder.
//
// For each of the eight inputs it checks the one-hot output (index = input
// value, I0 most significant) and the three garbage lines: both UM X outputs
// are 0 and the last line carries I2 out of the lower UM gate.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_dec3to8_som_um;
  logic [2:0] i;
  logic [7:0] y;
  logic [2:0] g;
  int checks = 0, failures = 0;

  dec3to8_som_um dut (.i(i), .y(y), .g(g));

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
      if (g !== {2'b00, i[0]}) begin
        failures++;
        $display("FAIL i=%03b garbage=%03b", i, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
