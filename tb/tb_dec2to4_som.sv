// tb_dec2to4_som: exhaustive self-checking test of the single-SOM-gate
// 2-to-4 decoder.
//
// For each of the four inputs it checks that exactly the output indexed by
// the input value (I0 most significant) is 1.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_dec2to4_som;
  logic [1:0] i;
  logic [3:0] y;
  int checks = 0, failures = 0;

  dec2to4_som dut (.i(i), .y(y));

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
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
