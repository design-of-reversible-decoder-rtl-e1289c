// tb_om_gate: exhaustive self-checking test of the OM gate.
//
// Applies all eight (A,B,C) patterns and compares (X,Y,Z) with the gate's
// published truth table, held here as a constant. It also checks that the
// eight output patterns are all different, i.e. that the gate is reversible.
// It also checks the logic modes on Y (NOT, AND, NAND).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_om_gate;
  logic a, b, c, x, y, z;
  int checks = 0, failures = 0;

  // Expected {X,Y,Z} for input {A,B,C} = 0..7, from the truth table.
  localparam logic [2:0] TABLE [8] = '{3'b011, 3'b000, 3'b010, 3'b001,
                                        3'b111, 3'b100, 3'b101, 3'b110};

  om_gate dut (.a(a), .b(b), .c(c), .x(x), .y(y), .z(z));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({x, y, z} !== TABLE[v]) begin
        failures++;
        $display("FAIL abc=%03b got xyz=%03b expected %03b", v[2:0], {x, y, z}, TABLE[v]);
      end
      seen[{x, y, z}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL output patterns not all distinct: %08b", seen);
    end
    // Logic modes: Y = NOT C when A = 0 or B = 0, AND when C = 1, NAND when C = 0.
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ((!a || !b) && y !== !c) failures++;
      if (c && y !== (a && b)) failures++;
      if (!c && y !== !(a && b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
