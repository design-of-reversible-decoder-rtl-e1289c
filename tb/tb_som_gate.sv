// tb_som_gate: exhaustive self-checking test of the SOM gate.
//
// Applies all sixteen (A,B,C,D) patterns and compares (W,X,Y,Z) with the
// gate's published truth table, held here as a constant, then checks that
// the sixteen output patterns are all different (the gate is reversible).
// It also checks the logic modes the gate offers (NOT, AND, XOR, NAND,
// XNOR). A watchdog ends the run with a failure if it does not finish in time.
module tb_som_gate;
  logic a, b, c, d, w, x, y, z;
  int checks = 0, failures = 0;

  // Expected {W,X,Y,Z} for input {A,B,C,D} = 0..15, from the truth table.
  localparam logic [3:0] TABLE [16] = '{
    4'b0001, 4'b1010, 4'b1110, 4'b0101, 4'b0010, 4'b1001, 4'b1101, 4'b0110,
    4'b0100, 4'b1111, 4'b1011, 4'b0000, 4'b1000, 4'b0011, 4'b0111, 4'b1100};

  som_gate dut (.a(a), .b(b), .c(c), .d(d), .w(w), .x(x), .y(y), .z(z));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if ({w, x, y, z} !== TABLE[v]) begin
        failures++;
        $display("FAIL abcd=%04b got wxyz=%04b expected %04b", v[3:0], {w, x, y, z}, TABLE[v]);
      end
      seen[{w, x, y, z}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL output patterns not all distinct: %016b", seen);
    end
    // Logic modes: X = NOT B (A = 1, C = 0); W = AND (C = D = 0);
    // Y = C xor D (A = 1 or B = 0); W = NAND (C = 0, D = 1);
    // Z = C xnor D (A = B = 0).
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if (a && !c && x !== !b) failures++;
      if (!c && !d && w !== (a && b)) failures++;
      if ((a || !b) && y !== (c != d)) failures++;
      if (!c && d && w !== !(a && b)) failures++;
      if (!a && !b && z !== (c == d)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
