// tb_um_gate: exhaustive self-checking test of the UM gate.
//
// Applies all 64 input patterns. The expected outputs are worked out
// case by case (a product of two bits XORed with an inverted constant is
// the constant itself when the product is 1 and its inverse otherwise), not
// with the gate's own expressions. It also checks that the 64 output
// patterns are all different, i.e. that the gate is reversible.
// It also checks the logic modes on V (NOT, AND, NAND) and the bit copy
// on X. A watchdog ends the run with a failure if it does not finish in time.
module tb_um_gate;
  logic a, b, c, d, e, f, u, v, w, x, y, z;
  int checks = 0, failures = 0;

  um_gate dut (.a(a), .b(b), .c(c), .d(d), .e(e), .f(f),
               .u(u), .v(v), .w(w), .x(x), .y(y), .z(z));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] seen;
    logic [5:0] exp_o;
    seen = '0;
    for (int n = 0; n < 64; n++) begin
      {a, b, c, d, e, f} = 6'(n);
      #1;
      exp_o[5] = a;
      exp_o[4] = (a && b)  ? c : !c;
      exp_o[3] = (!a && b) ? c : !c;
      exp_o[2] = (a != d);
      exp_o[1] = (d && e)  ? f : !f;
      exp_o[0] = (!d && e) ? f : !f;
      checks++;
      if ({u, v, w, x, y, z} !== exp_o) begin
        failures++;
        $display("FAIL abcdef=%06b got uvwxyz=%06b expected %06b", n[5:0],
                 {u, v, w, x, y, z}, exp_o);
      end
      seen[{u, v, w, x, y, z}] = 1'b1;
    end
    checks++;
    if (seen !== '1) begin
      failures++;
      $display("FAIL output patterns not all distinct");
    end
    // Logic modes: V = NOT C (A = 0 or B = 0), AND (C = 1), NAND (C = 0);
    // X copies A when D = 0 and copies D when A = 0.
    for (int n = 0; n < 64; n++) begin
      {a, b, c, d, e, f} = 6'(n);
      #1;
      checks++;
      if ((!a || !b) && v !== !c) failures++;
      if (c && v !== (a && b)) failures++;
      if (!c && v !== !(a && b)) failures++;
      if (!d && x !== a) failures++;
      if (!a && x !== d) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
