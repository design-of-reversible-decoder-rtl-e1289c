// tb_feynman_gate: exhaustive self-checking test of the Feynman gate.
//
// Applies the four (A,B) patterns and checks P = A and Q = A xor B, and that
// the four output patterns are all different.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  // Expected {P,Q} for {A,B} = 0..3.
  localparam logic [1:0] TABLE [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] seen;
    seen = '0;
    for (int n = 0; n < 4; n++) begin
      {a, b} = 2'(n);
      #1;
      checks++;
      if ({p, q} !== TABLE[n]) begin
        failures++;
        $display("FAIL ab=%02b got pq=%02b expected %02b", n[1:0], {p, q}, TABLE[n]);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL output patterns not all distinct");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
