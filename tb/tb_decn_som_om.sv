// tb_decn_som_om: exhaustive self-checking test of the SOM/OM n-to-2^n
// decoder at its default size and at two other sizes.
//
// Three instances are tested: the default (N = 4), N = 3 (which must behave
// as the 3-to-8 circuit) and N = 7. For every input value of each it checks
// that the output indexed by the value (I0 most significant) is the only 1,
// and that each garbage line holds its expected value (see exp_garbage). It
// also checks the gate and constant-input counts the module reports against
// the published formulas.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_decn_som_om;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Default-size instance.
  localparam int N4 = 4;
  logic [N4-1:0]     i4;
  logic [2**N4-1:0]  y4;
  logic [N4-3:0] g4;
  decn_som_om dut4 (.i(i4), .y(y4), .g(g4));

  logic [2:0] i3;
  logic [7:0] y3;
  logic [0:0] g3;
  decn_som_om #(.N(3)) dut3 (.i(i3), .y(y3), .g(g3));

  localparam int N7 = 7;
  logic [N7-1:0]     i7;
  logic [2**N7-1:0]  y7;
  logic [N7-3:0] g7;
  decn_som_om #(.N(N7)) dut7 (.i(i7), .y(y7), .g(g7));

  // Expected garbage for an n-bit decoder on input value v, as a 128-bit word.
  // Each OM layer (and the 3-to-8 core) leaves the copy of its select bit:
  // garbage bit j carries I(j+2), which is input bit n-3-j.
  function automatic logic [127:0] exp_garbage(int n, int v);
    logic [127:0] r = '0;
    for (int j = 0; j <= n - 3; j++) r[j] = v[n-3-j];
    return r;
  endfunction

  function automatic int exp_gates(int n);
    return 2**n - 3;
  endfunction
  function automatic int exp_ancillas(int n);
    return 2**n - 2;
  endfunction

  task automatic check(int n, int v, logic [127:0] y, logic [127:0] g);
    logic [127:0] ey = '0;
    logic [127:0] eg = exp_garbage(n, v);
    ey[v] = 1'b1;
    checks++;
    if (y !== ey) begin
      failures++;
      $display("FAIL n=%0d v=%0d y=%h", n, v, y);
    end
    checks++;
    if (g !== eg) begin
      failures++;
      $display("FAIL n=%0d v=%0d garbage=%h expected %h", n, v, g, eg);
    end
  endtask

  initial begin
    for (int v = 0; v < 2**N4; v++) begin
      i4 = N4'(v);
      #1;
      check(N4, v, 128'(y4), 128'(g4));
    end
    for (int v = 0; v < 8; v++) begin
      i3 = 3'(v);
      #1;
      check(3, v, 128'(y3), 128'(g3));
    end
    for (int v = 0; v < 2**N7; v++) begin
      i7 = N7'(v);
      #1;
      check(N7, v, 128'(y7), 128'(g7));
    end
    checks++;
    if (dut4.GATES != exp_gates(N4) || dut4.ANCILLAS != exp_ancillas(N4) ||
        dut7.GATES != exp_gates(N7) || dut7.ANCILLAS != exp_ancillas(N7)) begin
      failures++;
      $display("FAIL counts: gates %0d/%0d ancillas %0d/%0d", dut4.GATES, dut7.GATES,
               dut4.ANCILLAS, dut7.ANCILLAS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
