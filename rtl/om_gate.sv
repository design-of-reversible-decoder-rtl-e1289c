// om_gate: the 3x3 reversible OM gate.
//
// Function: X = A, Y = A.B xor not C, Z = not A . B xor not C.
// With C = 1 the gate routes B to Y when A = 1 and to Z when A = 0, so one
// OM gate splits a decoded line by one more select bit, and X hands the
// select bit on to the next gate. With C = 0 it yields NAND / OR-type
// products instead. The mapping (A,B,C) -> (X,Y,Z) is a bijection.
//
// Interface: three single-bit inputs a, b, c and outputs x, y, z.
// Timing: purely combinational, no clock.
// The equations are those of the gate's definition and truth table; nothing
// here is a design choice.
module om_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic x,
  output logic y,
  output logic z
);
  assign x = a;
  assign y = (a & b) ^ ~c;
  assign z = (~a & b) ^ ~c;
endmodule
