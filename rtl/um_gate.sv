// um_gate: the 6x6 reversible UM gate.
//
// Function: U = A, V = A.B xor C', W = A'.B xor C', X = A xor D,
//           Y = D.E xor F', Z = D'.E xor F'.
// The gate is two OM-like halves: (A,B,C) -> (U,V,W) splits line B by A, and
// (D,E,F) -> (Y,Z) splits line E by D. X = A xor D keeps the mapping
// reversible; when D carries a copy of A, X is 0, and when D = 0 it copies A.
// With C = F = 1 and D = A one UM gate splits two decoded lines by one select
// bit.
//
// Interface: single-bit inputs a..f and outputs u..z.
// Timing: purely combinational, no clock.
// The equations are those of the gate's definition and block diagram.
module um_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  input  logic f,
  output logic u,
  output logic v,
  output logic w,
  output logic x,
  output logic y,
  output logic z
);
  assign u = a;
  assign v = (a & b) ^ ~c;
  assign w = (~a & b) ^ ~c;
  assign x = a ^ d;
  assign y = (d & e) ^ ~f;
  assign z = (~d & e) ^ ~f;
endmodule
