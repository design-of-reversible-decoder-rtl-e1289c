// som_gate: the 4x4 reversible SOM gate.
//
// Function: W = A.B xor C xor D, X = A.B' xor C,
//           Y = A'.B xor C xor D, Z = A'.B' xor C xor D.
// With C = D = 0 the four outputs are the four minterms of A and B, so the
// gate alone is a complete 2-to-4 decoder with no garbage output. Other
// settings of C and D give NOT, XOR, NAND and XNOR of the inputs. The mapping
// (A,B,C,D) -> (W,X,Y,Z) is a bijection.
//
// Interface: single-bit inputs a, b, c, d and outputs w, x, y, z.
// Timing: purely combinational, no clock.
// The equations are those of the gate's definition and truth table.
module som_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic w,
  output logic x,
  output logic y,
  output logic z
);
  assign w = (a & b) ^ c ^ d;
  assign x = (a & ~b) ^ c;
  assign y = (~a & b) ^ c ^ d;
  assign z = (~a & ~b) ^ c ^ d;
endmodule
