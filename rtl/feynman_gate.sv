// feynman_gate: the 2x2 Feynman (controlled-NOT) reversible gate.
//
// Function: P = A, Q = A xor B. With B held at 0 it copies A onto a second
// line, which is how the decoders obtain a second copy of a select bit
// without fan-out. With B = 1 the copy is inverted.
//
// Interface: control a, target b; outputs p (control through) and q.
// Timing: purely combinational, no clock.
// The gate is the standard controlled-NOT; the decoders use it by name only.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
