// dec2to4_um: reversible 2-to-4 decoder built from one UM gate and two
// Feynman gates.
//
// The UM gate splits line B by A in its upper half (V = A.B, W = A'.B with
// C = 1) and line E by D in its lower half (Y = D.E, Z = D'.E with F = 1).
// A Feynman gate copies A onto D (target constant 0), and a second one copies
// B onto E with its target constant 1, so E carries B'. The four products
// are then the four minterms. U (a copy of A) and X = A xor D = 0 are
// garbage; X is a constant by construction, which is inherent to the circuit.
//
// Interface: i[1:0] = {I0 (A), I1 (B)}: i[1] is I0, the most significant bit. y[v] is 1
// exactly when i == v. g[1] = U, g[0] = X.
// Timing: combinational.
// Gate types, the routing of A and B and the output assignment follow the
// published circuit. The published drawing shows the constant 0 on the E
// line, which cannot give the drawn outputs A.B' and A'.B'; the inverting
// copy (constant 1) is this design's reading. Counts: 3 gates, 4 ancillas,
// 2 garbage lines.
module dec2to4_um (
  input  logic [1:0] i,
  output logic [3:0] y,
  output logic [1:0] g
);
  logic a_l, b_l, d_l, e_l;

  feynman_gate u_fg_a (.a(i[1]), .b(1'b0), .p(a_l), .q(d_l));
  feynman_gate u_fg_b (.a(i[0]), .b(1'b1), .p(b_l), .q(e_l));

  um_gate u_um (
    .a(a_l), .b(b_l), .c(1'b1), .d(d_l), .e(e_l), .f(1'b1),
    .u(g[1]), .v(y[3]), .w(y[1]), .x(g[0]), .y(y[2]), .z(y[0])
  );
endmodule
