// dec2to4_som: reversible 2-to-4 decoder built from one SOM gate.
//
// The SOM gate with its C and D inputs tied to the constant 0 produces the
// four minterms of its A and B inputs, so a single gate decodes two bits with
// two constant (ancilla) inputs and no garbage output.
//
// Interface: i[1:0] = {I0, I1}: i[1] is I0, the most significant bit, and
// i[0] is I1. y[v] is 1 exactly when i == v: y[3] = I0.I1 (SOM W), y[2] = I0.I1'
// (X), y[1] = I0'.I1 (Y), y[0] = I0'.I1' (Z).
// Timing: combinational.
// Structure and constants follow the published circuit; the one-hot output
// ordering is this design's convention.
module dec2to4_som (
  input  logic [1:0] i,
  output logic [3:0] y
);
  som_gate u_som (
    .a(i[1]), .b(i[0]), .c(1'b0), .d(1'b0),
    .w(y[3]), .x(y[2]), .y(y[1]), .z(y[0])
  );
endmodule
