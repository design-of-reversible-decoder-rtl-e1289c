// dec3to8_som_om: reversible 3-to-8 decoder from one SOM gate and four OM
// gates.
//
// The SOM gate decodes I0 and I1 into four lines. Each line then passes
// through its own OM gate, which splits it by I2: the Y output carries the
// line AND I2, the Z output the line AND NOT I2. I2 enters the top OM gate
// and is passed down from gate to gate on the X outputs; the copy leaving
// the last gate is the only garbage line. Counts: 5 gates, 6 constant
// inputs, 1 garbage output.
//
// Interface: i[2:0] = {I0, I1, I2}: i[2] is I0, the most significant bit,
// and i[0] is I2. y[v] is 1 exactly
// when i == v. g is the copy of I2 out of the last OM gate.
// Timing: combinational.
// Structure follows the published circuit; the output ordering is this
// design's convention.
module dec3to8_som_om (
  input  logic [2:0] i,
  output logic [7:0] y,
  output logic       g
);
  logic [3:0] d2;

  dec2to4_som u_core (.i(i[2:1]), .y(d2));
  om_layer #(.K(3)) u_layer (.d_in(d2), .sel(i[0]), .d_out(y), .sel_out(g));
endmodule
