// dec3to8_som_um: reversible 3-to-8 decoder from one SOM gate, two UM gates
// and two Feynman gates.
//
// The SOM gate decodes I0 and I1 into four lines. The upper two lines enter
// the B and E inputs of one UM gate and the lower two those of a second UM
// gate; each UM splits both of its lines by I2. I2 drives the A input of the
// upper UM gate and is passed to the lower one through U; in front of each
// UM a Feynman gate copies I2 onto the D input. Garbage: both X outputs
// (always 0) and the U output of the lower gate. Counts: 5 gates, 8 constant
// inputs, 3 garbage outputs.
//
// Interface: i[2:0] = {I0, I1, I2}: i[2] is I0, the most significant bit,
// and i[0] is I2. y[v] is 1 exactly
// when i == v. g[2:1] are the X outputs of the upper and lower UM gates
// (constant 0 by construction), g[0] the copy of I2 out of the lower gate.
// Timing: combinational.
// Structure follows the published circuit; the output ordering is this
// design's convention.
module dec3to8_som_um (
  input  logic [2:0] i,
  output logic [7:0] y,
  output logic [2:0] g
);
  logic [3:0] d2;

  dec2to4_som u_core (.i(i[2:1]), .y(d2));
  um_layer #(.K(3)) u_layer (
    .d_in(d2), .sel(i[0]), .d_out(y), .x_garb(g[2:1]), .sel_out(g[0])
  );
endmodule
