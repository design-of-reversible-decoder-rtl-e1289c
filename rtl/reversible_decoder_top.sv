// reversible_decoder_top: the six reversible decoders side by side.
//
// One input word feeds every decoder: the two 2-to-4 designs (single SOM gate;
// UM gate with two Feynman gates) decode I0 and I1, the two 3-to-8 designs
// (SOM core with OM gates; SOM core with UM gates) decode I0..I2, and the two
// general designs decode all N bits. Every decoded line and every garbage line
// is brought out, so the circuits can be compared on identical stimulus.
// Constant (ancilla) inputs are tied inside each decoder.
//
// Interface: i[N-1:0] = {I0, ..., I(N-1)}: i[N-1] is I0, the most
// significant bit. Each y*
// output is one-hot, indexed by the value of the bits its decoder reads; each
// g* output carries that decoder's garbage lines.
// Timing: combinational.
// The six circuits are the published ones; placing them together on a shared
// input, and N = 4, are this design's choices.
module reversible_decoder_top #(
  parameter int N = 4
) (
  input  logic [N-1:0]           i,
  output logic [3:0]             y24_um,
  output logic [1:0]             g24_um,
  output logic [3:0]             y24_som,
  output logic [7:0]             y38_um,
  output logic [2:0]             g38_um,
  output logic [7:0]             y38_om,
  output logic                   g38_om,
  output logic [2**N-1:0]        yn_um,
  output logic [2**(N-1)+N-5:0]  gn_um,
  output logic [2**N-1:0]        yn_om,
  output logic [N-3:0]           gn_om
);
  dec2to4_um     u_d24_um  (.i(i[N-1:N-2]), .y(y24_um), .g(g24_um));
  dec2to4_som    u_d24_som (.i(i[N-1:N-2]), .y(y24_som));
  dec3to8_som_um u_d38_um  (.i(i[N-1:N-3]), .y(y38_um), .g(g38_um));
  dec3to8_som_om u_d38_om  (.i(i[N-1:N-3]), .y(y38_om), .g(g38_om));
  decn_som_um #(.N(N)) u_dn_um (.i(i), .y(yn_um), .g(gn_um));
  decn_som_om #(.N(N)) u_dn_om (.i(i), .y(yn_om), .g(gn_om));
endmodule
