// um_layer: one expansion layer of UM gates (each with a Feynman gate),
// turning a (K-1)-to-2^(K-1) decoder into a K-to-2^K decoder.
//
// The decoded lines are taken in pairs, highest pair first. For the pair
// (2p+1, 2p), a Feynman gate copies the select bit onto a constant-0 line,
// and a UM gate receives A = select bit, B = d_in[2p+1], C = 1, D = the copy,
// E = d_in[2p], F = 1. Its V, W, Y, Z outputs are the two lines split by the
// select bit: d_out[4p+3], d_out[4p+2], d_out[4p+1], d_out[4p]. The select bit
// leaves through U to the next pair. X = A xor D is 0 in every gate and is
// garbage, as is the select bit leaving the last gate.
//
// Interface: d_in one-hot of width 2^(K-1), sel the new input bit; d_out
// one-hot of width 2^K; x_garb the 2^(K-2) X outputs (constant 0 by
// construction); sel_out the garbage copy of sel.
// Timing: combinational; the select bit ripples through 2^(K-2) gate pairs.
// Structure follows the published layered decoder; the index convention is
// this design's.
module um_layer #(
  parameter int K = 3
) (
  input  logic [2**(K-1)-1:0] d_in,
  input  logic                sel,
  output logic [2**K-1:0]     d_out,
  output logic [2**(K-2)-1:0] x_garb,
  output logic                sel_out
);
  localparam int P = 2**(K-2);

  logic [P:0] chain;
  assign chain[0] = sel;

  for (genvar t = 0; t < P; t++) begin : g_um
    localparam int Q = P - 1 - t;  // line pair served by this gate
    logic a_l, d_l;
    feynman_gate u_fg (.a(chain[t]), .b(1'b0), .p(a_l), .q(d_l));
    um_gate u_um (
      .a(a_l), .b(d_in[2*Q+1]), .c(1'b1), .d(d_l), .e(d_in[2*Q]), .f(1'b1),
      .u(chain[t+1]), .v(d_out[4*Q+3]), .w(d_out[4*Q+2]), .x(x_garb[Q]),
      .y(d_out[4*Q+1]), .z(d_out[4*Q])
    );
  end

  assign sel_out = chain[P];
endmodule
