// om_layer: one expansion layer of OM gates, turning a (K-1)-to-2^(K-1)
// decoder into a K-to-2^K decoder.
//
// Each of the 2^(K-1) decoded lines d_in[m] enters the B input of its own OM
// gate with C = 1. The new select bit enters the A input of the gate on the
// highest line and is handed from gate to gate through the X outputs, top
// line first. Gate m drives d_out[2m+1] = sel . d_in[m] (Y) and
// d_out[2m] = sel' . d_in[m] (Z), so the new bit becomes the least
// significant bit of the decoded index. The copy of sel leaving the last
// gate is the layer's single garbage line.
//
// Interface: d_in one-hot of width 2^(K-1), sel the new input bit; d_out
// one-hot of width 2^K, sel_out the garbage copy of sel.
// Timing: combinational; the select bit ripples through 2^(K-1) gates.
// Structure follows the published layered decoder; the index convention is
// this design's.
module om_layer #(
  parameter int K = 3
) (
  input  logic [2**(K-1)-1:0] d_in,
  input  logic                sel,
  output logic [2**K-1:0]     d_out,
  output logic                sel_out
);
  localparam int M = 2**(K-1);

  // chain[t] is the select bit entering gate t, counted from the top line.
  logic [M:0] chain;
  assign chain[0] = sel;

  for (genvar t = 0; t < M; t++) begin : g_om
    localparam int L = M - 1 - t;  // decoded line served by this gate
    om_gate u_om (
      .a(chain[t]), .b(d_in[L]), .c(1'b1),
      .x(chain[t+1]), .y(d_out[2*L+1]), .z(d_out[2*L])
    );
  end

  assign sel_out = chain[M];
endmodule
