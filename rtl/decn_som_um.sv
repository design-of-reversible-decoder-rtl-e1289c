// decn_som_um: reversible n-to-2^n decoder from one SOM gate and layers of
// UM gates with Feynman copy gates (n >= 3).
//
// The 3-to-8 SOM/UM decoder decodes I0..I2. Every further input bit I_(k-1),
// k = 4..N, adds one um_layer: 2^(k-2) UM gates, each taking two decoded
// lines and splitting both by the new bit, with a Feynman gate in front of
// each UM copying the bit onto its D input. The bit is chained through the
// UM U outputs. Garbage per layer: the X output of each UM (always 0) and
// the select-bit copy leaving the last gate. Per N: 2^N - 3 gates,
// 3*2^(N-1) - 4 constant inputs and 2^(N-1) + N - 4 garbage outputs
// (GATES, ANCILLAS, GARBAGE).
//
// Interface: i[N-1:0] = {I0, ..., I(N-1)}: i[N-1] is I0, the most
// significant bit, and i[N-1-k] is I(k). y[v] is 1
// exactly when i == v. g[2:0] is the garbage of the 3-to-8 core
// ({X upper, X lower, select copy}); each later layer k adds 2^(k-2) X lines
// followed by its select copy, packed upward from bit 3.
// Timing: combinational; the longest path is the select bit of the last
// layer rippling through its 2^(N-2) gate pairs.
// The layering, gate types and constants follow the published general
// decoder; the garbage count is that of the structure as drawn. N = 4 and
// the output ordering are this design's choices. The X outputs are constant
// 0 by construction of the circuit.
module decn_som_um #(
  parameter int N = 4
) (
  input  logic [N-1:0]            i,
  output logic [2**N-1:0]         y,
  output logic [2**(N-1)+N-5:0]   g
);
  localparam int W = 2**N;

  function automatic int count_gates(int n);
    int s = 5;
    for (int k = 4; k <= n; k++) s += 2 * 2**(k-2);
    return s;
  endfunction

  function automatic int count_ancillas(int n);
    int s = 8;
    for (int k = 4; k <= n; k++) s += 3 * 2**(k-2);
    return s;
  endfunction

  localparam int GATES    = count_gates(N);
  localparam int ANCILLAS = count_ancillas(N);
  localparam int GARBAGE  = 2**(N-1) + N - 4;

  // Elaboration checks: the structure needs N >= 3, its gate and constant
  // counts are the published 2^N - 3 and 3*2^(N-1) - 4, and inputs plus
  // constants balance outputs plus garbage, as in any reversible circuit.
  if (N < 3) begin : g_bad_n
    $error("decn_som_um needs N >= 3");
  end
  if (GATES != W - 3 || ANCILLAS != 3 * 2**(N-1) - 4 || N + ANCILLAS != W + GARBAGE)
  begin : g_bad_count
    $error("decn_som_um gate or line count mismatch");
  end

  logic [W-1:0] lvl [3:N];

  logic [7:0] d3;
  dec3to8_som_um u_core (.i(i[N-1:N-3]), .y(d3), .g(g[2:0]));
  assign lvl[3] = W'(d3);

  for (genvar k = 4; k <= N; k++) begin : g_layer
    localparam int OFF = 2**(k-2) + k - 5;  // first garbage bit of this layer
    logic [2**k-1:0] d_out;
    um_layer #(.K(k)) u_layer (
      .d_in(lvl[k-1][2**(k-1)-1:0]), .sel(i[N-k]), .d_out(d_out),
      .x_garb(g[OFF +: 2**(k-2)]), .sel_out(g[OFF + 2**(k-2)])
    );
    assign lvl[k] = W'(d_out);
  end

  assign y = lvl[N];
endmodule
