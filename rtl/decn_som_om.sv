// decn_som_om: reversible n-to-2^n decoder from one SOM gate and layers of
// OM gates (n >= 3).
//
// The 3-to-8 SOM/OM decoder decodes I0..I2. Every further input bit I_(k-1),
// k = 4..N, adds one om_layer: 2^(k-1) OM gates, one per decoded line, each
// splitting its line by the new bit, which is chained from gate to gate
// through the OM X outputs. Each layer leaves one garbage line, the copy of
// its select bit. Per N: 2^N - 3 gates, 2^N - 2 constant inputs and N - 2
// garbage outputs (GATES, ANCILLAS and GARBAGE below). The constant count
// plus the N inputs equals the 2^N outputs plus the garbage, as a reversible
// circuit requires.
//
// Interface: i[N-1:0] = {I0, ..., I(N-1)}: i[N-1] is I0, the most
// significant bit, and i[N-1-k] is I(k). y[v] is 1
// exactly when i == v. g[0] is the garbage line of the 3-to-8 core, g[k-3]
// that of the layer adding I(k-1).
// Timing: combinational. The longest path is the select bit of the last layer
// rippling through its 2^(N-1) OM gates.
// The layering, gate types and constants follow the published general
// decoder. The garbage count (N - 2 rather than a single line) follows from
// building that structure as drawn. N = 4 and the output ordering are this
// design's choices.
module decn_som_om #(
  parameter int N = 4
) (
  input  logic [N-1:0]     i,
  output logic [2**N-1:0]  y,
  output logic [N-3:0]     g
);
  localparam int W = 2**N;

  function automatic int count_gates(int n);
    int s = 5;
    for (int k = 4; k <= n; k++) s += 2**(k-1);
    return s;
  endfunction

  function automatic int count_ancillas(int n);
    int s = 6;
    for (int k = 4; k <= n; k++) s += 2**(k-1);
    return s;
  endfunction

  localparam int GATES    = count_gates(N);
  localparam int ANCILLAS = count_ancillas(N);
  localparam int GARBAGE  = N - 2;

  // Elaboration checks: the structure needs N >= 3, its gate and constant
  // counts are the published 2^N - 3 and 2^N - 2, and inputs plus constants
  // balance outputs plus garbage, as in any reversible circuit.
  if (N < 3) begin : g_bad_n
    $error("decn_som_om needs N >= 3");
  end
  if (GATES != W - 3 || ANCILLAS != W - 2 || N + ANCILLAS != W + GARBAGE) begin : g_bad_count
    $error("decn_som_om gate or line count mismatch");
  end

  // lvl[k] holds the 2^k decoded lines after input bit I(k-1), zero-extended.
  logic [W-1:0] lvl [3:N];

  logic [7:0] d3;
  dec3to8_som_om u_core (.i(i[N-1:N-3]), .y(d3), .g(g[0]));
  assign lvl[3] = W'(d3);

  for (genvar k = 4; k <= N; k++) begin : g_layer
    logic [2**k-1:0] d_out;
    om_layer #(.K(k)) u_layer (
      .d_in(lvl[k-1][2**(k-1)-1:0]), .sel(i[N-k]), .d_out(d_out), .sel_out(g[k-3])
    );
    assign lvl[k] = W'(d_out);
  end

  assign y = lvl[N];
endmodule
