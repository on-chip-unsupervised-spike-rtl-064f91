// WTA: closest-cluster tree.
//
// A balanced tree of NC-1 W cells (4, 2, 1 for NC = 8) reduces the NC
// candidates to the one with the smallest distance. Each cell's select bit
// steers the index bits of the lower levels, so the root delivers the 3-bit
// cluster index, its distance and a valid bit (any candidate at all). Ties go
// to the lower index. Combinational. NC must be a power of two. The tree shape
// follows the original design.
module wta #(
  parameter int unsigned NC = spks_pkg::NC,
  localparam int unsigned CW = $clog2(NC)
) (
  input  logic [NC-1:0]      cand,
  input  logic [NC-1:0][1:0] gdist,
  output logic               valid,
  output logic [CW-1:0]      idx,
  output logic [1:0]         win_dist
);

  // Heap-ordered nodes: node k has children 2k+1 and 2k+2, leaves are the
  // candidates at NC-1 .. 2NC-2.
  localparam int unsigned NN = 2 * NC - 1;
  logic             nv [NN];
  logic [1:0]       nd [NN];
  logic [CW-1:0]    ni [NN];

  for (genvar i = 0; i < NC; i++) begin : g_leaf
    assign nv[NC-1+i] = cand[i];
    assign nd[NC-1+i] = gdist[i];
    assign ni[NC-1+i] = CW'(i);
  end

  for (genvar k = 0; k < NC - 1; k++) begin : g_node
    logic s;
    wta_node u_w (
      .va(nv[2*k+1]), .vb(nv[2*k+2]), .da(nd[2*k+1]), .db(nd[2*k+2]),
      .v(nv[k]), .d(nd[k]), .sel(s)
    );
    assign ni[k] = s ? ni[2*k+2] : ni[2*k+1];
  end

  assign valid    = nv[0];
  assign idx      = ni[0];
  assign win_dist = nd[0];

endmodule
