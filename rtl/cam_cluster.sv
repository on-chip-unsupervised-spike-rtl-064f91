// CAM_CLUSTER: the learnt clusters, eight grid cells with usefulness trackers.
//
// The spike's grid cell is broadcast to all NC entries. On an update cycle
// (training) with an informative spike: if an occupied entry holds the same
// cell it is strengthened; if none does, the vacancy tracker hands the cell to
// the first free entry, which starts as Outlier (nothing happens when the CAM is
// full). A leak on an update cycle weakens every occupied entry, so entries
// that stop being hit are eventually vacated. For sorting every entry reports
// whether it is a candidate (occupied, same or adjacent cell) and its distance.
// Compare outputs are combinational, entry state changes on the rising edge.
// The policy follows the original design; dropping a new cell when the CAM
// is full is this implementation's choice.
module cam_cluster
#(
  parameter int unsigned NC = spks_pkg::NC
) (
  input  logic                clk,
  input  logic                reset,
  input  spks_pkg::grid_t               grid,
  input  logic                update,
  input  logic                leak,
  input  logic                infm,
  output logic [NC-1:0]       cand,
  output logic [NC-1:0][1:0]  gdist,
  output logic [NC-1:0]       occupied,
  output logic [NC-1:0]       hits,
  output logic                alloc_evt,   // a new cluster is created this cycle
  output logic                full_drop    // a new cl_cell was dropped: CAM full
);

  logic [NC-1:0] alloc;
  logic          req;

  assign req = update & infm & ~|hits;

  vac #(.NC(NC)) u_vac (.req, .occupied, .alloc);

  for (genvar i = 0; i < NC; i++) begin : g_entry
    cam_entry u_entry (
      .clk, .reset, .grid, .update, .leak, .alloc(alloc[i]), .infm,
      .hit(hits[i]), .cand(cand[i]), .gdist(gdist[i]), .occupied(occupied[i]),
      .state(), .cl_cell()
    );
  end

  assign alloc_evt = |alloc;
  assign full_drop = req & ~|alloc;

endmodule
