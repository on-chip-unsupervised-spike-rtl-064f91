// One entry of the cluster CAM.
//
// Stores the grid cell (two 3-bit region indexes) that names a cluster and the
// cluster's usefulness state. The stored cell is compared with the incoming
// spike's cell through grid_adj: hit for an exact match, cand/gdist for a match
// or an adjacent cell. An entry in state Free is unoccupied and never hits or
// is a candidate. On an update cycle (update high) an entry selected by the
// vacancy tracker (alloc) takes the spike's cell and starts as Outlier;
// otherwise the usefulness moves through bimodal with train_hit (a hit by an
// informative spike) and leak. Reset empties the entry. State changes on the
// rising edge; compare outputs are combinational. The behaviour follows the original
// design; the single-edge timing is this implementation's choice.
module cam_entry
  import spks_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  grid_t      grid,
  input  logic       update,
  input  logic       leak,
  input  logic       alloc,
  input  logic       infm,
  output logic       hit,
  output logic       cand,
  output logic [1:0] gdist,
  output logic       occupied,
  output use_t       state,
  output grid_t      cl_cell
);

  logic  hit_raw, near_raw;
  use_t  state_n;

  grid_adj u_adj (.a(grid), .b(cl_cell), .hit(hit_raw), .is_near(near_raw), .gdist);

  assign occupied = (state != U_FREE);
  assign hit      = occupied & hit_raw;
  assign cand     = occupied & near_raw;

  bimodal u_use (.cur(state), .update, .hit(hit & infm), .leak, .nxt(state_n));

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= U_FREE;
      cl_cell  <= '0;
    end else if (update && alloc) begin
      state <= U_OUTLIER;
      cl_cell  <= grid;
    end else begin
      state <= state_n;
    end
  end

endmodule
